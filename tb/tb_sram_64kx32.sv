// Self-checking test of the 64Kx32 SRAM: writes a distinct word to every
// address of all eight banks, reads them all back one cycle later each, then
// random masked writes and reads against a reference array.
module tb_sram_64kx32;
  import lpsr_pkg::*;
  logic clk = 0, pd = 0;
  mem_req_t req;
  logic [31:0] q;
  logic [31:0] ref_mem [65536];
  int checks = 0, failures = 0;

  sram_64kx32 dut (.clk, .pd, .req, .q);

  always #5 clk = ~clk;
  initial begin #20_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic op(input logic r, input logic [15:0] a, input logic [31:0] d, m);
    req = '{csb: 1'b0, rwb: r, addr: a, data: d, wib: m};
    @(posedge clk); #1;
    // move the address on before q is looked at: q must follow the bank read
    req = '{csb: 1'b1, rwb: 1'b1, addr: 16'($urandom), data: '0, wib: '1};
    #1;
  endtask

  initial begin
    for (int i = 0; i < 65536; i++) begin ref_mem[i] = {16'(i) ^ 16'hA5C3, 16'(i)}; op(0, 16'(i), ref_mem[i], '0); end
    for (int i = 0; i < 65536; i++) begin
      op(1, 16'(i), '0, '1);
      checks++; if (q !== ref_mem[i]) begin failures++; if (failures < 10) $display("addr %h: %h exp %h", i, q, ref_mem[i]); end
    end
    for (int n = 0; n < 20000; n++) begin
      automatic logic [15:0] a = 16'($urandom);
      if ($urandom_range(1) != 0) begin
        automatic logic [31:0] d = $urandom, m = $urandom;
        op(0, a, d, m); ref_mem[a] = (ref_mem[a] & m) | (d & ~m);
      end else begin
        op(1, a, '0, '1);
        checks++; if (q !== ref_mem[a]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking test of sram_bank at its default size (8Kx32): random reads and
// masked writes against a reference array, the one-cycle read latency, chip
// select and power down (no access while pd is high).
module tb_sram_bank;
  localparam int unsigned WORDS = 8192;
  logic clk = 0, pd, csb, rwb;
  logic [12:0] addr;
  logic [31:0] d, wib, q;
  logic [31:0] ref_mem [WORDS];
  int checks = 0, failures = 0;

  sram_bank #(.WORDS(WORDS), .DATA_W(32)) dut (.*);

  always #5 clk = ~clk;
  initial begin #2_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic op(input logic c, r, input logic [12:0] a, input logic [31:0] dd, m);
    csb = c; rwb = r; addr = a; d = dd; wib = m;
    @(posedge clk); #1;
  endtask

  initial begin
    pd = 0;
    // initialise memory and reference
    for (int i = 0; i < WORDS; i++) begin ref_mem[i] = i * 32'h9E37_79B9; op(0, 0, 13'(i), ref_mem[i], '0); end
    for (int n = 0; n < 4000; n++) begin
      automatic logic [12:0] a = 13'($urandom);
      if ($urandom_range(1) != 0) begin
        automatic logic [31:0] dd = $urandom, m = $urandom;
        op(0, 0, a, dd, m);
        ref_mem[a] = (ref_mem[a] & m) | (dd & ~m);
      end else begin
        op(0, 1, a, '0, '1);
        checks++; if (q !== ref_mem[a]) begin failures++; $display("read %h: %h exp %h", a, q, ref_mem[a]); end
      end
    end
    // deselected and powered-down writes must not change the array
    op(0, 1, 13'd5, '0, '1);
    op(1, 0, 13'd5, 32'hDEAD_BEEF, '0);
    pd = 1; op(0, 0, 13'd5, 32'hDEAD_BEEF, '0); pd = 0;
    op(0, 1, 13'd5, '0, '1);
    checks++; if (q !== ref_mem[5]) begin failures++; $display("write while deselected/powered down took effect"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

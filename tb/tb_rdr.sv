// Self-checking test of the redundant data registers: random per-entry,
// per-bit writes against a reference.
module tb_rdr;
  localparam int DW = 32, NR = 4;
  logic clk = 0;
  logic [NR-1:0] we;
  logic [DW-1:0] bit_en, rdr_d;
  logic [NR*DW-1:0] words, ref_w;
  int checks = 0, failures = 0;

  rdr #(.DATA_W(DW), .NUM_RAR(NR)) dut (.*);
  always #5 clk = ~clk;
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    we = '1; bit_en = '1; rdr_d = '0; @(negedge clk); ref_w = '0;
    for (int n = 0; n < 3000; n++) begin
      we = NR'($urandom); bit_en = $urandom; rdr_d = $urandom;
      @(negedge clk);
      for (int k = 0; k < NR; k++)
        if (we[k]) ref_w[k*DW +: DW] = (ref_w[k*DW +: DW] & ~bit_en) | (rdr_d & bit_en);
      checks++; if (words !== ref_w) begin failures++; $display("rdr %h exp %h", words, ref_w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking test of the one-hot pointer register: start, N-1 shifts to the
// last cell, clear, reset.
module tb_efuse_pointer;
  localparam int N = 68;
  logic clk = 0, rst_n, clr, start, shift, last;
  logic [N-1:0] ptr;
  int checks = 0, failures = 0;
  efuse_pointer #(.N_FUSE(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin #100_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    clr = 0; start = 0; shift = 0; rst_n = 0; #12; rst_n = 1;
    checks++; if (ptr !== '0) failures++;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int k = 0; k < N; k++) begin
      checks++; if (ptr !== (N'(1) << k) || last !== (k == N - 1)) begin failures++; $display("k=%0d ptr=%h", k, ptr); end
      shift = 1; @(negedge clk); shift = 0;
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0; clr = 1; @(negedge clk); clr = 0;
    checks++; if (ptr !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

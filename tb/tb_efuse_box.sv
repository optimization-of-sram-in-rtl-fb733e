// Self-checking test of the whole e-fuse box: sense of fresh fuses, program of
// a random pattern with the accelerated timing, sense back the pattern (normal
// and margin read), isolation forcing the outputs low and blocking programming.
module tb_efuse_box;
  localparam int N = 68, PC = 4;
  logic efw_clk = 0, efw_resn, fuse_read, fuse_prgm, ready_in, ready_out, busy;
  logic efc_isolate, efc_test_margin, fss, tm;
  logic [N-1:0] fuse_val_i, fuse_val_o, pattern;
  int checks = 0, failures = 0;

  efuse_box #(.N_FUSE(N), .PRGM_CYCLES(PC)) dut (.*);
  always #5 efw_clk = ~efw_clk;
  initial begin #200_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic cmd(input logic prog, output int cyc);
    cyc = 0;
    if (prog) fuse_prgm = 1; else fuse_read = 1;
    @(negedge efw_clk); fuse_prgm = 0; fuse_read = 0;
    while (!ready_out && cyc < 10000) begin @(negedge efw_clk); cyc++; end
  endtask

  initial begin
    int cyc;
    fuse_read = 0; fuse_prgm = 0; ready_in = 1; efc_isolate = 0; efc_test_margin = 0; fss = 1; tm = 0;
    fuse_val_i = '0;
    efw_resn = 0; #12; efw_resn = 1; @(negedge efw_clk);
    cmd(0, cyc); chk(fuse_val_o == '0, "fresh box reads 0"); chk(cyc == N, "sense time");
    pattern = N'({$urandom, $urandom, $urandom});
    pattern[0] = 1'b1;
    fuse_val_i = pattern;
    cmd(1, cyc); chk(cyc == N + (PC - 1) * $countones(pattern), $sformatf("program time %0d", cyc));
    fuse_val_i = '0;
    cmd(0, cyc); chk(fuse_val_o == pattern, "pattern sensed");
    efc_test_margin = 1; cmd(0, cyc); chk(fuse_val_o == pattern, "pattern passes margin read"); efc_test_margin = 0;
    efc_isolate = 1; #1 chk(fuse_val_o == '0, "isolated outputs low");
    // programming while isolated has no effect
    fuse_val_i = ~pattern; cmd(1, cyc); fuse_val_i = '0;
    efc_isolate = 0; cmd(0, cyc); chk(fuse_val_o == pattern, "isolation blocked programming");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

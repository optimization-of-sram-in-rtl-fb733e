// Self-checking test of the e-fuse control state machine, with the pointer
// modelled by the testbench: a sense sequence strobes every cell once, one per
// clock; a program sequence spends PRGM_CYCLES clocks on each cell to blow and
// one on each other cell; ready_out follows completion; ready_in gates starts.
module tb_efuse_csm;
  localparam int N = 68, PC = 4;
  logic clk = 0, rst_n, fuse_read, fuse_prgm, ready_in, pointer_bit, last;
  logic ptr_start, ptr_shift, ptr_clr, rs_en, ps_en, ready_out, busy;
  logic [N-1:0] pattern;
  int pos;
  int checks = 0, failures = 0;

  efuse_csm #(.PRGM_CYCLES(PC)) dut (.*);
  always #5 clk = ~clk;
  initial begin #200_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // pointer model
  always @(posedge clk)
    if (ptr_clr) pos <= -1; else if (ptr_start) pos <= 0; else if (ptr_shift) pos <= pos + 1;
  assign last        = (pos == N - 1);
  assign pointer_bit = (pos >= 0 && pos < N) ? pattern[pos] : 1'b0;

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input logic prog, output int cyc, output int strobes, output int per_cell[N]);
    for (int k = 0; k < N; k++) per_cell[k] = 0;
    cyc = 0; strobes = 0;
    if (prog) fuse_prgm = 1; else fuse_read = 1;
    @(negedge clk); fuse_prgm = 0; fuse_read = 0;
    while (!ready_out && cyc < 10000) begin
      if ((prog ? ps_en : rs_en) && pos >= 0) begin strobes++; per_cell[pos]++; end
      chk(busy, "busy during sequence");
      @(negedge clk); cyc++;
    end
  endtask

  initial begin
    int cyc, strobes, ones; int per_cell[N];
    pos = -1; fuse_read = 0; fuse_prgm = 0; ready_in = 1; pattern = '0;
    rst_n = 0; #12; rst_n = 1; @(negedge clk);
    chk(!ready_out && !busy, "idle after reset");
    // no start without ready_in
    ready_in = 0; fuse_read = 1; @(negedge clk); @(negedge clk); fuse_read = 0;
    chk(!busy && !ready_out, "ready_in low blocks start"); ready_in = 1;
    // sense
    run(0, cyc, strobes, per_cell);
    chk(cyc == N && strobes == N, $sformatf("sense takes N clocks (%0d, %0d strobes)", cyc, strobes));
    for (int k = 0; k < N; k++) chk(per_cell[k] == 1, "each cell sensed once");
    chk(ready_out, "ready_out after sense");
    @(negedge clk); chk(ready_out, "ready_out held");
    // program a pattern
    pattern = N'({$urandom, $urandom, $urandom});
    ones = $countones(pattern);
    run(1, cyc, strobes, per_cell);
    chk(cyc == N + (PC - 1) * ones, $sformatf("program clocks %0d exp %0d", cyc, N + (PC - 1) * ones));
    for (int k = 0; k < N; k++) chk(per_cell[k] == (pattern[k] ? PC : 0), "blow pulse only on marked cells");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Workload test: sorting a sample of memories the way a production test does.
// Each of NCHIPS simulated memories gets a random subset of five possible
// stuck-at-0 cells (so 0 to 5 faulty words; the design has 4 spare words).
// Every memory goes through the two BIST runs of the test flow:
//   debug run  - a memory with no miscompare is "good"; nothing is repaired;
//   repair run - a memory whose mbist_nogo stays low is "good after repair",
//                and one that was bad in the debug run counts as "repaired".
// The testbench predicts each class from the number of injected faults
// (repairable when it is at most 4) and checks the fail count of each run
// (two per stuck-at-0 cell in debug; in repair mode one per repaired cell and
// two per cell left over once the spares are used up).
// It then checks in mission mode that every faulty word of a repaired memory
// reads back what was written. Prints the sorting summary like a test report.
module tb_workload_wafer_sort;
  import lpsr_pkg::*;
  localparam int NCHIPS = 8;
  localparam int W = 1 << ADDR_W;
  localparam logic [15:0] FA [5] = '{{3'd2, 13'h0123}, {3'd5, 13'h1ABC}, {3'd7, 13'h0001},
                                     {3'd0, 13'h1FFF}, {3'd3, 13'h0800}};

  logic clk = 0, res_n, rar_nset, mbist_nrst;
  logic power_down, scan_test_en, mbist_test_en, other_test_en, mbist_debug;
  logic [4:0] mem_sel;
  logic csb, rwb;
  logic [ADDR_W-1:0] address;
  logic [DATA_W-1:0] data_in, wib, data_out;
  logic rar_match, init_done, mbist_fail, mbist_nogo, mbist_done;
  op_mode_t mode;
  pwr_t pwr;
  logic [15:0] mbist_fail_count, mbist_fail_addr;
  logic fuse_prgm, fss, efc_test_margin, tm, fuse_ready;
  logic [N_FUSE-1:0] rar_val_out;
  logic [4:0] fmask;

  int checks = 0, failures = 0;
  int n_good_debug = 0, n_good_repair = 0, n_repaired = 0, n_nogo = 0;

  lpsr_sram64kx32 dut (.*);
  always #5 clk = ~clk;
  initial begin #2_000_000_000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(negedge clk) begin
    if (fmask[0]) dut.u_sram.g_bank[2].u_bank.mem[13'h0123][0] = 1'b0;
    if (fmask[1]) dut.u_sram.g_bank[5].u_bank.mem[13'h1ABC][0] = 1'b0;
    if (fmask[2]) dut.u_sram.g_bank[7].u_bank.mem[13'h0001][0] = 1'b0;
    if (fmask[3]) dut.u_sram.g_bank[0].u_bank.mem[13'h1FFF][0] = 1'b0;
    if (fmask[4]) dut.u_sram.g_bank[3].u_bank.mem[13'h0800][0] = 1'b0;
  end

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask
  task automatic run_mbist(input logic dbg, output int nfail, output logic nogo);
    int cyc = 0;
    mbist_debug = dbg; mbist_test_en = 1;
    @(negedge clk);
    while (!mbist_done && cyc < 2 * 10 * W) begin @(negedge clk); cyc++; end
    chk(mbist_done, "BIST finished");
    nfail = int'(mbist_fail_count); nogo = mbist_nogo;
    mbist_test_en = 0; @(negedge clk);
  endtask

  initial begin
    int nf_dbg, nf_rep, nfaults; logic nogo; logic [31:0] d;
    {power_down, scan_test_en, mbist_test_en, other_test_en, mbist_debug} = '0;
    mem_sel = 0; csb = 1; rwb = 1; address = 0; data_in = 0; wib = '1;
    fuse_prgm = 0; fss = 1; efc_test_margin = 0; tm = 0; fmask = '0;
    for (int chip = 0; chip < NCHIPS; chip++) begin
      // chip 0 is fault free and chip 1 has all five faults; the rest are random
      fmask = (chip == 0) ? 5'b0 : (chip == 1) ? 5'b11111 : 5'($urandom);
      nfaults = $countones(fmask);
      rar_nset = 0; res_n = 0; mbist_nrst = 0; @(negedge clk);
      rar_nset = 1; res_n = 1; mbist_nrst = 1;
      while (!init_done) @(negedge clk);
      run_mbist(1, nf_dbg, nogo);
      chk(nf_dbg == 2 * nfaults, $sformatf("chip %0d debug fails %0d, expected %0d", chip, nf_dbg, 2 * nfaults));
      chk(rar_val_out == '0, "debug run repairs nothing");
      run_mbist(0, nf_rep, nogo);
      chk(nogo == (nfaults > NUM_RAR), $sformatf("chip %0d nogo %0d with %0d faults", chip, nogo, nfaults));
      // each repaired word fails once; words beyond the spares keep failing twice
      chk(nf_rep == ((nfaults <= NUM_RAR) ? nfaults : NUM_RAR + 2 * (nfaults - NUM_RAR)),
          $sformatf("chip %0d repair fails %0d", chip, nf_rep));
      if (nf_dbg == 0) n_good_debug++;
      if (!nogo) n_good_repair++;
      if (!nogo && nf_dbg != 0) n_repaired++;
      if (nogo) n_nogo++;
      if (!nogo) begin
        for (int k = 0; k < 5; k++) if (fmask[k]) begin
          csb = 0; rwb = 0; address = FA[k]; data_in = 32'h5555_AAA0 + k; wib = '0; @(negedge clk);
          rwb = 1; @(posedge clk); #1; d = data_out; @(negedge clk); csb = 1;
          chk(d == 32'h5555_AAA0 + k && rar_match, $sformatf("chip %0d word %h after repair", chip, FA[k]));
        end
      end
      $display("chip %0d: %0d faulty words, debug fails %0d, repair fails %0d, nogo %0d", chip, nfaults, nf_dbg, nf_rep, nogo);
    end
    $display("sorting: %0d memories, good in debug run %0d, good after repair %0d, repaired %0d, not repairable %0d",
             NCHIPS, n_good_debug, n_good_repair, n_repaired, n_nogo);
    chk(n_repaired > 0 && n_nogo > 0 && n_good_debug > 0, "every class seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// End-to-end test of the LPSR SRAM 64Kx32 at its default size (64K words,
// 4 redundant words, 68 fuses). Stuck-at-0 cells are injected into the SRAM
// banks from the testbench (re-applied after every write). The test walks the
// memory through its whole life:
//   power-on fuse sense -> mission accesses -> scan mode power check ->
//   mbist debug (faults reported, nothing repaired) ->
//   mbist repair (two faults, mbist_fail pulses twice, mbist_nogo stays low) ->
//   mission use of the repaired words through the redundant registers ->
//   fuse programming -> power down (outputs isolated, RARs kept) ->
//   new power-on: the repair comes back from the fuses ->
//   five faults with four redundant words: mbist_nogo.
// Each mechanism is counted and a failure is counted for one that never ran.
module tb_lpsr_sram64kx32;
  import lpsr_pkg::*;
  localparam int W = 1 << ADDR_W;
  localparam int EW = ADDR_W + 1;
  // fault sites: {bank, word-in-bank}
  localparam logic [15:0] F0 = {3'd2, 13'h0123};
  localparam logic [15:0] F1 = {3'd5, 13'h1ABC};
  localparam logic [15:0] F2 = {3'd7, 13'h0001};
  localparam logic [15:0] F3 = {3'd7, 13'h0002};
  localparam logic [15:0] F4 = {3'd7, 13'h0003};

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
  logic [N_FUSE-1:0] rar_val_out, saved_rar;
  logic two_faults, five_faults;

  int checks = 0, failures = 0;
  int n_fail_pulse = 0, n_repair = 0, n_rdr_read = 0, n_nogo = 0, n_pd_iso = 0;
  int n_fuse_prog = 0, n_fuse_reload = 0, n_scan = 0, n_debug = 0;

  lpsr_sram64kx32 dut (.*);

  always #5 clk = ~clk;
  initial begin #200_000_000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // stuck-at-0 cells: bit 0 of F0/F1, bit 31 of F2..F4
  always @(negedge clk) begin
    if (two_faults || five_faults) begin
      dut.u_sram.g_bank[2].u_bank.mem[13'h0123][0] = 1'b0;
      dut.u_sram.g_bank[5].u_bank.mem[13'h1ABC][0] = 1'b0;
    end
    if (five_faults) begin
      dut.u_sram.g_bank[7].u_bank.mem[13'h0001][31] = 1'b0;
      dut.u_sram.g_bank[7].u_bank.mem[13'h0002][31] = 1'b0;
      dut.u_sram.g_bank[7].u_bank.mem[13'h0003][31] = 1'b0;
    end
  end

  // count rising edges of mbist_fail; every fail must name a faulty word
  logic fail_q;
  int n_bad_fail_addr = 0;
  always @(posedge clk) begin
    fail_q <= mbist_fail;
    if (mbist_fail && !fail_q) n_fail_pulse++;
    if (mbist_fail && !(mbist_fail_addr inside {F0, F1, F2, F3, F4})) n_bad_fail_addr++;
  end

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask
  task automatic mwrite(input logic [15:0] a, input logic [31:0] d);
    csb = 0; rwb = 0; address = a; data_in = d; wib = '0; @(negedge clk); csb = 1;
  endtask
  task automatic mread(input logic [15:0] a, output logic [31:0] d, output logic m);
    csb = 0; rwb = 1; address = a; @(posedge clk); #1; d = data_out; m = rar_match; @(negedge clk); csb = 1;
  endtask
  task automatic power_on();
    int t = 0;
    res_n = 0; mbist_nrst = 0; @(negedge clk); res_n = 1; mbist_nrst = 1;
    while (!init_done && t < 1000) begin @(negedge clk); t++; end
    chk(init_done && t == N_FUSE + 3, $sformatf("power-on sense took %0d clocks", t));
  endtask
  task automatic run_mbist(input logic dbg, output int cyc, output int nfail);
    mbist_debug = dbg; mbist_test_en = 1; cyc = 0;
    @(negedge clk);
    chk(mode == (dbg ? MODE_MBIST_DEBUG : MODE_MBIST_REPAIR), "mbist mode entered");
    chk(pwr.mbist && (pwr.efuse == dbg), "mbist power per mode table");
    while (!mbist_done && cyc < 2 * 10 * W) begin @(negedge clk); cyc++; end
    chk(cyc == 10 * W + 1, $sformatf("march took %0d clocks", cyc));
    nfail = int'(mbist_fail_count);
    mbist_test_en = 0; @(negedge clk);
  endtask

  initial begin
    logic [31:0] d; logic m; int cyc, f0, nf;
    {power_down, scan_test_en, mbist_test_en, other_test_en, mbist_debug} = '0;
    mem_sel = 0; csb = 1; rwb = 1; address = 0; data_in = 0; wib = '1;
    fuse_prgm = 0; fss = 1; efc_test_margin = 0; tm = 0; two_faults = 0; five_faults = 0;
    rar_nset = 0; #3; rar_nset = 1;
    power_on();
    chk(rar_val_out == '0, "fresh fuses: no repair");
    chk(mode == MODE_MISSION && !pwr.mbist && !pwr.efuse && pwr.sram, "mission power");
    // mission accesses on a good memory
    for (int i = 0; i < 64; i++) mwrite(16'(i * 1021), 32'hA000_0000 + i);
    for (int i = 0; i < 64; i++) begin
      mread(16'(i * 1021), d, m); chk(d == 32'hA000_0000 + i && !m, "mission read");
    end
    // scan mode powers everything
    scan_test_en = 1; #1 chk(mode == MODE_SCAN && pwr == 5'b11111, "scan mode power"); n_scan++;
    @(negedge clk); scan_test_en = 0;

    // debug mode: faults reported, not repaired
    two_faults = 1;
    f0 = n_fail_pulse;
    run_mbist(1, cyc, nf); n_debug++;
    chk(n_fail_pulse - f0 == 4 && nf == 4, $sformatf("debug: %0d fail pulses", n_fail_pulse - f0));
    chk(rar_val_out == '0 && !mbist_nogo, "debug mode repairs nothing");
    chk(n_bad_fail_addr == 0, "fail address names the faulty words");

    // repair mode: two faults, fail pulses twice, nogo low
    f0 = n_fail_pulse;
    run_mbist(0, cyc, nf);
    chk(n_fail_pulse - f0 == 2, $sformatf("repair: %0d fail pulses (expected 2)", n_fail_pulse - f0));
    chk(!mbist_nogo, "repairable: nogo low");
    chk(rar_val_out[0*EW +: EW] == {1'b1, F0} && rar_val_out[1*EW +: EW] == {1'b1, F1}, "RARs hold the faulty addresses");
    n_repair += 2;

    // mission use of the repaired words
    mwrite(F0, 32'h0000_0001); mwrite(F1, 32'hFFFF_FFFF);
    mread(F0, d, m); chk(d == 32'h0000_0001 && m, "F0 through RDR"); n_rdr_read += m;
    mread(F1, d, m); chk(d == 32'hFFFF_FFFF && m, "F1 through RDR"); n_rdr_read += m;
    mread(16'(F0 + 1), d, m); chk(!m, "neighbour not redirected");

    // burn the repair into the fuses
    saved_rar = rar_val_out;
    fuse_prgm = 1; @(negedge clk); fuse_prgm = 0;
    cyc = 0;
    while (!fuse_ready && cyc < 2000) begin chk(pwr.efuse, "e-fuse powered while programming"); @(negedge clk); cyc++; end
    chk(cyc == N_FUSE + (PRGM_CYCLES - 1) * $countones(saved_rar), $sformatf("fuse program took %0d", cyc));
    n_fuse_prog++;
    @(negedge clk); chk(!pwr.efuse, "e-fuse off again in mission");

    // power down: outputs isolated, RAR kept
    power_down = 1; csb = 0; rwb = 1; address = F0;
    @(posedge clk); #1;
    chk(mode == MODE_POWER_DOWN && pwr == 5'b00100, "power-down domains");
    chk(data_out == '0, "data_out isolated low"); n_pd_iso += (data_out == '0);
    @(negedge clk); csb = 1; power_down = 0; @(negedge clk);
    chk(rar_val_out == saved_rar, "RARs kept through power down");

    // new power-on: the RARs are cleared and reloaded from the fuses
    rar_nset = 0; #1; chk(rar_val_out == '0, "RARs cleared"); rar_nset = 1;
    power_on();
    chk(rar_val_out == saved_rar, "repair reloaded from fuses"); n_fuse_reload += (rar_val_out == saved_rar);
    mwrite(F0, 32'h1234_5679); mread(F0, d, m);
    chk(d == 32'h1234_5679 && m, "F0 repaired after reload"); n_rdr_read += m;

    // too many faults: four redundant words, five faulty words
    five_faults = 1;
    rar_nset = 0; #1; rar_nset = 1;      // start without the fuse repair
    res_n = 0; @(negedge clk); res_n = 1;
    while (!init_done) @(negedge clk);
    rar_nset = 0; #1; rar_nset = 1;
    run_mbist(0, cyc, nf);
    chk(mbist_nogo, "five faults, four RARs: nogo"); n_nogo += mbist_nogo;
    chk(n_bad_fail_addr == 0, "fail addresses all name faulty words");

    $display("mechanisms: fail_pulse=%0d repair=%0d rdr_read=%0d nogo=%0d pd_iso=%0d fuse_prog=%0d fuse_reload=%0d scan=%0d debug=%0d",
             n_fail_pulse, n_repair, n_rdr_read, n_nogo, n_pd_iso, n_fuse_prog, n_fuse_reload, n_scan, n_debug);
    chk(n_fail_pulse > 0 && n_repair > 0 && n_rdr_read > 0 && n_nogo > 0 && n_pd_iso > 0 &&
        n_fuse_prog > 0 && n_fuse_reload > 0 && n_scan > 0 && n_debug > 0, "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

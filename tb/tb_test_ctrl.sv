// Self-checking test of the test control unit: power-on sequence (fuse_read,
// wait for the e-fuse box, one-cycle rar_load, init_done), mode decode for
// every enable combination and mem_sel, fuse_busy, and the mbist_start pulse.
module tb_test_ctrl;
  import lpsr_pkg::*;
  logic clk = 0, rst_n, scan_test_en, mbist_test_en, other_test_en, mbist_debug, power_down;
  logic fuse_prgm, fuse_ready, fuse_seq_busy;
  logic [4:0] mem_sel;
  op_mode_t mode;
  logic fuse_read, fuse_busy, rar_load, init_done, mbist_start;
  int checks = 0, failures = 0, starts = 0;

  test_ctrl #(.MEM_ID(5'd3)) dut (.*);
  always #5 clk = ~clk;
  initial begin #100_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) if (mbist_start) starts++;

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic set(input logic pd, sc, mb, ot, dbg, input logic [4:0] ms, input op_mode_t exp);
    power_down = pd; scan_test_en = sc; mbist_test_en = mb; other_test_en = ot; mbist_debug = dbg; mem_sel = ms;
    #1 chk(mode == exp, $sformatf("mode %0d expected %0d", mode, exp));
    @(negedge clk);
  endtask

  initial begin
    power_down = 0; scan_test_en = 0; mbist_test_en = 1; other_test_en = 0; mbist_debug = 0; mem_sel = 3;
    fuse_prgm = 0; fuse_ready = 0; fuse_seq_busy = 0;
    rst_n = 0; #12; rst_n = 1;
    #1 chk(fuse_read && fuse_busy && !init_done && mode == MODE_MISSION, "sense requested, mode held");
    @(negedge clk); chk(!fuse_read && !rar_load, "waiting for fuses");
    repeat (5) @(negedge clk);
    chk(!rar_load && !init_done, "still waiting");
    fuse_ready = 1; @(negedge clk); fuse_ready = 0;
    chk(rar_load && !init_done, "rar_load");
    @(negedge clk); chk(init_done && !rar_load && !fuse_busy, "init done");
    chk(mode == MODE_MBIST_REPAIR && starts == 0, "repair mode after init");
    @(negedge clk); chk(starts == 1, "one mbist_start on entering repair mode");
    set(0, 0, 0, 0, 0, 5'd3, MODE_MISSION);
    set(0, 1, 0, 0, 0, 5'd3, MODE_SCAN);
    set(0, 0, 1, 0, 1, 5'd3, MODE_MBIST_DEBUG);
    chk(starts == 2, "start on entering debug mode");
    set(0, 0, 1, 0, 1, 5'd4, MODE_MISSION);     // another memory selected
    set(0, 0, 1, 1, 1, 5'd3, MODE_MISSION);     // other test enable also high
    set(0, 1, 1, 0, 1, 5'd3, MODE_MISSION);
    set(0, 0, 0, 1, 0, 5'd3, MODE_MISSION);
    set(1, 0, 1, 0, 0, 5'd3, MODE_POWER_DOWN);
    fuse_prgm = 1; #1 chk(fuse_busy, "fuse_busy on program request"); fuse_prgm = 0;
    fuse_seq_busy = 1; #1 chk(fuse_busy, "fuse_busy while sequence runs"); fuse_seq_busy = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking test of the redundant address registers: clear, load from
// fuse states (pointer set to the number of valid entries), allocation of free
// entries on fail in order, full, a fail with no free entry being dropped.
module tb_rar;
  localparam int AW = 16, NR = 4, EW = AW + 1;
  logic clk = 0, rar_nset, load, fail;
  logic [NR*EW-1:0] rar_val_in, rar_val_out;
  logic [AW-1:0] hold_addr;
  logic [2:0] rar_pointer;
  logic [NR-1:0] free_oh;
  logic fail_store, full;
  int checks = 0, failures = 0;

  rar #(.ADDR_W(AW), .NUM_RAR(NR)) dut (.*);
  always #5 clk = ~clk;
  initial begin #100_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    load = 0; fail = 0; rar_val_in = '0; hold_addr = '0;
    rar_nset = 0; #12; rar_nset = 1;
    chk(rar_val_out == '0 && rar_pointer == 0 && free_oh == 4'b0001 && !full, "cleared");
    // load two valid entries
    rar_val_in = '0;
    rar_val_in[0*EW +: EW] = {1'b1, 16'h1234};
    rar_val_in[1*EW +: EW] = {1'b1, 16'hBEEF};
    @(negedge clk); load = 1; @(negedge clk); load = 0;
    chk(rar_val_out == rar_val_in, "loaded");
    chk(rar_pointer == 2 && free_oh == 4'b0100, "pointer after load");
    // two fails fill entries 2 and 3
    hold_addr = 16'h0042; fail = 1;
    #1 chk(fail_store, "fail_store when free");
    @(negedge clk); hold_addr = 16'hFFFF;
    @(negedge clk); fail = 0;
    chk(rar_val_out[2*EW +: EW] == {1'b1, 16'h0042}, "entry 2");
    chk(rar_val_out[3*EW +: EW] == {1'b1, 16'hFFFF}, "entry 3");
    chk(full && rar_pointer == 4, "full");
    // fail while full is dropped
    hold_addr = 16'h7777; fail = 1; #1 chk(!fail_store, "no store when full");
    @(negedge clk); fail = 0;
    chk(rar_val_out[0*EW +: EW] == {1'b1, 16'h1234} && rar_val_out[1*EW +: EW] == {1'b1, 16'hBEEF}, "old entries kept");
    rar_nset = 0; #1 chk(rar_val_out == '0 && rar_pointer == 0, "async clear"); rar_nset = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

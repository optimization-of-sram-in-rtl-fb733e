// Self-checking test of the power controller against the five rows of the
// mode/power table, with and without a running e-fuse sequence.
module tb_power_ctrl;
  import lpsr_pkg::*;
  op_mode_t mode;
  logic fuse_busy;
  pwr_t pwr;
  int checks = 0, failures = 0;
  power_ctrl dut (.*);
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic row(input op_mode_t m, input logic [4:0] exp_bits);
    for (int b = 0; b < 2; b++) begin
      logic [4:0] e = exp_bits;
      mode = m; fuse_busy = 1'(b); #1;
      if (b != 0) e[1] = 1'b1;   // e-fuse domain
      checks++; if (pwr !== e) begin failures++; $display("mode %0d busy %0d: %b exp %b", m, b, pwr, e); end
    end
  endtask
  initial begin
    //                 mbist sram rar efuse logic
    row(MODE_SCAN,         5'b1_1_1_1_1);
    row(MODE_MBIST_DEBUG,  5'b1_1_1_1_1);
    row(MODE_MBIST_REPAIR, 5'b1_1_1_0_1);
    row(MODE_MISSION,      5'b0_1_1_0_1);
    row(MODE_POWER_DOWN,   5'b0_0_1_0_0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

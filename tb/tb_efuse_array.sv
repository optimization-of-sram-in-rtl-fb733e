// Self-checking test of the e-fuse cell model: cells start intact, program
// pulses count only with fss on, a normal read sees a partly blown cell as 1, a
// margin read only a fully blown one, and the sense latch holds between reads.
module tb_efuse_array;
  localparam int N = 8, PC = 4;
  logic clk = 0, fss, efc_test_margin;
  logic [N-1:0] rsi, psi, fuse_val_o;
  int checks = 0, failures = 0;
  efuse_array #(.N_FUSE(N), .PRGM_CYCLES(PC)) dut (.*);
  always #5 clk = ~clk;
  initial begin #100_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL: %s (%b)", what, fuse_val_o); end
  endtask
  task automatic pulse(input logic [N-1:0] p, input int n);
    psi = p; repeat (n) @(negedge clk); psi = '0;
  endtask
  task automatic sense(input logic m);
    efc_test_margin = m; rsi = '1; @(negedge clk); rsi = '0;
  endtask
  initial begin
    fss = 1; efc_test_margin = 0; rsi = '0; psi = '0;
    @(negedge clk);
    sense(0); chk(fuse_val_o == '0, "fresh cells read 0");
    pulse(8'b0000_0011, PC);        // cells 0,1 fully blown
    pulse(8'b0000_0100, 1);         // cell 2 partly blown
    fss = 0; pulse(8'b0000_1000, PC); fss = 1;   // no supply: cell 3 intact
    sense(0); chk(fuse_val_o == 8'b0000_0111, "normal read");
    sense(1); chk(fuse_val_o == 8'b0000_0011, "margin read");
    @(negedge clk); @(negedge clk); chk(fuse_val_o == 8'b0000_0011, "latched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking test of the address comparison: random RAR contents and
// addresses (half of them picked from the RARs), valid bits honoured, lowest
// matching entry chosen.
module tb_rar_compare;
  localparam int AW = 16, NR = 4, EW = AW + 1;
  logic [AW-1:0] hold_addr;
  logic [NR*EW-1:0] rar_val;
  logic rar_match;
  logic [NR-1:0] match_oh;
  int checks = 0, failures = 0;

  rar_compare #(.ADDR_W(AW), .NUM_RAR(NR)) dut (.*);
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic [NR-1:0] exp_oh;
      for (int k = 0; k < NR; k++) rar_val[k*EW +: EW] = {1'($urandom), 16'($urandom_range(7))};
      hold_addr = ($urandom_range(1) != 0) ? 16'($urandom_range(7)) : 16'($urandom);
      #1;
      exp_oh = '0;
      for (int k = NR - 1; k >= 0; k--)
        if (rar_val[k*EW + AW] && rar_val[k*EW +: AW] == hold_addr) exp_oh = NR'(1) << k;
      checks++;
      if (match_oh !== exp_oh || rar_match !== (exp_oh != 0)) begin
        failures++; $display("addr %h rar %h: oh %b exp %b", hold_addr, rar_val, match_oh, exp_oh);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

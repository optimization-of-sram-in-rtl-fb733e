// Self-checking test of the e-fuse strobe isolation.
module tb_efc_subiso;
  localparam int N = 68;
  logic efc_isolate;
  logic [N-1:0] rs, ps, rsi, psi;
  int checks = 0, failures = 0;
  efc_subiso #(.N_FUSE(N)) dut (.*);
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int n = 0; n < 500; n++) begin
      efc_isolate = 1'($urandom); rs = N'({$urandom, $urandom, $urandom}); ps = N'({$urandom, $urandom, $urandom}); #1;
      checks++;
      if (rsi !== (efc_isolate ? '0 : rs) || psi !== (efc_isolate ? '0 : ps)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking test of the AND isolation gates: pass-through when enabled,
// all lines low when isolated.
module tb_iso_and;
  logic iso_n;
  logic [15:0] a, z;
  int checks = 0, failures = 0;
  iso_and #(.W(16)) dut (.*);
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int n = 0; n < 500; n++) begin
      iso_n = 1'($urandom); a = 16'($urandom); #1;
      checks++; if (z !== (iso_n ? a : 16'h0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

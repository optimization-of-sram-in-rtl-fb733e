// Self-checking test of the data-out multiplexer.
module tb_sr_out_mux;
  logic sel;
  logic [31:0] sram_q, rdr_q, dout;
  int checks = 0, failures = 0;
  sr_out_mux #(.DATA_W(32)) dut (.*);
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int n = 0; n < 500; n++) begin
      sel = 1'($urandom); sram_q = $urandom; rdr_q = $urandom; #1;
      checks++; if (dout !== (sel ? rdr_q : sram_q)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

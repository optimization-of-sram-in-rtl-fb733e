// Self-checking test of the RDR read selection: the matching entry's word and
// number, zero with no match.
module tb_rdr_read;
  localparam int DW = 32, NR = 4;
  logic [NR-1:0] match_oh;
  logic [NR*DW-1:0] rdr;
  logic [DW-1:0] rdr_val_out;
  logic [1:0] f_addr;
  int checks = 0, failures = 0;

  rdr_read #(.DATA_W(DW), .NUM_RAR(NR)) dut (.*);
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      automatic int k = $urandom_range(NR);   // NR means no match
      for (int i = 0; i < NR; i++) rdr[i*DW +: DW] = $urandom;
      match_oh = (k == NR) ? '0 : NR'(1) << k;
      #1;
      checks++;
      if (k == NR) begin
        if (rdr_val_out !== '0 || f_addr !== '0) failures++;
      end else if (rdr_val_out !== rdr[k*DW +: DW] || f_addr !== 2'(k)) begin
        failures++; $display("k=%0d got %h/%0d", k, rdr_val_out, f_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

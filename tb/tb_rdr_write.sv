// Self-checking test of the RDR write selection: fail stores expected_val
// (full word) in the newly allocated entry; otherwise only a held write to a
// matching address writes data_in under the bit mask; reads write nothing.
module tb_rdr_write;
  localparam int DW = 32, NR = 4;
  logic fail_store, hold_csb, hold_rwb;
  logic [NR-1:0] free_oh, match_oh, we;
  logic [DW-1:0] expected_val, hold_data, hold_wib, bit_en, rdr_d;
  int checks = 0, failures = 0;

  rdr_write #(.DATA_W(DW), .NUM_RAR(NR)) dut (.*);
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [NR-1:0] e_we; logic [DW-1:0] e_en, e_d;
      fail_store = 1'($urandom); hold_csb = 1'($urandom); hold_rwb = 1'($urandom);
      free_oh = NR'(1) << $urandom_range(NR-1);
      match_oh = ($urandom_range(1) != 0) ? NR'(1) << $urandom_range(NR-1) : '0;
      expected_val = $urandom; hold_data = $urandom; hold_wib = $urandom;
      #1;
      if (fail_store) begin e_we = free_oh; e_en = '1; e_d = expected_val; end
      else begin
        e_we = (!hold_csb && !hold_rwb) ? match_oh : '0; e_en = ~hold_wib; e_d = hold_data;
      end
      checks++;
      if (we !== e_we || (e_we != 0 && (bit_en !== e_en || rdr_d !== e_d))) begin
        failures++; $display("we %b exp %b", we, e_we);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

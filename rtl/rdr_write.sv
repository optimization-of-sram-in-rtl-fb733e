// RDR write of the redundancy logic (Fig. 2): decides what goes into the RDR.
//  * When a failing read's address is being stored in a free RAR (fail_store),
//    the expected data from the BIST (expected_val) is written, whole word, into
//    the RDR of that RAR (free_oh), so the repaired word holds correct data.
//  * Otherwise a held write request (hold_csb low, hold_rwb low) whose address
//    matches a RAR (match_oh) writes hold_data into that RDR under the active-low
//    bit mask hold_wib.
// Combinational; the RDR takes the result at the next rising edge.
module rdr_write #(
  parameter int unsigned DATA_W  = 32,
  parameter int unsigned NUM_RAR = 4
) (
  input  logic                fail_store,
  input  logic [NUM_RAR-1:0]  free_oh,
  input  logic [DATA_W-1:0]   expected_val,
  input  logic                hold_csb,
  input  logic                hold_rwb,
  input  logic [DATA_W-1:0]   hold_data,
  input  logic [DATA_W-1:0]   hold_wib,
  input  logic [NUM_RAR-1:0]  match_oh,
  output logic [NUM_RAR-1:0]  we,
  output logic [DATA_W-1:0]   bit_en,
  output logic [DATA_W-1:0]   rdr_d
);
  always_comb begin
    if (fail_store) begin
      we     = free_oh;
      bit_en = '1;
      rdr_d  = expected_val;
    end else begin
      we     = (!hold_csb && !hold_rwb) ? match_oh : '0;
      bit_en = ~hold_wib;
      rdr_d  = hold_data;
    end
  end
endmodule

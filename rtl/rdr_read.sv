// RDR read of the redundancy logic (Fig. 2): returns the RDR word of the entry
// that matches the held address (rdr_val_out) and that entry's number (f_addr).
// Combinational; with no match both are zero.
module rdr_read #(
  parameter int unsigned DATA_W  = 32,
  parameter int unsigned NUM_RAR = 4,
  localparam int unsigned IW     = (NUM_RAR > 1) ? $clog2(NUM_RAR) : 1
) (
  input  logic [NUM_RAR-1:0]        match_oh,
  input  logic [NUM_RAR*DATA_W-1:0] rdr,
  output logic [DATA_W-1:0]         rdr_val_out,
  output logic [IW-1:0]             f_addr
);
  always_comb begin
    rdr_val_out = '0;
    f_addr      = '0;
    for (int k = 0; k < NUM_RAR; k++)
      if (match_oh[k]) begin
        rdr_val_out = rdr_val_out | rdr[k*DATA_W +: DATA_W];
        f_addr      = f_addr | IW'(k);
      end
  end
endmodule

// Address comparison of the redundancy logic (Fig. 2): the held request address
// is compared with every valid RAR entry at once. rar_match is high when one
// matches and match_oh marks that entry (the lowest one if several do).
// Combinational.
module rar_compare #(
  parameter int unsigned ADDR_W  = 16,
  parameter int unsigned NUM_RAR = 4,
  localparam int unsigned EW     = ADDR_W + 1
) (
  input  logic [ADDR_W-1:0]     hold_addr,
  input  logic [NUM_RAR*EW-1:0] rar_val,
  output logic                  rar_match,
  output logic [NUM_RAR-1:0]    match_oh
);
  logic [NUM_RAR-1:0] hit;

  always_comb begin
    for (int k = 0; k < NUM_RAR; k++)
      hit[k] = rar_val[k*EW + EW - 1] && (rar_val[k*EW +: ADDR_W] == hold_addr);
    match_oh = hit & (~hit + 1'b1);   // keep the lowest set bit
  end

  assign rar_match = |hit;
endmodule

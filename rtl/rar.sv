// Redundant Address Registers (RAR) of the redundancy logic (Fig. 2).
// NUM_RAR entries of {valid, address}. Two ways to fill them:
//  * load: all entries are copied from rar_val_in (the sensed e-fuse states,
//    entry k at bits [k*(ADDR_W+1) +: ADDR_W+1], valid bit on top), and the
//    pointer is set to the number of valid entries;
//  * fail: the held address of a failing read is written into the entry named
//    by rar_pointer (the next free one) and the pointer advances.
// A fail with no free entry is not stored; full tells the caller (nogo).
// rar_val_out shows all entries in the rar_val_in layout, for analysis and for
// programming the e-fuses. Registers change on the rising clock edge;
// rar_nset clears them asynchronously. Using rar_nset as a separate clear (the
// RARs stay powered in power down) and the entry layout are this design's
// choices.
module rar #(
  parameter int unsigned ADDR_W  = 16,
  parameter int unsigned NUM_RAR = 4,
  localparam int unsigned EW     = ADDR_W + 1,
  localparam int unsigned PW     = $clog2(NUM_RAR + 1)
) (
  input  logic                    clk,
  input  logic                    rar_nset,
  input  logic                    load,
  input  logic [NUM_RAR*EW-1:0]   rar_val_in,
  input  logic                    fail,
  input  logic [ADDR_W-1:0]       hold_addr,
  output logic [NUM_RAR*EW-1:0]   rar_val_out,
  output logic [PW-1:0]           rar_pointer,
  output logic [NUM_RAR-1:0]      free_oh,
  output logic                    fail_store,
  output logic                    full
);
  logic [EW-1:0] entry [NUM_RAR];
  logic [PW-1:0] n_valid;

  assign full       = (rar_pointer == PW'(NUM_RAR));
  assign fail_store = fail && !full && !load;

  always_comb begin
    n_valid = '0;
    for (int k = 0; k < NUM_RAR; k++)
      if (rar_val_in[k*EW + EW - 1]) n_valid = n_valid + 1'b1;
    for (int k = 0; k < NUM_RAR; k++) begin
      free_oh[k] = (rar_pointer == PW'(k));
      rar_val_out[k*EW +: EW] = entry[k];
    end
  end

  always_ff @(posedge clk or negedge rar_nset) begin
    if (!rar_nset) begin
      for (int k = 0; k < NUM_RAR; k++) entry[k] <= '0;
      rar_pointer <= '0;
    end else if (load) begin
      for (int k = 0; k < NUM_RAR; k++) entry[k] <= rar_val_in[k*EW +: EW];
      rar_pointer <= n_valid;
    end else if (fail_store) begin
      for (int k = 0; k < NUM_RAR; k++)
        if (free_oh[k]) entry[k] <= {1'b1, hold_addr};
      rar_pointer <= rar_pointer + 1'b1;
    end
  end

  // the pointer never passes the last entry
  assert property (@(posedge clk) disable iff (!rar_nset) rar_pointer <= PW'(NUM_RAR));
endmodule

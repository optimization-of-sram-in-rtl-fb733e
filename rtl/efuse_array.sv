// Behavioural model of the e-fuse cell array (Fig. 3, cells F0..F[N-1]); the
// real cells are process-specific one-time-programmable elements, not logic.
// Each cell counts the clocks during which its program strobe psi[k] is high
// while the programming supply fss is on (fss is the figure's supply pin,
// modelled as a logic input); the count never goes down. A read strobe rsi[k]
// latches the sensed state into the cell's output fuse_val_o[k] at the rising
// clock edge: a normal read sees any blown cell as 1, a margin read
// (efc_test_margin = 1) only a cell that received the full PRGM_CYCLES pulse.
// Cells start intact (0). The margin behaviour is this model's own reading of
// the pin's name.
module efuse_array #(
  parameter int unsigned N_FUSE      = 68,
  parameter int unsigned PRGM_CYCLES = 4,
  localparam int unsigned CW         = $clog2(PRGM_CYCLES + 1)
) (
  input  logic              clk,
  input  logic              fss,
  input  logic              efc_test_margin,
  input  logic [N_FUSE-1:0] rsi,
  input  logic [N_FUSE-1:0] psi,
  output logic [N_FUSE-1:0] fuse_val_o
);
  logic [CW-1:0] blow [N_FUSE];

  initial begin
    for (int k = 0; k < N_FUSE; k++) blow[k] = '0;
    fuse_val_o = '0;
  end

  always @(posedge clk)
    for (int k = 0; k < N_FUSE; k++) begin
      if (fss && psi[k] && blow[k] != CW'(PRGM_CYCLES)) blow[k] <= blow[k] + 1'b1;
      if (rsi[k])
        fuse_val_o[k] <= efc_test_margin ? (blow[k] == CW'(PRGM_CYCLES)) : (blow[k] != '0);
    end
endmodule

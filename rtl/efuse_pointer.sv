// Pointer register P of the e-fuse box (Fig. 3): a one-hot register with one
// bit per fuse cell. start places the pointer on P0, shift moves it one cell up
// (towards P[N-1]), clr (CL in the figure) empties it. last is high while the
// pointer is on the final cell. All changes at the rising edge of efw_clk;
// efw_resn clears it asynchronously. The direction of travel is this design's
// choice.
module efuse_pointer #(
  parameter int unsigned N_FUSE = 68
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              start,
  input  logic              shift,
  output logic [N_FUSE-1:0] ptr,
  output logic              last
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      ptr <= '0;
    else if (clr)    ptr <= '0;
    else if (start)  ptr <= N_FUSE'(1);
    else if (shift)  ptr <= ptr << 1;

  assign last = ptr[N_FUSE-1];

  // the pointer names at most one cell
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ptr));
endmodule

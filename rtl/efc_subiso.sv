// Isolation stage of the e-fuse box (Fig. 3 "efc_subiso"). The read and program
// strobes rs and ps reach the fuse cells as rsi and psi through AND isolation
// gates; with efc_isolate = 1 all of them are held low, so a switched-off box
// can neither be sensed nor blown. Combinational.
module efc_subiso #(
  parameter int unsigned N_FUSE = 68
) (
  input  logic              efc_isolate,
  input  logic [N_FUSE-1:0] rs,
  input  logic [N_FUSE-1:0] ps,
  output logic [N_FUSE-1:0] rsi,
  output logic [N_FUSE-1:0] psi
);
  iso_and #(.W(N_FUSE)) u_iso_rs (.iso_n(!efc_isolate), .a(rs), .z(rsi));
  iso_and #(.W(N_FUSE)) u_iso_ps (.iso_n(!efc_isolate), .a(ps), .z(psi));
endmodule

// Blow acceleration logic of the e-fuse box (Fig. 3). It looks at the fuse the
// pointer is on and tells the control state machine (pointer_bit) whether that
// fuse must be blown, i.e. whether its bit of fuse_val_i is 1. The state machine
// spends a full programming pulse only on such fuses and steps over the others
// in a single clock, which shortens programming. Combinational.
module blow_accel #(
  parameter int unsigned N_FUSE = 68
) (
  input  logic [N_FUSE-1:0] ptr,
  input  logic [N_FUSE-1:0] fuse_val_i,
  output logic              pointer_bit
);
  assign pointer_bit = |(ptr & fuse_val_i);
endmodule

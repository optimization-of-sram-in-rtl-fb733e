// E-fuse box (Fig. 3): permanent storage for the redundant address registers,
// one fuse cell per RAR bit (cell k holds RAR bit k).
// fuse_read senses every cell and presents the states on fuse_val_o (to the
// RARs); fuse_prgm blows every cell whose bit of fuse_val_i (from the RARs) is
// 1, skipping the others quickly through the blow acceleration logic. Both
// sequences are run by the control state machine with the one-hot pointer
// register; ready_out goes high when one completes. With efc_isolate = 1 the
// strobes and fuse_val_o are forced low through AND isolation gates, so the box
// can be switched off once the RARs are loaded. efw_clk must be the RAR clock
// during sensing. tm (test mode) is a pin of the box whose function is not
// defined here; it is accepted and not used. The sub-blocks and pins follow the
// figure; the sequence timing is this design's choice (see efuse_csm).
module efuse_box #(
  parameter int unsigned N_FUSE      = 68,
  parameter int unsigned PRGM_CYCLES = 4
) (
  input  logic              efw_clk,
  input  logic              efw_resn,
  input  logic              fuse_read,
  input  logic              fuse_prgm,
  input  logic              ready_in,
  output logic              ready_out,
  output logic              busy,
  input  logic [N_FUSE-1:0] fuse_val_i,
  output logic [N_FUSE-1:0] fuse_val_o,
  input  logic              efc_isolate,
  input  logic              efc_test_margin,
  input  logic              fss,
  input  logic              tm
);
  logic [N_FUSE-1:0] ptr, rs, ps, rsi, psi, cell_q;
  logic ptr_start, ptr_shift, ptr_clr, rs_en, ps_en, pointer_bit, last;

  efuse_csm #(.PRGM_CYCLES(PRGM_CYCLES)) u_csm (
    .clk(efw_clk), .rst_n(efw_resn), .fuse_read, .fuse_prgm, .ready_in, .pointer_bit, .last,
    .ptr_start, .ptr_shift, .ptr_clr, .rs_en, .ps_en, .ready_out, .busy
  );

  efuse_pointer #(.N_FUSE(N_FUSE)) u_ptr (
    .clk(efw_clk), .rst_n(efw_resn), .clr(ptr_clr), .start(ptr_start), .shift(ptr_shift),
    .ptr, .last
  );

  blow_accel #(.N_FUSE(N_FUSE)) u_accel (.ptr, .fuse_val_i, .pointer_bit);

  assign rs = ptr & {N_FUSE{rs_en}};
  assign ps = ptr & {N_FUSE{ps_en}};

  efc_subiso #(.N_FUSE(N_FUSE)) u_subiso (.efc_isolate, .rs, .ps, .rsi, .psi);

  efuse_array #(.N_FUSE(N_FUSE), .PRGM_CYCLES(PRGM_CYCLES)) u_cells (
    .clk(efw_clk), .fss, .efc_test_margin, .rsi, .psi, .fuse_val_o(cell_q)
  );

  iso_and #(.W(N_FUSE)) u_iso_out (.iso_n(!efc_isolate), .a(cell_q), .z(fuse_val_o));

  logic unused_tm;
  assign unused_tm = tm;
endmodule

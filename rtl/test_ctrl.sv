// Test control unit for the LPSR SRAM. It does two things.
// Mode decode: power_down gives power down mode; scan_test_en alone gives scan
// test mode; mbist_test_en alone, with mem_sel naming this memory (MEM_ID),
// gives mbist debug mode when mbist_debug is high and mbist repair mode when it
// is low; anything else (no enable, or the SoC's other test modes such as its
// USB2 or AW tests through other_test_en) leaves this memory in mission mode.
// Power-on sequence: after reset the unit asks the e-fuse box to sense its
// fuses (fuse_read), waits for ready_out, copies the sensed states into the RARs
// (rar_load, one cycle) and then reports init_done. Until then the mode is
// held at mission and fuse_busy keeps the e-fuse box powered; the memory may be
// used only once init_done is high. A fuse programming request (fuse_prgm) also
// keeps the box powered until its sequence ends.
// mbist_start pulses for one cycle on entering an mbist mode after init_done.
// The mode decode follows the document's rule for mbist_test_en; the rest of
// the decode, the MEM_ID code and the sequence are this design's choices.
module test_ctrl
  import lpsr_pkg::*;
#(
  parameter logic [4:0] MEM_ID = 5'd0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       scan_test_en,
  input  logic       mbist_test_en,
  input  logic       other_test_en,
  input  logic       mbist_debug,
  input  logic [4:0] mem_sel,
  input  logic       power_down,
  input  logic       fuse_prgm,
  input  logic       fuse_ready,
  input  logic       fuse_seq_busy,
  output op_mode_t   mode,
  output logic       fuse_read,
  output logic       fuse_busy,
  output logic       rar_load,
  output logic       init_done,
  output logic       mbist_start
);
  typedef enum logic [1:0] {I_SENSE, I_WAIT, I_LOAD, I_RUN} init_t;
  init_t    ist;
  op_mode_t req_mode, mode_q;

  always_comb begin
    if (power_down)
      req_mode = MODE_POWER_DOWN;
    else if (scan_test_en && !mbist_test_en && !other_test_en)
      req_mode = MODE_SCAN;
    else if (mbist_test_en && !scan_test_en && !other_test_en && mem_sel == MEM_ID)
      req_mode = mbist_debug ? MODE_MBIST_DEBUG : MODE_MBIST_REPAIR;
    else
      req_mode = MODE_MISSION;
  end

  assign mode      = (ist == I_RUN) ? req_mode : MODE_MISSION;
  assign init_done = (ist == I_RUN);
  assign fuse_read = (ist == I_SENSE);
  assign rar_load  = (ist == I_LOAD);
  assign fuse_busy = (ist != I_RUN) || fuse_prgm || fuse_seq_busy;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ist    <= I_SENSE;
      mode_q <= MODE_MISSION;
    end else begin
      mode_q <= mode;
      unique case (ist)
        I_SENSE: ist <= I_WAIT;
        I_WAIT:  if (fuse_ready) ist <= I_LOAD;
        I_LOAD:  ist <= I_RUN;
        default: ist <= I_RUN;
      endcase
    end

  assign mbist_start = (mode == MODE_MBIST_DEBUG || mode == MODE_MBIST_REPAIR) && (mode_q != mode);
endmodule

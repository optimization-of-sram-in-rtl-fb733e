// Control State Machine (CSM) of the e-fuse box (Fig. 3). It runs the two
// sequences of the box with the pointer register:
//  * sense (fuse_read): the pointer visits every cell, one per clock, and the
//    read strobe of the cell under it (rs_en) latches the cell's state;
//  * program (fuse_prgm): at each cell the blow acceleration logic says
//    (pointer_bit) whether the cell is to be blown; if so the program strobe
//    (ps_en) is held for PRGM_CYCLES clocks, otherwise the pointer moves on
//    at once.
// A sequence starts only while ready_in is high, so boxes can be chained.
// ready_out goes high when a sequence completes and stays high until the next
// command; busy is high while a sequence runs. Sense takes N_FUSE clocks,
// program takes N_FUSE + (PRGM_CYCLES-1) * (number of fuses blown) clocks,
// each plus one start clock. The state encoding, one cell per clock and the use
// of ready_in as a chain input are this design's choices.
module efuse_csm #(
  parameter int unsigned PRGM_CYCLES = 4,
  localparam int unsigned CW         = (PRGM_CYCLES > 1) ? $clog2(PRGM_CYCLES) : 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic fuse_read,
  input  logic fuse_prgm,
  input  logic ready_in,
  input  logic pointer_bit,
  input  logic last,
  output logic ptr_start,
  output logic ptr_shift,
  output logic ptr_clr,
  output logic rs_en,
  output logic ps_en,
  output logic ready_out,
  output logic busy
);
  typedef enum logic [1:0] {S_IDLE, S_SENSE, S_PROG, S_DONE} state_t;
  state_t        state, state_n;
  logic [CW-1:0] cnt, cnt_n;

  always_comb begin
    state_n   = state;
    cnt_n     = cnt;
    ptr_start = 1'b0;
    ptr_shift = 1'b0;
    ptr_clr   = 1'b0;
    rs_en     = 1'b0;
    ps_en     = 1'b0;
    unique case (state)
      S_IDLE, S_DONE: begin
        if (ready_in && fuse_read) begin
          ptr_start = 1'b1;
          state_n   = S_SENSE;
        end else if (ready_in && fuse_prgm) begin
          ptr_start = 1'b1;
          cnt_n     = '0;
          state_n   = S_PROG;
        end
      end
      S_SENSE: begin
        rs_en = 1'b1;
        if (last) begin
          ptr_clr = 1'b1;
          state_n = S_DONE;
        end else begin
          ptr_shift = 1'b1;
        end
      end
      S_PROG: begin
        if (pointer_bit && cnt != CW'(PRGM_CYCLES - 1)) begin
          ps_en = 1'b1;
          cnt_n = cnt + 1'b1;
        end else begin
          ps_en = pointer_bit;
          cnt_n = '0;
          if (last) begin
            ptr_clr = 1'b1;
            state_n = S_DONE;
          end else begin
            ptr_shift = 1'b1;
          end
        end
      end
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else begin
      state <= state_n;
      cnt   <= cnt_n;
    end

  assign ready_out = (state == S_DONE);
  assign busy      = (state == S_SENSE) || (state == S_PROG);

  // a sequence either senses or programs, never both, and is not ready while busy
  assert property (@(posedge clk) disable iff (!rst_n) !(rs_en && ps_en));
  assert property (@(posedge clk) disable iff (!rst_n) !(ready_out && busy));
endmodule

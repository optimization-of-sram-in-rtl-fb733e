// Memory BIST controller for the 64Kx32 SR SRAM. After a start pulse it runs a
// March C- test over all 2**ADDR_W words, one memory operation per clock:
//   up(w0); up(r0,w1); up(r1,w0); down(r0,w1); down(r1,w0); up(r0)
// with all-zero and all-one words - 10 operations per word. A read is issued in
// one cycle and its data (dout) checked in the next; on a miscompare fail is
// high for that cycle and expected_val carries the correct word. In repair
// mode (debug = 0) repair_fail mirrors fail, and the redundancy logic stores the
// address of the read being returned plus expected_val, so later reads of that
// word come from a redundant register and pass. In debug mode faults are only
// reported (fail, fail_count) and fail_addr gives the address of the word
// that failed, for analysis. done rises one cycle after the last compare and
// stays high until the next start. The document leaves the algorithm open;
// March C- and the solid data backgrounds are this design's choice.
module mbist_ctrl
  import lpsr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              debug,
  output mem_req_t          req,
  input  logic [DATA_W-1:0] dout,
  output logic              fail,
  output logic              repair_fail,
  output logic [DATA_W-1:0] expected_val,
  output logic [ADDR_W-1:0] fail_addr,
  output logic              running,
  output logic              done,
  output logic [15:0]       fail_count
);
  logic [2:0]        elem;      // march element 0..5
  logic              op;        // operation inside the element
  logic [ADDR_W-1:0] addr;
  logic              rd_pend;   // a read was issued last cycle
  logic [DATA_W-1:0] exp_q;
  logic [ADDR_W-1:0] rd_addr;   // address of the read being compared

  // Operation of the current step: is it a read, and the data value (0/1).
  logic is_read, val, last_op, last_addr, down;
  always_comb begin
    down = (elem == 3'd3) || (elem == 3'd4);
    unique case (elem)
      3'd0:    begin is_read = 1'b0; val = 1'b0;              last_op = 1'b1; end
      3'd1:    begin is_read = !op;  val = op;                last_op = op;   end
      3'd2:    begin is_read = !op;  val = !op;               last_op = op;   end
      3'd3:    begin is_read = !op;  val = op;                last_op = op;   end
      3'd4:    begin is_read = !op;  val = !op;               last_op = op;   end
      default: begin is_read = 1'b1; val = 1'b0;              last_op = 1'b1; end
    endcase
    last_addr = down ? (addr == '0) : (addr == '1);
  end

  always_comb begin
    req = MEM_IDLE;
    if (running) begin
      req.csb  = 1'b0;
      req.rwb  = is_read;
      req.addr = addr;
      req.data = {DATA_W{val}};
      req.wib  = '0;
    end
  end

  assign fail         = rd_pend && (dout != exp_q);
  assign repair_fail  = fail && !debug;
  assign expected_val = exp_q;
  assign fail_addr    = rd_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running    <= 1'b0;
      done       <= 1'b0;
      elem       <= '0;
      op         <= 1'b0;
      addr       <= '0;
      rd_pend    <= 1'b0;
      exp_q      <= '0;
      rd_addr    <= '0;
      fail_count <= '0;
    end else begin
      rd_addr <= addr;
      rd_pend <= running && is_read;
      exp_q   <= {DATA_W{val}};
      if (fail && fail_count != '1) fail_count <= fail_count + 1'b1;
      if (start && !running) begin
        running    <= 1'b1;
        done       <= 1'b0;
        elem       <= '0;
        op         <= 1'b0;
        addr       <= '0;
        fail_count <= '0;
      end else if (running) begin
        if (!last_op) begin
          op <= 1'b1;
        end else begin
          op <= 1'b0;
          if (!last_addr) begin
            addr <= down ? addr - 1'b1 : addr + 1'b1;
          end else if (elem == 3'd5) begin
            running <= 1'b0;
          end else begin
            elem <= elem + 1'b1;
            addr <= (elem == 3'd2 || elem == 3'd3) ? '1 : '0;   // elements 3 and 4 run downwards
          end
        end
      end else if (rd_pend && elem == 3'd5) begin
        done <= 1'b1;               // last read has just been compared
      end
    end
  end

  // a run ends before done is raised; done is never high while running
  assert property (@(posedge clk) disable iff (!rst_n) !(running && done));
  // the march never leaves its six elements
  assert property (@(posedge clk) disable iff (!rst_n) elem <= 3'd5);
endmodule

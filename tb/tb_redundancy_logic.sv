// Self-checking test of the redundancy logic: RAR load from fuse states, a
// repaired address read from and written to the RDR (with bit mask) and not
// from outside, fail storing a new address plus expected data, nogo when a fail
// finds no free RAR, and the one-cycle timing of hold registers and rar_match.
module tb_redundancy_logic;
  import lpsr_pkg::*;
  localparam int NR = 4, EW = ADDR_W + 1;
  logic clk = 0, res_n, rar_nset, fail, rar_load;
  mem_req_t req;
  logic [31:0] expected_val, rdr_val_out;
  logic [NR*EW-1:0] rar_val_in, rar_val_out;
  logic [2:0] rar_pointer;
  logic rar_match, nogo;
  logic [1:0] f_addr;
  int checks = 0, failures = 0;

  redundancy_logic #(.NUM_RAR(NR)) dut (.*);
  always #5 clk = ~clk;
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask
  // Present a request for one clock; afterwards the hold registers carry it.
  task automatic op(input logic r, input logic [15:0] a, input logic [31:0] d, m);
    req = '{csb: 1'b0, rwb: r, addr: a, data: d, wib: m};
    @(negedge clk);
    req = MEM_IDLE;
  endtask

  // Random phase: reads, masked writes and fails on a small address set,
  // checked every cycle against a reference model of RAR, RDR and nogo.
  task automatic random_phase();
    logic [15:0] m_addr [NR];
    logic [31:0] m_data [NR];
    int m_ptr = 0; logic m_nogo = 0;
    mem_req_t h;
    res_n = 0; rar_nset = 0; @(negedge clk); res_n = 1; rar_nset = 1;
    h = MEM_IDLE; req = MEM_IDLE; fail = 0;
    @(negedge clk);
    for (int n = 0; n < 4000; n++) begin
      int idx; logic hit;
      // what the model expects for the held request
      hit = 0; idx = 0;
      for (int k = m_ptr - 1; k >= 0; k--) if (m_addr[k] == h.addr) begin hit = 1; idx = k; end
      // the BIST fails only reads of words not yet repaired
      fail = !h.csb && h.rwb && !hit && ($urandom_range(7) == 0);
      expected_val = $urandom;
      #1;
      checks++;
      if (rar_match !== hit || (hit && (rdr_val_out !== m_data[idx] || f_addr !== 2'(idx))) || nogo !== m_nogo) begin
        failures++; $display("cycle %0d addr %h: match %0d exp %0d data %h exp %h", n, h.addr, rar_match, hit, rdr_val_out, m_data[idx]);
      end
      // next request
      req.csb = ($urandom_range(3) == 0); req.rwb = 1'($urandom); req.addr = 16'($urandom_range(7)) << 10;
      req.data = $urandom; req.wib = $urandom;
      @(negedge clk);
      // model update for the edge just passed
      if (fail) begin
        if (m_ptr < NR) begin m_addr[m_ptr] = h.addr; m_data[m_ptr] = expected_val; m_ptr++; end
        else m_nogo = 1;
      end else if (hit && !h.csb && !h.rwb)
        m_data[idx] = (m_data[idx] & h.wib) | (h.data & ~h.wib);
      h = req_q;
    end
    fail = 0;
    chk(m_ptr == NR && m_nogo, "random phase filled the RARs and overflowed");
  endtask

  // request as the hold registers took it at the last edge
  mem_req_t req_q;
  always @(posedge clk) req_q <= req;

  initial begin
    req = MEM_IDLE; fail = 0; rar_load = 0; expected_val = '0; rar_val_in = '0;
    res_n = 0; rar_nset = 0; #12; res_n = 1; rar_nset = 1;
    @(negedge clk);
    rar_val_in[0*EW +: EW] = {1'b1, 16'h0100};
    rar_load = 1; @(negedge clk); rar_load = 0;
    chk(rar_pointer == 1, "one RAR loaded");
    // write repaired word, then read it back through the RDR
    op(0, 16'h0100, 32'hCAFE_F00D, '0);
    op(1, 16'h0100, '0, '1);
    chk(rar_match && f_addr == 0 && rdr_val_out == 32'hCAFE_F00D, "read of repaired word");
    // masked write of the low half only
    op(0, 16'h0100, 32'h1111_2222, 32'hFFFF_0000);
    op(1, 16'h0100, '0, '1);
    chk(rdr_val_out == 32'hCAFE_2222, "masked write");
    // an unrepaired address does not match
    op(1, 16'h0101, '0, '1);
    chk(!rar_match, "no match on other address");
    // fail on a read of 0x2000: address stored, expected_val in its RDR
    op(1, 16'h2000, '0, '1);
    chk(!rar_match, "0x2000 not yet repaired");
    fail = 1; expected_val = 32'h5A5A_0F0F; @(negedge clk); fail = 0;
    chk(rar_val_out[1*EW +: EW] == {1'b1, 16'h2000} && rar_pointer == 2, "fail stored address");
    op(1, 16'h2000, '0, '1);
    chk(rar_match && f_addr == 1 && rdr_val_out == 32'h5A5A_0F0F, "expected_val in RDR");
    // fill up and overflow
    op(1, 16'h3000, '0, '1); fail = 1; @(negedge clk); fail = 0;
    op(1, 16'h4000, '0, '1); fail = 1; @(negedge clk); fail = 0;
    chk(rar_pointer == 4 && !nogo, "all RARs used, still go");
    op(1, 16'h5000, '0, '1); fail = 1; @(negedge clk); fail = 0;
    chk(nogo, "nogo on fail with no free RAR");
    op(1, 16'h5000, '0, '1);
    chk(!rar_match, "overflow address not stored");
    random_phase();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

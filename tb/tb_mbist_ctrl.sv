// Self-checking test of the March C- BIST controller over the full 64K-word
// space, against a memory model in the testbench with one stuck-at-0 bit and
// one stuck-at-1 bit. Checks: fail pulses exactly at the reads March C- must
// catch (2 for stuck-at-0, 3 for stuck-at-1), the failing address and expected
// word, repair_fail only in repair mode, the 10 operations per word (done
// at the 10*65536+1st clock edge after start) and a clean run on a fault-free memory.
module tb_mbist_ctrl;
  import lpsr_pkg::*;
  localparam int W = 1 << ADDR_W;
  localparam logic [15:0] SA0_ADDR = 16'h1234, SA1_ADDR = 16'hF00F;
  logic clk = 0, rst_n, start, debug;
  mem_req_t req;
  logic [31:0] dout, expected_val;
  logic [15:0] fail_addr;
  logic fail, repair_fail, running, done;
  logic [15:0] fail_count;
  logic [31:0] mem [W];
  logic [15:0] last_addr;
  logic faults_on;
  int checks = 0, failures = 0;
  int fails_sa0, fails_sa1, fails_other, repair_fails;

  mbist_ctrl dut (.*);
  always #5 clk = ~clk;
  initial begin #30_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // memory model with stuck-at faults, one cycle read latency
  always_ff @(posedge clk) begin
    if (!req.csb) begin
      last_addr <= req.addr;
      if (req.rwb) dout <= mem[req.addr];
      else begin
        logic [31:0] w;
        w = req.data;
        if (faults_on && req.addr == SA0_ADDR) w[3] = 1'b0;
        if (faults_on && req.addr == SA1_ADDR) w[17] = 1'b1;
        mem[req.addr] <= w;
      end
    end
  end

  always @(negedge clk) if (running || done) begin
    if (fail) begin
      if (last_addr == SA0_ADDR) fails_sa0++;
      else if (last_addr == SA1_ADDR) fails_sa1++;
      else fails_other++;
      // the expected word is solid 0s or 1s and differs from dout in the faulty bit only
      checks++; if (expected_val != '0 && expected_val != '1) failures++;
      checks++; if ($countones(expected_val ^ dout) != 1) failures++;
      checks++; if (fail_addr !== last_addr) begin failures++; $display("fail_addr %h, read %h", fail_addr, last_addr); end
    end
    if (repair_fail) repair_fails++;
  end

  task automatic run_test(input logic dbg, output int cyc);
    debug = dbg; fails_sa0 = 0; fails_sa1 = 0; fails_other = 0; repair_fails = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0; cyc = 1;
    while (!done && cyc < 2 * 10 * W) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    int cyc;
    start = 0; debug = 1; faults_on = 1;
    rst_n = 0; #12; rst_n = 1;
    run_test(1, cyc);
    // start is taken at edge 0; 10*W operations, one compare cycle, done set at
    // edge 10*W+1 and seen at the following falling edge (cyc counts from 1)
    checks++; if (cyc != 10 * W + 2) begin failures++; $display("run took %0d clocks, expected %0d", cyc, 10 * W + 2); end
    checks++; if (fails_sa0 != 2 || fails_sa1 != 3 || fails_other != 0) begin
      failures++; $display("fails sa0=%0d sa1=%0d other=%0d", fails_sa0, fails_sa1, fails_other); end
    checks++; if (fail_count != 5) failures++;
    checks++; if (repair_fails != 0) failures++;
    run_test(0, cyc);
    checks++; if (repair_fails != 5) begin failures++; $display("repair_fails=%0d", repair_fails); end
    faults_on = 0;
    run_test(1, cyc);
    checks++; if (fail_count != 0 || fails_other != 0) failures++;
    checks++; if (req.csb !== 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

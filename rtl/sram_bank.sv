// One 8Kx32 bank of the SRAM array: a single-port synchronous memory.
// A request is taken at the rising clock edge when csb is low: with rwb high the
// word is read and appears on q after that edge (one cycle of latency); with rwb
// low every bit whose wib bit is low is written from d. While pd (power down) is
// high the bank ignores requests. The bank is a plain array so synthesis can map
// it to a memory macro; the polarity of csb/rwb/wib and the one-cycle read
// latency are this design's choices.
module sram_bank #(
  parameter int unsigned WORDS  = 8192,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              pd,
  input  logic              csb,
  input  logic              rwb,
  input  logic [AW-1:0]     addr,
  input  logic [DATA_W-1:0] d,
  input  logic [DATA_W-1:0] wib,
  output logic [DATA_W-1:0] q
);
  logic [DATA_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (!pd && !csb) begin
      if (rwb) begin
        q <= mem[addr];
      end else begin
        for (int b = 0; b < DATA_W; b++)
          if (!wib[b]) mem[addr][b] <= d[b];
      end
    end
  end
endmodule

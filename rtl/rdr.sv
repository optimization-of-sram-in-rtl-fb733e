// Redundant Data Registers (RDR) of the redundancy logic (Fig. 2): one DATA_W
// word per RAR entry. Entry k takes the bits of rdr_d selected by bit_en at the
// rising clock edge when we[k] is high. All words are visible on words. The words
// have no reset: one is always written (with the expected data of the failing
// read) when its address is stored, before it can be read.
module rdr #(
  parameter int unsigned DATA_W  = 32,
  parameter int unsigned NUM_RAR = 4
) (
  input  logic                        clk,
  input  logic [NUM_RAR-1:0]          we,
  input  logic [DATA_W-1:0]           bit_en,
  input  logic [DATA_W-1:0]           rdr_d,
  output logic [NUM_RAR*DATA_W-1:0]   words
);
  logic [DATA_W-1:0] word [NUM_RAR];

  always_ff @(posedge clk)
    for (int k = 0; k < NUM_RAR; k++)
      if (we[k])
        for (int b = 0; b < DATA_W; b++)
          if (bit_en[b]) word[k][b] <= rdr_d[b];

  always_comb
    for (int k = 0; k < NUM_RAR; k++) words[k*DATA_W +: DATA_W] = word[k];
endmodule

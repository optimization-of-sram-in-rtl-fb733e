// The 64Kx32 SRAM of the SR SRAM (Fig. 1 "SRAM"), built from NUM_BANKS banks of
// 8Kx32. The top address bits pick the bank; only that bank sees csb low. The
// bank index of a read is registered so that q, one cycle after the read, comes
// from the bank that was read. Same request/response timing as sram_bank.
// Splitting the array into eight 8K banks is this design's reading of the
// "8 blocks" the memory is made of.
module sram_64kx32
  import lpsr_pkg::ADDR_W, lpsr_pkg::DATA_W, lpsr_pkg::mem_req_t;
#(
  parameter int unsigned NUM_BANKS = 8
) (
  input  logic              clk,
  input  logic              pd,
  input  mem_req_t          req,
  output logic [DATA_W-1:0] q
);
  localparam int unsigned BANK_W = $clog2(NUM_BANKS);
  localparam int unsigned WORDS  = (1 << ADDR_W) / NUM_BANKS;
  localparam int unsigned WA     = ADDR_W - BANK_W;

  logic [BANK_W-1:0] bank_sel, bank_q;
  logic [DATA_W-1:0] bq [NUM_BANKS];

  assign bank_sel = req.addr[ADDR_W-1 -: BANK_W];

  for (genvar g = 0; g < NUM_BANKS; g++) begin : g_bank
    sram_bank #(.WORDS(WORDS), .DATA_W(DATA_W)) u_bank (
      .clk  (clk),
      .pd   (pd),
      .csb  (req.csb || (bank_sel != BANK_W'(g))),
      .rwb  (req.rwb),
      .addr (req.addr[WA-1:0]),
      .d    (req.data),
      .wib  (req.wib),
      .q    (bq[g])
    );
  end

  always_ff @(posedge clk)
    if (!pd && !req.csb && req.rwb) bank_q <= bank_sel;

  assign q = bq[bank_q];
endmodule

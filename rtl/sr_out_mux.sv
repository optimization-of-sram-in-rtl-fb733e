// Data-out multiplexer of the SR SRAM (Fig. 1 "MUX"): when the address of the
// read being returned matches a redundant address register (sel = rar_match),
// the word comes from the redundant data register, otherwise from the SRAM.
// Combinational; both inputs are valid one cycle after the read request.
module sr_out_mux #(
  parameter int unsigned DATA_W = 32
) (
  input  logic              sel,
  input  logic [DATA_W-1:0] sram_q,
  input  logic [DATA_W-1:0] rdr_q,
  output logic [DATA_W-1:0] dout
);
  assign dout = sel ? rdr_q : sram_q;
endmodule

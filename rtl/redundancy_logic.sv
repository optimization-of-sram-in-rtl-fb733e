// Redundancy logic of the SR SRAM (Fig. 2). It sits beside the SRAM and sees the
// same requests. Every request (address, csb, rwb, data_in, wib) is registered at
// the rising edge into the hold registers, the same edge at which the SRAM takes
// it, so during the following cycle hold_addr is the address whose read data is
// being returned. In that cycle:
//  * Address comparison checks hold_addr against the RARs; rar_match selects the
//    RDR word (rdr_val_out) instead of the SRAM word at the data-out mux.
//  * RDR write: a held write to a matching address also goes into the RDR.
//  * fail (from the BIST in repair mode) stores hold_addr in the next free RAR
//    and expected_val in its RDR at the next edge. If no RAR is free, nogo is
//    set (registered, and held until res_n) - the memory cannot be repaired.
// rar_load copies the sensed e-fuse states (rar_val_in) into the RARs;
// rar_val_out shows the RARs. f_addr is the number of the matching entry.
// The register-then-compare structure and the five sub-blocks follow the
// document; the fail timing, the sticky nogo and f_addr's meaning are this
// design's choices.
module redundancy_logic
  import lpsr_pkg::ADDR_W, lpsr_pkg::DATA_W, lpsr_pkg::mem_req_t, lpsr_pkg::MEM_IDLE;
#(
  parameter int unsigned NUM_RAR = 4,
  localparam int unsigned EW     = ADDR_W + 1,
  localparam int unsigned IW     = (NUM_RAR > 1) ? $clog2(NUM_RAR) : 1,
  localparam int unsigned PW     = $clog2(NUM_RAR + 1)
) (
  input  logic                    clk,
  input  logic                    res_n,
  input  logic                    rar_nset,
  input  mem_req_t                req,
  input  logic                    fail,
  input  logic [DATA_W-1:0]       expected_val,
  input  logic                    rar_load,
  input  logic [NUM_RAR*EW-1:0]   rar_val_in,
  output logic [NUM_RAR*EW-1:0]   rar_val_out,
  output logic [PW-1:0]           rar_pointer,
  output logic                    rar_match,
  output logic [DATA_W-1:0]       rdr_val_out,
  output logic [IW-1:0]           f_addr,
  output logic                    nogo
);
  mem_req_t hold;
  logic [NUM_RAR-1:0]        match_oh, free_oh, rdr_we;
  logic [DATA_W-1:0]         rdr_bit_en, rdr_d;
  logic [NUM_RAR*DATA_W-1:0] rdr_words;
  logic                      fail_store, full;

  always_ff @(posedge clk or negedge res_n)
    if (!res_n) hold <= MEM_IDLE;
    else        hold <= req;

  rar #(.ADDR_W(ADDR_W), .NUM_RAR(NUM_RAR)) u_rar (
    .clk, .rar_nset, .load(rar_load), .rar_val_in, .fail, .hold_addr(hold.addr),
    .rar_val_out, .rar_pointer, .free_oh, .fail_store, .full
  );

  rar_compare #(.ADDR_W(ADDR_W), .NUM_RAR(NUM_RAR)) u_cmp (
    .hold_addr(hold.addr), .rar_val(rar_val_out), .rar_match, .match_oh
  );

  rdr_write #(.DATA_W(DATA_W), .NUM_RAR(NUM_RAR)) u_rdr_write (
    .fail_store, .free_oh, .expected_val,
    .hold_csb(hold.csb), .hold_rwb(hold.rwb), .hold_data(hold.data), .hold_wib(hold.wib),
    .match_oh, .we(rdr_we), .bit_en(rdr_bit_en), .rdr_d
  );

  rdr #(.DATA_W(DATA_W), .NUM_RAR(NUM_RAR)) u_rdr (
    .clk, .we(rdr_we), .bit_en(rdr_bit_en), .rdr_d, .words(rdr_words)
  );

  rdr_read #(.DATA_W(DATA_W), .NUM_RAR(NUM_RAR)) u_rdr_read (
    .match_oh, .rdr(rdr_words), .rdr_val_out, .f_addr
  );

  always_ff @(posedge clk or negedge res_n)
    if (!res_n)                 nogo <= 1'b0;
    else if (fail && full)      nogo <= 1'b1;

  // not repairable stays not repairable until reset; a repaired address is
  // never stored a second time
  assert property (@(posedge clk) disable iff (!res_n) nogo |=> nogo);
  assert property (@(posedge clk) disable iff (!res_n || !rar_nset) (fail && !rar_load) |-> !rar_match);
endmodule

// Low-power self-repair SRAM, 64K words of 32 bits (LPSR SRAM64Kx32).
// A 64Kx32 SRAM (8 banks of 8Kx32) is paired with redundancy logic: a few
// redundant address registers (RAR) hold addresses of faulty words and matching
// redundant data registers (RDR) stand in for them, so a memory with up to
// NUM_RAR bad words still works. Faulty words are found by the built-in march
// test (mbist_ctrl) in mbist repair mode, which stores them in free RARs on the
// fly; mbist_nogo reports a memory with more faults than RARs. The RAR contents
// (rar_val_out) can be burnt into the e-fuse box (fuse_prgm); every reset
// senses the fuses and loads the RARs again before the memory is used
// (init_done). For low power, each operation mode powers only the domains it
// needs (power_ctrl) and the outputs of switched-off domains pass through AND
// isolation gates that hold them low.
// Interface: one clock clk (also the e-fuse and BIST clock), res_n resets the
// logic, rar_nset clears the RARs, mbist_nrst resets the BIST. Mission accesses
// use csb (active low), rwb (1 read), address, data_in and the active-low bit
// mask wib; data_out carries the word one clock after a read. Mode pins:
// power_down, scan_test_en, mbist_test_en, other_test_en, mbist_debug, mem_sel.
// mbist_fail_addr names the failing word while mbist_fail is high (debug mode
// reports faults this way without repairing them).
// The block structure and the power table follow the document; timing, pin
// polarities, the test algorithm and the control sequence are this design's own.
module lpsr_sram64kx32
  import lpsr_pkg::*;
(
  input  logic                clk,
  input  logic                res_n,
  input  logic                rar_nset,
  input  logic                mbist_nrst,
  // mode pins
  input  logic                power_down,
  input  logic                scan_test_en,
  input  logic                mbist_test_en,
  input  logic                other_test_en,
  input  logic                mbist_debug,
  input  logic [4:0]          mem_sel,
  // mission access
  input  logic                csb,
  input  logic                rwb,
  input  logic [ADDR_W-1:0]   address,
  input  logic [DATA_W-1:0]   data_in,
  input  logic [DATA_W-1:0]   wib,
  output logic [DATA_W-1:0]   data_out,
  output logic                rar_match,
  // test status
  output logic                init_done,
  output op_mode_t            mode,
  output pwr_t                pwr,
  output logic                mbist_fail,
  output logic                mbist_nogo,
  output logic                mbist_done,
  output logic [15:0]         mbist_fail_count,
  output logic [ADDR_W-1:0]   mbist_fail_addr,
  // e-fuse programming and RAR analysis
  input  logic                fuse_prgm,
  input  logic                fss,
  input  logic                efc_test_margin,
  input  logic                tm,
  output logic                fuse_ready,
  output logic [N_FUSE-1:0]   rar_val_out
);
  logic              fuse_read, fuse_busy, fuse_seq_busy, rar_load, mbist_start;
  logic              bist_rst_n, bist_fail, bist_repair_fail, bist_running;
  logic [DATA_W-1:0] bist_exp, sram_q, sram_q_iso, mux_q;
  logic [ADDR_W-1:0] bist_fail_addr;
  logic [N_FUSE-1:0] fuse_val_o;
  logic [DATA_W-1:0] rdr_val_out;
  logic [$clog2(NUM_RAR)-1:0]   f_addr;
  logic [$clog2(NUM_RAR+1)-1:0] rar_pointer;
  logic              nogo;
  mem_req_t          pin_req, bist_req, bist_req_iso, mem_req;
  logic              bist_mode;
  logic [2*DATA_W+1:0] bist_side, bist_side_iso;

  test_ctrl u_test_ctrl (
    .clk, .rst_n(res_n), .scan_test_en, .mbist_test_en, .other_test_en, .mbist_debug,
    .mem_sel, .power_down, .fuse_prgm, .fuse_ready, .fuse_seq_busy,
    .mode, .fuse_read, .fuse_busy, .rar_load, .init_done, .mbist_start
  );

  power_ctrl u_power_ctrl (.mode, .fuse_busy, .pwr);

  // BIST: held in reset while its domain is off.
  assign bist_rst_n = mbist_nrst && pwr.mbist;

  mbist_ctrl u_mbist (
    .clk, .rst_n(bist_rst_n), .start(mbist_start), .debug(mbist_debug),
    .req(bist_req), .dout(mux_q), .fail(bist_fail), .repair_fail(bist_repair_fail),
    .expected_val(bist_exp), .fail_addr(bist_fail_addr), .running(bist_running), .done(mbist_done),
    .fail_count(mbist_fail_count)
  );

  // Isolation of everything the BIST domain drives into powered logic.
  iso_and #(.W($bits(mem_req_t))) u_iso_bist_req (
    .iso_n(pwr.mbist), .a(bist_req), .z(bist_req_iso)
  );
  assign bist_side = {bist_fail, bist_repair_fail, bist_exp, bist_exp};
  iso_and #(.W(2*DATA_W+2)) u_iso_bist_side (.iso_n(pwr.mbist), .a(bist_side), .z(bist_side_iso));

  iso_and #(.W(ADDR_W)) u_iso_bist_addr (.iso_n(pwr.mbist), .a(bist_fail_addr), .z(mbist_fail_addr));

  // Request source: the BIST in mbist modes, the pins otherwise; none in power down.
  assign bist_mode = (mode == MODE_MBIST_DEBUG) || (mode == MODE_MBIST_REPAIR);
  assign pin_req   = '{csb: csb, rwb: rwb, addr: address, data: data_in, wib: wib};
  always_comb begin
    if (!pwr.sram)     mem_req = MEM_IDLE;
    else if (bist_mode) begin
      mem_req     = bist_req_iso;
      mem_req.csb = bist_req_iso.csb || !bist_running;
    end else           mem_req = pin_req;
  end

  sram_64kx32 #(.NUM_BANKS(NUM_BANKS)) u_sram (
    .clk, .pd(!pwr.sram), .req(mem_req), .q(sram_q)
  );

  iso_and #(.W(DATA_W)) u_iso_sram (.iso_n(pwr.sram), .a(sram_q), .z(sram_q_iso));

  redundancy_logic #(.NUM_RAR(NUM_RAR)) u_red (
    .clk, .res_n, .rar_nset, .req(mem_req),
    .fail(bist_side_iso[2*DATA_W]), .expected_val(bist_side_iso[DATA_W-1:0]),
    .rar_load, .rar_val_in(fuse_val_o), .rar_val_out, .rar_pointer,
    .rar_match, .rdr_val_out, .f_addr, .nogo
  );

  sr_out_mux #(.DATA_W(DATA_W)) u_mux (
    .sel(rar_match), .sram_q(sram_q_iso), .rdr_q(rdr_val_out), .dout(mux_q)
  );

  iso_and #(.W(DATA_W)) u_iso_out (.iso_n(pwr.logic_on), .a(mux_q), .z(data_out));

  efuse_box #(.N_FUSE(N_FUSE), .PRGM_CYCLES(PRGM_CYCLES)) u_efuse (
    .efw_clk(clk), .efw_resn(res_n), .fuse_read, .fuse_prgm, .ready_in(1'b1),
    .ready_out(fuse_ready), .busy(fuse_seq_busy), .fuse_val_i(rar_val_out), .fuse_val_o,
    .efc_isolate(!pwr.efuse), .efc_test_margin, .fss, .tm
  );

  assign mbist_fail = bist_side_iso[2*DATA_W+1];
  assign mbist_nogo = nogo;

  logic unused;
  assign unused = ^{f_addr, rar_pointer, bist_side_iso[2*DATA_W-1:DATA_W]};
endmodule

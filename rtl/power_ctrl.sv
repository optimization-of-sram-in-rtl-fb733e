// Power controller: turns the operation mode into the on/off state of each of
// the five power domains, as listed per mode in Table I of the design:
//
//   mode            mbist  SRAM+RDR  RAR  e-fuse  surrounding logic
//   scan             on      on      on     on        on
//   mbist debug      on      on      on     on        on
//   mbist repair     on      on      on     off       on
//   mission          off     on      on     off       on
//   power down       off     off     on     off       off
//
// The e-fuse box is also powered while one of its sense/program sequences runs
// (fuse_busy), since the fuses are sensed at power on and blown after repair,
// neither of which is a mode of the table - that extension is this design's
// choice. Combinational; the outputs drive the isolation enables.
module power_ctrl
  import lpsr_pkg::*;
(
  input  op_mode_t mode,
  input  logic     fuse_busy,
  output pwr_t     pwr
);
  always_comb begin
    unique case (mode)
      MODE_SCAN:         pwr = '{mbist: 1'b1, sram: 1'b1, rar: 1'b1, efuse: 1'b1, logic_on: 1'b1};
      MODE_MBIST_DEBUG:  pwr = '{mbist: 1'b1, sram: 1'b1, rar: 1'b1, efuse: 1'b1, logic_on: 1'b1};
      MODE_MBIST_REPAIR: pwr = '{mbist: 1'b1, sram: 1'b1, rar: 1'b1, efuse: 1'b0, logic_on: 1'b1};
      MODE_POWER_DOWN:   pwr = '{mbist: 1'b0, sram: 1'b0, rar: 1'b1, efuse: 1'b0, logic_on: 1'b0};
      default:           pwr = '{mbist: 1'b0, sram: 1'b1, rar: 1'b1, efuse: 1'b0, logic_on: 1'b1};
    endcase
    if (fuse_busy) pwr.efuse = 1'b1;
  end
endmodule

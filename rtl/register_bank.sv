// register_bank: the twelve 16-bit control registers of MUROS2.
//
// The document gives twelve registers controlling the board's data
// converters, the image acquisition modes, the Medipix2 operation mode and
// the extra I/O bus; all can be written and read except one read-only
// register holding the firmware version. The address map and field
// layout (muros2_pkg) are this design's choice. The ADC register is
// written by the PC like the others and is also loaded with the ADC's
// result whenever adc_valid_i pulses, so that the PC reads the last
// conversion there.
//
// Interface: a write (we_i) with addr_i stores wdata_i at the next rising
// clock edge; writes to VERSION and to the command addresses 12..15 store
// nothing. rdata_o is the combinational read of addr_i. A write to CONFIG
// also emits a one-cycle pulse: shutter_start_o when the written shutter
// bit is 1, shutter_stop_o when it is 0, which the shutter block uses to
// start or abort timed and continuous acquisitions. All registers reset
// to zero.
module register_bank
  import muros2_pkg::*;
(
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              we_i,
  input  logic [ADDR_W-1:0] addr_i,
  input  logic [15:0]       wdata_i,
  output logic [15:0]       rdata_o,
  input  logic [15:0]       adc_data_i,
  input  logic              adc_valid_i,
  output regs_t             regs_o,
  output logic              shutter_start_o,
  output logic              shutter_stop_o
);
  logic [15:0] r [NUM_REGS-1];   // writable registers 0..10

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int i = 0; i < NUM_REGS-1; i++) r[i] <= '0;
      shutter_start_o <= 1'b0;
      shutter_stop_o  <= 1'b0;
    end else begin
      shutter_start_o <= 1'b0;
      shutter_stop_o  <= 1'b0;
      if (adc_valid_i) r[REG_ADC] <= adc_data_i;
      if (we_i && addr_i < ADDR_W'(REG_VERSION)) begin
        r[addr_i] <= wdata_i;
        if (addr_i == ADDR_W'(REG_CONFIG)) begin
          shutter_start_o <= wdata_i[0];
          shutter_stop_o  <= !wdata_i[0];
        end
      end
    end
  end

  always_comb begin
    if (addr_i == ADDR_W'(REG_VERSION))  rdata_o = VERSION;
    else if (addr_i < ADDR_W'(REG_VERSION)) rdata_o = r[addr_i];
    else                                 rdata_o = '0;
  end

  assign regs_o.cfg       = config_t'(r[REG_CONFIG]);
  assign regs_o.timer     = {r[REG_TIMER_HI], r[REG_TIMER_LO]};
  assign regs_o.frames    = r[REG_FRAMES];
  assign regs_o.mpx_ctrl  = r[REG_MPX_CTRL];
  assign regs_o.dac_bias  = r[REG_DAC_BIAS];
  assign regs_o.dac_ext   = r[REG_DAC_EXT];
  assign regs_o.dac_tp_hi = r[REG_DAC_TP_HI];
  assign regs_o.dac_tp_lo = r[REG_DAC_TP_LO];
  assign regs_o.extra_io  = r[REG_EXTRA_IO];
endmodule

// muros2_fpga: the control and data acquisition FPGA of the MUROS2
// interface board, which connects a PC digital I/O card (16 data lines,
// 16 control lines, one clock) to a daisy chain of up to eight Medipix2
// pixel readout chips over a serial link (data, clock and token in each
// direction).
//
// Blocks (after the document's FPGA block diagram): control, data
// mux/demux, register bank, shutter & test, FIFO + serializer towards the
// chips, deserializer + FIFO from the chips, and the clock divider for the
// PC clock. Clocks:
//   clk_main_i  board oscillator (7..30 MHz);
//   clk_ser_i   eight times clk_main_i, from the FPGA's PLL (vendor
//               primitive, outside this RTL); it is also sent to the chips
//               as their clock;
//   pc_clk_o    clk_main_i / 2, sent to the PC card; it clocks control,
//               registers and shutter logic;
//   mpx_clk_out_i  clock returned by the chain; it clocks the deserializer.
// At 16 bits per PC clock and 1 bit per serial clock both links carry the
// same data rate (8 bits per main-clock cycle).
//
// Off-chip parts the document places on the board - DACs, ADC, LVDS and
// level translators, test-pulse analog switch - are outside this RTL: the
// DAC codes leave as parallel register values, the ADC result enters with
// a valid strobe, and the PC data bus is split into input, output and
// output-enable. All resets are asynchronous, active low; the reset is
// assumed to be released synchronously to clk_main_i by the board.
module muros2_fpga
  import muros2_pkg::*;
#(
  parameter int unsigned TX_FIFO_DEPTH = 512,
  parameter int unsigned RX_FIFO_DEPTH = 512
) (
  input  logic        clk_main_i,
  input  logic        clk_ser_i,
  input  logic        rst_ni,
  // PC digital I/O card
  output logic        pc_clk_o,
  input  logic [15:0] pc_data_i,
  output logic [15:0] pc_data_o,
  output logic        pc_data_oe_o,
  input  logic [7:0]  pc_ctrl_i,     // control lines driven by the PC (asynchronous)
  output logic [7:0]  pc_status_o,   // control lines driven by the board
  // Medipix2 serial link (single-ended side of the LVDS transceivers)
  output logic        mpx_clk_in_o,
  output logic        mpx_data_in_o,
  output logic        mpx_token_in_o,
  input  logic        mpx_clk_out_i,
  input  logic        mpx_data_out_i,
  input  logic        mpx_token_out_i,
  // Medipix2 CMOS control lines
  output logic        mpx_shutter_o,  // 1 = closed
  output logic [15:0] mpx_ctrl_o,     // operation-mode lines (MPX_CTRL register)
  output logic        tp_switch_o,    // test-pulse analog switch control
  input  logic        ext_shutter_i,  // external shutter / trigger (asynchronous)
  // data converters and extra I/O
  output logic [15:0] dac_bias_o,
  output logic [15:0] dac_ext_o,
  output logic [15:0] dac_tp_hi_o,
  output logic [15:0] dac_tp_lo_o,
  input  logic [15:0] adc_data_i,
  input  logic        adc_valid_i,
  output logic [15:0] extra_io_o
);
  logic pc_clk;
  clk_div2 u_clk_div2 (.clk_i(clk_main_i), .rst_ni(rst_ni), .clk_o(pc_clk));
  assign pc_clk_o     = pc_clk;
  assign mpx_clk_in_o = clk_ser_i;

  // control <-> others
  logic              reg_we, tx_push, rx_pop;
  logic [ADDR_W-1:0] reg_addr;
  bus_sel_e          bus_sel;
  logic              tx_full, tx_ovf, rx_empty, rx_ovf;
  logic              wr_mode, rd_token;
  logic              shutter_open, acq_busy, readout_req, readout_done;
  logic [15:0]       wdata, reg_rdata, rx_rdata;
  regs_t             regs;
  logic              shutter_start, shutter_stop, ext_shutter_s;

  control u_control (
    .clk_i          (pc_clk),
    .rst_ni         (rst_ni),
    .pc_ctrl_i      (pc_ctrl_i),
    .pc_status_o    (pc_status_o),
    .reg_we_o       (reg_we),
    .reg_addr_o     (reg_addr),
    .bus_sel_o      (bus_sel),
    .tx_push_o      (tx_push),
    .rx_pop_o       (rx_pop),
    .tx_full_i      (tx_full),
    .tx_overflow_i  (tx_ovf),
    .rx_empty_i     (rx_empty),
    .rx_overflow_i  (rx_ovf),
    .token_out_i    (mpx_token_out_i),
    .wr_mode_o      (wr_mode),
    .rd_token_o     (rd_token),
    .shutter_open_i (shutter_open),
    .acq_busy_i     (acq_busy),
    .readout_req_i  (readout_req),
    .readout_done_o (readout_done),
    .ext_shutter_i  (ext_shutter_i),
    .ext_shutter_o  (ext_shutter_s),
    .busy_o         ()
  );

  data_mux u_data_mux (
    .clk_i        (pc_clk),
    .rst_ni       (rst_ni),
    .pc_data_i    (pc_data_i),
    .pc_data_o    (pc_data_o),
    .pc_data_oe_o (pc_data_oe_o),
    .wdata_o      (wdata),
    .sel_i        (bus_sel),
    .reg_rdata_i  (reg_rdata),
    .rx_rdata_i   (rx_rdata),
    .rx_pop_i     (rx_pop)
  );

  register_bank u_regs (
    .clk_i           (pc_clk),
    .rst_ni          (rst_ni),
    .we_i            (reg_we),
    .addr_i          (reg_addr),
    .wdata_i         (wdata),
    .rdata_o         (reg_rdata),
    .adc_data_i      (adc_data_i),
    .adc_valid_i     (adc_valid_i),
    .regs_o          (regs),
    .shutter_start_o (shutter_start),
    .shutter_stop_o  (shutter_stop)
  );

  shutter_test u_shutter (
    .clk_i           (pc_clk),
    .rst_ni          (rst_ni),
    .cfg_i           (regs.cfg),
    .timer_i         (regs.timer),
    .frames_i        (regs.frames),
    .shutter_start_i (shutter_start),
    .shutter_stop_i  (shutter_stop),
    .ext_shutter_i   (ext_shutter_s),
    .readout_done_i  (readout_done),
    .readout_req_o   (readout_req),
    .shutter_open_o  (shutter_open),
    .mpx_shutter_o   (mpx_shutter_o),
    .acq_busy_o      (acq_busy),
    .frame_cnt_o     (),
    .tp_o            (tp_switch_o)
  );

  tx_serializer #(.DEPTH(TX_FIFO_DEPTH)) u_tx (
    .rst_ni      (rst_ni),
    .pc_clk_i    (pc_clk),
    .push_i      (tx_push),
    .wdata_i     (wdata),
    .full_o      (tx_full),
    .overflow_o  (tx_ovf),
    .clk_ser_i   (clk_ser_i),
    .wr_mode_i   (wr_mode),
    .rd_token_i  (rd_token),
    .mpx_data_o  (mpx_data_in_o),
    .mpx_token_o (mpx_token_in_o),
    .idle_o      ()
  );

  rx_deserializer #(.DEPTH(RX_FIFO_DEPTH)) u_rx (
    .rst_ni     (rst_ni),
    .clk_rx_i   (mpx_clk_out_i),
    .mpx_data_i (mpx_data_out_i),
    .overflow_o (rx_ovf),
    .pc_clk_i   (pc_clk),
    .pop_i      (rx_pop),
    .rdata_o    (rx_rdata),
    .empty_o    (rx_empty)
  );

  assign mpx_ctrl_o  = regs.mpx_ctrl;
  assign dac_bias_o  = regs.dac_bias;
  assign dac_ext_o   = regs.dac_ext;
  assign dac_tp_hi_o = regs.dac_tp_hi;
  assign dac_tp_lo_o = regs.dac_tp_lo;
  assign extra_io_o  = regs.extra_io;
endmodule

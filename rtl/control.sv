// control: the "Control" block - interprets the PC's control lines and
// runs the transfers between the PC and the Medipix2 chain.
//
// The document splits the PC card's 32-bit bus into 16 asynchronous
// control lines and 16 synchronous data lines and says that, depending on
// the control lines, the data go to the chipboard or to the register bank;
// it also routes the Medipix2 token through this block. The line
// assignment and the command set are this design's (see muros2_pkg):
//   pc_ctrl_i[3:0] address, [4] register-write strobe, [5] register read,
//   [6] stream words into the TX FIFO, [7] stream words out of the RX FIFO.
// The eight lines from the PC pass a two-flop synchronizer (data_mux delays
// the data bus to match). A rising edge of the write strobe writes the
// aligned data word to the addressed register, or, at addresses 12..14,
// issues a command: START_WR (load the chips from the TX FIFO), START_RD
// (read the chips into the RX FIFO) or ABORT.
//
// Transfers: for a load, wr_mode_o is held high and the serializer sends
// the FIFO contents, raising the chips' token with each valid bit; for a
// readout, rd_token_o is held high and the chips shift their counters out.
// Either transfer ends when the chain's token output goes high (after the
// last chip has finished); readout_done_o then pulses. A transfer is only
// started while the shutter is closed (readout is suspended while the
// chips count) and the token output has returned low from the previous
// transfer; a command arriving otherwise is ignored. A readout requested
// by the shutter block in continuous mode is remembered until it can
// start.
//
// The external shutter control input also enters here, as drawn in the
// original block diagram; it is synchronized with the other asynchronous
// inputs and handed to the shutter block (two cycles of latency).
//
// pc_status_o (the eight board-to-PC control lines) is registered; bit
// meanings are in muros2_pkg (ST_*).
module control
  import muros2_pkg::*;
(
  input  logic              clk_i,           // PC clock
  input  logic              rst_ni,
  input  logic [7:0]        pc_ctrl_i,       // asynchronous
  output logic [7:0]        pc_status_o,
  // register bank and data steering
  output logic              reg_we_o,
  output logic [ADDR_W-1:0] reg_addr_o,
  output bus_sel_e          bus_sel_o,
  output logic              tx_push_o,
  output logic              rx_pop_o,
  input  logic              tx_full_i,
  input  logic              tx_overflow_i,
  input  logic              rx_empty_i,
  input  logic              rx_overflow_i,   // asynchronous (chain clock domain)
  // Medipix2 chain
  input  logic              token_out_i,     // asynchronous
  output logic              wr_mode_o,
  output logic              rd_token_o,
  // shutter block
  input  logic              shutter_open_i,
  input  logic              acq_busy_i,
  input  logic              readout_req_i,
  output logic              readout_done_o,
  input  logic              ext_shutter_i,   // asynchronous external shutter control
  output logic              ext_shutter_o,   // synchronized to clk_i, for the shutter block
  output logic              busy_o
);
  typedef enum logic [1:0] {C_IDLE, C_WRITE, C_READ} cstate_e;
  cstate_e state;

  logic [7:0] ctl;
  logic       tok_s, rx_ovf_s;
  sync_2ff #(.WIDTH(11)) u_sync (
    .clk_i(clk_i), .rst_ni(rst_ni),
    .d_i({ext_shutter_i, rx_overflow_i, token_out_i, pc_ctrl_i}),
    .q_o({ext_shutter_o, rx_ovf_s, tok_s, ctl}));

  logic strobe_q, strobe_rise;
  logic [ADDR_W-1:0] addr;
  assign addr        = ctl[CTL_ADDR_LSB +: ADDR_W];
  assign strobe_rise = ctl[CTL_REG_WR] && !strobe_q;

  logic cmd_wr, cmd_rd, cmd_abort;
  assign cmd_wr    = strobe_rise && addr == ADDR_W'(CMD_START_WR);
  assign cmd_rd    = strobe_rise && addr == ADDR_W'(CMD_START_RD);
  assign cmd_abort = strobe_rise && addr == ADDR_W'(CMD_ABORT);

  assign reg_addr_o = addr;
  assign reg_we_o   = strobe_rise && addr < ADDR_W'(CMD_START_WR);
  assign tx_push_o  = ctl[CTL_TX_WR];
  assign rx_pop_o   = ctl[CTL_RX_RD] && !rx_empty_i;
  always_comb begin
    if (ctl[CTL_RX_RD])      bus_sel_o = BUS_RX;
    else if (ctl[CTL_REG_RD]) bus_sel_o = BUS_REG;
    else                     bus_sel_o = BUS_IDLE;
  end

  logic can_start, pending_rd;
  assign can_start = !shutter_open_i && !tok_s;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state          <= C_IDLE;
      strobe_q       <= 1'b0;
      pending_rd     <= 1'b0;
      readout_done_o <= 1'b0;
      pc_status_o    <= '0;
    end else begin
      strobe_q       <= ctl[CTL_REG_WR];
      readout_done_o <= 1'b0;
      if (readout_req_i) pending_rd <= 1'b1;
      unique case (state)
        C_IDLE: begin
          if (cmd_wr && can_start) begin
            state <= C_WRITE;
          end else if ((cmd_rd || pending_rd || readout_req_i) && can_start) begin
            state      <= C_READ;
            pending_rd <= 1'b0;
          end
        end
        C_WRITE: begin
          if (tok_s || cmd_abort) state <= C_IDLE;
        end
        C_READ: begin
          if (cmd_abort) begin
            state <= C_IDLE;
          end else if (tok_s) begin
            state          <= C_IDLE;
            readout_done_o <= 1'b1;
          end
        end
        default: state <= C_IDLE;
      endcase
      if (cmd_abort) pending_rd <= 1'b0;
      pc_status_o[ST_RX_VALID] <= rx_pop_o;
      pc_status_o[ST_RX_EMPTY] <= rx_empty_i;
      pc_status_o[ST_TX_FULL]  <= tx_full_i;
      pc_status_o[ST_BUSY]     <= (state != C_IDLE);
      pc_status_o[ST_SHUTTER]  <= shutter_open_i;
      pc_status_o[ST_RX_OVF]   <= rx_ovf_s;
      pc_status_o[ST_TX_OVF]   <= tx_overflow_i;
      pc_status_o[ST_ACQ]      <= acq_busy_i;
    end
  end

  assign wr_mode_o  = (state == C_WRITE);
  assign rd_token_o = (state == C_READ);
  assign busy_o     = (state != C_IDLE);
endmodule

// data_mux: "Data mux. and demux." - the steering point of the 16-bit PC
// data bus.
//
// Incoming words (PC to board) are delayed by two PC-clock cycles so that
// they stay aligned with the PC's control lines, which the control block
// passes through a two-flop synchronizer; the aligned word goes to both
// the register bank and the serializer FIFO, and the control block decides
// which of them takes it. Outgoing words (board to PC) come from the
// register bank (sel_i = BUS_REG, refreshed every cycle) or from the
// deserializer FIFO (sel_i = BUS_RX, taken on the cycle the control block
// pops the FIFO). The output word and its output enable are registered, so
// a popped word is on the bus one cycle after the pop, together with the
// RX_VALID status line. The document only names this block; the delays
// and the registered output are this design's choices.
module data_mux
  import muros2_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  // PC bus
  input  logic [15:0] pc_data_i,
  output logic [15:0] pc_data_o,
  output logic        pc_data_oe_o,
  // demux side
  output logic [15:0] wdata_o,      // aligned word for register bank and TX FIFO
  // mux side
  input  bus_sel_e    sel_i,
  input  logic [15:0] reg_rdata_i,
  input  logic [15:0] rx_rdata_i,
  input  logic        rx_pop_i
);
  logic [15:0] d1, d2;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      d1           <= '0;
      d2           <= '0;
      pc_data_o    <= '0;
      pc_data_oe_o <= 1'b0;
    end else begin
      d1           <= pc_data_i;
      d2           <= d1;
      pc_data_oe_o <= (sel_i != BUS_IDLE);
      unique case (sel_i)
        BUS_REG: pc_data_o <= reg_rdata_i;
        BUS_RX:  if (rx_pop_i) pc_data_o <= rx_rdata_i;
        default: ;
      endcase
    end
  end

  assign wdata_o = d2;
endmodule

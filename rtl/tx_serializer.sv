// tx_serializer: "FIFO output and serializer" - turns 16-bit words from the
// PC into the 1-bit stream sent to the Medipix2 data input.
//
// The PC side pushes words into a dual-clock FIFO at the PC clock. On the
// serial clock (eight times the main clock, sixteen times the PC clock, so
// the two rates match, as the document explains) a 16-bit shift register
// takes one word from the FIFO and sends it most significant bit first,
// one bit per serial clock. While a word's last bit is being sent the next
// word is loaded, so a stream of words leaves without gaps.
//
// Token: the document gives the Medipix2 serial port a data, a clock and
// a token line in each direction and says a chip may transfer data while
// it holds the token. In this design MUROS2 drives token_in high
//   - during a load (wr_mode_i): exactly on the serial cycles that carry a
//     valid bit, so the chips pause if the FIFO runs dry;
//   - during a readout (rd_token_i): continuously.
// wr_mode_i and rd_token_i come from the PC-clock domain and are
// synchronized here (two serial clocks). The bit order, the pause rule and
// the output register are this design's choices.
//
// Timing: mpx_data_o and mpx_token_o are registered on the rising edge of
// clk_ser_i; the chip clock is clk_ser_i itself, so the chips can sample on
// its falling edge in the middle of each bit.
module tx_serializer #(
  parameter int unsigned DEPTH = 512
) (
  input  logic        rst_ni,
  // PC side
  input  logic        pc_clk_i,
  input  logic        push_i,
  input  logic [15:0] wdata_i,
  output logic        full_o,
  output logic        overflow_o,
  // serial side
  input  logic        clk_ser_i,
  input  logic        wr_mode_i,   // asynchronous: load transfer active
  input  logic        rd_token_i,  // asynchronous: readout token request
  output logic        mpx_data_o,
  output logic        mpx_token_o,
  output logic        idle_o       // serial side has no bit in flight and FIFO empty
);
  logic [15:0] fifo_rdata;
  logic        fifo_empty, fifo_pop;

  async_fifo #(.WIDTH(16), .DEPTH(DEPTH)) u_fifo (
    .rst_ni     (rst_ni),
    .wclk_i     (pc_clk_i),
    .wen_i      (push_i),
    .wdata_i    (wdata_i),
    .wfull_o    (full_o),
    .woverflow_o(overflow_o),
    .rclk_i     (clk_ser_i),
    .ren_i      (fifo_pop),
    .rdata_o    (fifo_rdata),
    .rempty_o   (fifo_empty)
  );

  logic wr_mode_s, rd_token_s;
  sync_2ff #(.WIDTH(2)) u_sync (
    .clk_i(clk_ser_i), .rst_ni(rst_ni),
    .d_i({wr_mode_i, rd_token_i}), .q_o({wr_mode_s, rd_token_s}));

  logic [15:0] sh, sh_next;
  logic [4:0]  left, left_next;   // bits still to send from sh

  always_comb begin
    fifo_pop  = 1'b0;
    sh_next   = sh;
    left_next = left;
    if (!wr_mode_s) begin
      left_next = '0;
    end else if (left <= 5'd1 && !fifo_empty) begin
      fifo_pop  = 1'b1;
      sh_next   = fifo_rdata;
      left_next = 5'd16;
    end else if (left != 0) begin
      sh_next   = {sh[14:0], 1'b0};
      left_next = left - 5'd1;
    end
  end

  always_ff @(posedge clk_ser_i or negedge rst_ni) begin
    if (!rst_ni) begin
      sh          <= '0;
      left        <= '0;
      mpx_data_o  <= 1'b0;
      mpx_token_o <= 1'b0;
    end else begin
      sh          <= sh_next;
      left        <= left_next;
      mpx_data_o  <= (left_next != 0) && sh_next[15];
      mpx_token_o <= rd_token_s || (wr_mode_s && left_next != 0);
    end
  end

  assign idle_o = (left == 0) && fifo_empty;
endmodule

// rx_deserializer: "FIFO input and deserializer" - collects the 1-bit
// stream from the Medipix2 chain into 16-bit words for the PC.
//
// As the document requires, the incoming data are sampled with the clock
// that comes back out of the chips (clk_rx_i), not with the clock MUROS2
// sends, so that cable and daisy-chain delays do not matter. This design
// samples on the rising edge of that clock and assumes the chain's clock
// output toggles only while a chip is putting valid data on the line (the
// chip model in the testbenches behaves so); every rising edge therefore
// delivers one bit. Bits are assembled most significant first; every
// sixteenth bit the word is pushed into a dual-clock FIFO, read on the PC
// clock (first-word-fall-through, see async_fifo). A word arriving while
// the FIFO is full is lost and sets the sticky overflow_o (write-clock
// domain; the reader synchronizes it). A trailing partial word is held
// until more bits arrive; a Medipix2 frame (851968 bits) is a whole number
// of words.
module rx_deserializer #(
  parameter int unsigned DEPTH = 512
) (
  input  logic        rst_ni,
  // serial side, clocked by the chain's clock out
  input  logic        clk_rx_i,
  input  logic        mpx_data_i,
  output logic        overflow_o,
  // PC side
  input  logic        pc_clk_i,
  input  logic        pop_i,
  output logic [15:0] rdata_o,
  output logic        empty_o
);
  logic [14:0] sh;
  logic [3:0]  cnt;
  logic        push;
  logic [15:0] word;
  logic        full_unused;

  assign push = (cnt == 4'd15);
  assign word = {sh, mpx_data_i};

  always_ff @(posedge clk_rx_i or negedge rst_ni) begin
    if (!rst_ni) begin
      sh  <= '0;
      cnt <= '0;
    end else begin
      sh  <= {sh[13:0], mpx_data_i};
      cnt <= cnt + 4'd1;
    end
  end

  async_fifo #(.WIDTH(16), .DEPTH(DEPTH)) u_fifo (
    .rst_ni     (rst_ni),
    .wclk_i     (clk_rx_i),
    .wen_i      (push),
    .wdata_i    (word),
    .wfull_o    (full_unused),
    .woverflow_o(overflow_o),
    .rclk_i     (pc_clk_i),
    .ren_i      (pop_i),
    .rdata_o    (rdata_o),
    .rempty_o   (empty_o)
  );
endmodule

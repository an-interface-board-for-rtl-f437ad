// sync_2ff: two-flip-flop synchronizer for a bus of independent level
// signals entering the clock domain of clk_i. Each bit is delayed by two
// clk_i cycles. Used for the PC's asynchronous control lines, the Medipix2
// token and the external shutter input. Not for multi-bit values that
// change together (those cross in Gray code inside async_fifo).
module sync_2ff #(
  parameter int unsigned WIDTH = 1,
  parameter logic [WIDTH-1:0] RESET_VALUE = '0
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic [WIDTH-1:0] d_i,
  output logic [WIDTH-1:0] q_o
);
  logic [WIDTH-1:0] meta;
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      meta <= RESET_VALUE;
      q_o  <= RESET_VALUE;
    end else begin
      meta <= d_i;
      q_o  <= meta;
    end
  end
endmodule

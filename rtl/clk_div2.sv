// clk_div2: divides the board's main clock by two.
//
// The PC-side data link runs at half the main clock frequency (document,
// Section 2); this toggle flip-flop produces that clock. The output is
// forwarded to the PC card as its transfer clock and clocks the control,
// register and shutter logic of this design. The reset value (low) is this
// design's choice. Timing: clk_o toggles on every rising edge of clk_i, so
// its rising edges coincide with every second rising edge of clk_i.
module clk_div2 (
  input  logic clk_i,
  input  logic rst_ni,
  output logic clk_o
);
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) clk_o <= 1'b0;
    else         clk_o <= ~clk_o;
  end
endmodule

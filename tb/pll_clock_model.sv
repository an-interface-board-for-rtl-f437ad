// pll_clock_model: testbench clock source standing in for the board
// oscillator and the FPGA's x8 PLL. clk_ser_o runs at eight times
// clk_main_o and the two are phase aligned (every fourth rising edge of
// clk_ser_o toggles clk_main_o). SER_HALF_PS is half the serial clock
// period; the default 3125 ps gives 160 MHz serial and 20 MHz main clock.
module pll_clock_model #(
  parameter int unsigned SER_HALF_PS = 3125
) (
  output logic clk_main_o,
  output logic clk_ser_o
);
  int unsigned n;
  initial begin
    clk_ser_o  = 1'b0;
    clk_main_o = 1'b0;
    n = 0;
    forever begin
      #(SER_HALF_PS * 1ps);
      clk_ser_o = ~clk_ser_o;
      if (clk_ser_o) begin
        if (n % 4 == 0) clk_main_o = ~clk_main_o;
        n++;
      end
    end
  end
endmodule

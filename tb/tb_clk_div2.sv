// tb_clk_div2: checks that the divider output toggles on every rising edge
// of its input after reset, i.e. runs at half the input frequency, and
// holds low during reset.
module tb_clk_div2;
  logic clk = 1'b0, rst_n = 1'b1, clk_o;
  int checks = 0, failures = 0;

  clk_div2 dut (.clk_i(clk), .rst_ni(rst_n), .clk_o(clk_o));

  always #5ns clk = ~clk;

  initial #1ns rst_n = 1'b0;   // asynchronous reset needs a falling edge

  initial begin
    #1000ns;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expect_v;
    int rises;
    repeat (3) @(posedge clk);
    #1ns;
    checks++; if (clk_o !== 1'b0) begin failures++; $display("not low in reset"); end
    rst_n = 1'b1;
    expect_v = 1'b0;
    rises = 0;
    for (int i = 0; i < 40; i++) begin
      @(posedge clk); #1ns;
      expect_v = ~expect_v;
      if (expect_v) rises++;
      checks++;
      if (clk_o !== expect_v) begin failures++; $display("cycle %0d: clk_o=%b expected %b", i, clk_o, expect_v); end
    end
    checks++; if (rises != 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

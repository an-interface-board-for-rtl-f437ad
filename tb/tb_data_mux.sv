// tb_data_mux: checks that incoming PC words reach wdata_o exactly two
// clocks later, that the output bus carries the register value when the
// register route is selected and the FIFO word only on a pop when the RX
// route is selected (holding it otherwise), and that the output enable
// follows the route one clock later.
module tb_data_mux;
  import muros2_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [15:0] pc_in = '0, pc_out, wdata, reg_rdata = '0, rx_rdata = '0;
  logic oe, rx_pop = 1'b0;
  bus_sel_e sel = BUS_IDLE;
  int checks = 0, failures = 0;
  logic [15:0] hist[$];

  data_mux dut (
    .clk_i(clk), .rst_ni(rst_n), .pc_data_i(pc_in), .pc_data_o(pc_out),
    .pc_data_oe_o(oe), .wdata_o(wdata), .sel_i(sel), .reg_rdata_i(reg_rdata),
    .rx_rdata_i(rx_rdata), .rx_pop_i(rx_pop));

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial #1ns rst_n = 1'b0;   // asynchronous reset needs a falling edge

  initial begin
    #100us;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] held;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // alignment delay
    for (int i = 0; i < 30; i++) begin
      @(negedge clk);
      if (i >= 2) check(wdata == hist[i - 2], $sformatf("wdata at %0d", i));
      pc_in = 16'($urandom);
      hist.push_back(pc_in);
    end
    // register route
    @(negedge clk); sel = BUS_REG;
    for (int i = 0; i < 10; i++) begin
      reg_rdata = 16'($urandom);
      @(negedge clk);
      check(oe, "oe in register route");
      check(pc_out == reg_rdata, "register value on bus");
    end
    // RX route: only pops update the bus
    sel = BUS_RX;
    for (int i = 0; i < 20; i++) begin
      rx_rdata = 16'($urandom);
      rx_pop = (i % 3 == 0);
      held = rx_pop ? rx_rdata : pc_out;
      @(negedge clk);
      check(pc_out == held, $sformatf("rx route step %0d", i));
    end
    rx_pop = 1'b0;
    sel = BUS_IDLE;
    @(negedge clk);
    check(!oe, "oe released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_register_bank: writes random values to the eleven writable registers
// and reads them back; checks that VERSION reads its constant and ignores
// writes, that command addresses store nothing, that the ADC result loads
// the ADC register, that the structured outputs carry the register values
// and that CONFIG writes pulse shutter_start/shutter_stop for one cycle.
module tb_register_bank;
  import muros2_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, we = 1'b0, adc_valid = 1'b0;
  logic [3:0] addr = '0;
  logic [15:0] wdata = '0, rdata, adc_data = '0;
  regs_t regs;
  logic sstart, sstop;
  int checks = 0, failures = 0;
  logic [15:0] model [12];

  register_bank dut (
    .clk_i(clk), .rst_ni(rst_n), .we_i(we), .addr_i(addr), .wdata_i(wdata),
    .rdata_o(rdata), .adc_data_i(adc_data), .adc_valid_i(adc_valid),
    .regs_o(regs), .shutter_start_o(sstart), .shutter_stop_o(sstop));

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(input int a, input logic [15:0] d);
    @(negedge clk); we = 1'b1; addr = 4'(a); wdata = d;
    @(negedge clk); we = 1'b0;
  endtask

  initial #1ns rst_n = 1'b0;   // asynchronous reset needs a falling edge

  initial begin
    #100us;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 12; a++) begin
      @(negedge clk); addr = 4'(a);
      #1ns check(rdata == (a == 11 ? 16'h0201 : 16'h0), $sformatf("reset value of %0d", a));
    end
    for (int rep = 0; rep < 3; rep++) begin
      for (int a = 0; a < 16; a++) begin
        logic [15:0] d;
        d = 16'($urandom) & 16'hFFFE;   // keep the shutter bit clear
        wr(a, d);
        if (a < 11) model[a] = d;
      end
      for (int a = 0; a < 12; a++) begin
        @(negedge clk); addr = 4'(a);
        #1ns check(rdata == (a == 11 ? VERSION : model[a]), $sformatf("readback of %0d", a));
      end
    end
    check(regs.timer == {model[2], model[1]}, "timer output");
    check(regs.frames == model[3] && regs.mpx_ctrl == model[4], "frames, mpx_ctrl outputs");
    check(regs.dac_bias == model[5] && regs.dac_ext == model[6], "DAC outputs");
    check(regs.dac_tp_hi == model[7] && regs.dac_tp_lo == model[8], "test pulse DAC outputs");
    check(regs.extra_io == model[10], "extra I/O output");
    check(16'(regs.cfg) == model[0], "config output");
    // ADC result
    @(negedge clk); adc_data = 16'h3C5A; adc_valid = 1'b1;
    @(negedge clk); adc_valid = 1'b0; addr = 4'(REG_ADC);
    #1ns check(rdata == 16'h3C5A, "ADC result loaded");
    // shutter pulses
    @(negedge clk); we = 1'b1; addr = 4'(REG_CONFIG); wdata = 16'h0001;
    @(negedge clk); we = 1'b0;
    check(sstart && !sstop, "start pulse");
    @(negedge clk);
    check(!sstart, "start pulse one cycle");
    wr(REG_CONFIG, 16'h0000);
    check(sstop && !sstart, "stop pulse");
    wr(REG_TIMER_LO, 16'h0001);
    check(!sstart && !sstop, "no pulse for other registers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

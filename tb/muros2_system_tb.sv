// muros2_system_tb: end-to-end harness for muros2_fpga. It plays the PC
// digital I/O card (data and control lines driven on the falling edge of
// the board's PC clock, read on the falling edge) and connects the FPGA to
// a model of a Medipix2 daisy chain and to a PLL clock model (160 MHz
// serial, 20 MHz main, 10 MHz PC clock).
//
// Scenario: register write/read-back of all registers, version, ADC
// result, DAC and extra-I/O outputs; loading configuration words into the
// chain through the serializer (once streamed back to back, once with
// pauses); reading the chain out; a readout refused while the shutter is
// open; continuous acquisition of FRAMES exposures with automatic
// readouts while the PC only reads data; a timed exposure with test
// pulses; external shutter modes; and, when CHECK_OVERFLOW is set, a
// readout the PC does not read, which must overflow the receive FIFO.
// Each mechanism is counted and one that never happened is a failure.
// With FULL_OPERATION set only one complete load and readout of the chain
// is run (for full-size chips).
//
// USE_DEFAULTS instantiates muros2_fpga with its default parameters.
module muros2_system_tb
  import muros2_pkg::*;
  import tb_mpx_pkg::*;
#(
  parameter int unsigned NCHIPS         = 2,
  parameter int unsigned BITS           = 512,
  parameter bit          USE_DEFAULTS   = 1'b1,
  parameter int unsigned RX_DEPTH       = 16,
  parameter bit          CHECK_OVERFLOW = 1'b0,
  parameter bit          FULL_OPERATION = 1'b0,
  parameter longint      WATCHDOG_NS    = 64'd5_000_000
) ();
  localparam int unsigned WORDS = NCHIPS * BITS / 16;

  logic clk_main, clk_ser, rst_n = 1'b1;
  logic pc_clk;
  logic [15:0] pc_data_i = '0, pc_data_o;
  logic pc_data_oe;
  logic [7:0] pc_ctrl = '0, status;
  logic mpx_clk_in, mpx_data_in, mpx_token_in, mpx_clk_out, mpx_data_out, mpx_token_out;
  logic mpx_shutter, tp_switch, ext_shutter = 1'b0, adc_valid = 1'b0;
  logic [15:0] mpx_ctrl, dac_bias, dac_ext, dac_tp_hi, dac_tp_lo, extra_io, adc_data = '0;

  int checks = 0, failures = 0;

  pll_clock_model u_clk (.clk_main_o(clk_main), .clk_ser_o(clk_ser));

  if (USE_DEFAULTS) begin : g_dut
    muros2_fpga dut (
      .clk_main_i(clk_main), .clk_ser_i(clk_ser), .rst_ni(rst_n), .pc_clk_o(pc_clk),
      .pc_data_i(pc_data_i), .pc_data_o(pc_data_o), .pc_data_oe_o(pc_data_oe),
      .pc_ctrl_i(pc_ctrl), .pc_status_o(status),
      .mpx_clk_in_o(mpx_clk_in), .mpx_data_in_o(mpx_data_in), .mpx_token_in_o(mpx_token_in),
      .mpx_clk_out_i(mpx_clk_out), .mpx_data_out_i(mpx_data_out), .mpx_token_out_i(mpx_token_out),
      .mpx_shutter_o(mpx_shutter), .mpx_ctrl_o(mpx_ctrl), .tp_switch_o(tp_switch),
      .ext_shutter_i(ext_shutter), .dac_bias_o(dac_bias), .dac_ext_o(dac_ext),
      .dac_tp_hi_o(dac_tp_hi), .dac_tp_lo_o(dac_tp_lo), .adc_data_i(adc_data),
      .adc_valid_i(adc_valid), .extra_io_o(extra_io));
  end else begin : g_dut
    muros2_fpga #(.RX_FIFO_DEPTH(RX_DEPTH)) dut (
      .clk_main_i(clk_main), .clk_ser_i(clk_ser), .rst_ni(rst_n), .pc_clk_o(pc_clk),
      .pc_data_i(pc_data_i), .pc_data_o(pc_data_o), .pc_data_oe_o(pc_data_oe),
      .pc_ctrl_i(pc_ctrl), .pc_status_o(status),
      .mpx_clk_in_o(mpx_clk_in), .mpx_data_in_o(mpx_data_in), .mpx_token_in_o(mpx_token_in),
      .mpx_clk_out_i(mpx_clk_out), .mpx_data_out_i(mpx_data_out), .mpx_token_out_i(mpx_token_out),
      .mpx_shutter_o(mpx_shutter), .mpx_ctrl_o(mpx_ctrl), .tp_switch_o(tp_switch),
      .ext_shutter_i(ext_shutter), .dac_bias_o(dac_bias), .dac_ext_o(dac_ext),
      .dac_tp_hi_o(dac_tp_hi), .dac_tp_lo_o(dac_tp_lo), .adc_data_i(adc_data),
      .adc_valid_i(adc_valid), .extra_io_o(extra_io));
  end

  medipix2_chain_model #(.NCHIPS(NCHIPS), .BITS(BITS)) u_chain (
    .clk_in(mpx_clk_in), .data_in(mpx_data_in), .token_in(mpx_token_in),
    .mode_i(mpx_ctrl[1:0]), .reset_i(mpx_ctrl[MPX_RESET_BIT]), .clk_out(mpx_clk_out), .data_out(mpx_data_out),
    .token_out(mpx_token_out));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial #1ns rst_n = 1'b0;   // asynchronous reset needs a falling edge

  initial begin
    #(WATCHDOG_NS * 1ns);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters and monitors ----------------
  int n_reg_wr = 0, n_load = 0, n_load_pause = 0, n_readout = 0, n_refused = 0;
  int n_cont_frames = 0, n_test_pulses = 0, n_overflow = 0, n_ext = 0;
  int open_during_token = 0, token_pauses = 0;
  logic tok_q = 1'b0;
  bit in_load = 0;
  bit live = 0;   // set once reset has been released

  always @(negedge clk_ser) begin
    if (live && mpx_token_in && !mpx_shutter) open_during_token++;
    if (in_load && tok_q && !mpx_token_in && !mpx_token_out) token_pauses++;
    tok_q = mpx_token_in;
  end
  logic tp_q = 1'b0;
  always @(negedge pc_clk) begin
    if (tp_switch && !tp_q) n_test_pulses++;
    tp_q = tp_switch;
  end

  // ---------------- PC card tasks ----------------
  task automatic reg_write(input logic [3:0] a, input logic [15:0] d);
    @(negedge pc_clk); pc_ctrl[3:0] = a; pc_data_i = d;
    @(negedge pc_clk); pc_ctrl[CTL_REG_WR] = 1'b1;
    repeat (3) @(negedge pc_clk); pc_ctrl[CTL_REG_WR] = 1'b0;
    repeat (3) @(negedge pc_clk);
    if (a < 12) n_reg_wr++;
  endtask

  task automatic reg_read(input logic [3:0] a, output logic [15:0] d);
    @(negedge pc_clk); pc_ctrl[3:0] = a; pc_ctrl[CTL_REG_RD] = 1'b1;
    repeat (5) @(negedge pc_clk);
    d = pc_data_o;
    check(pc_data_oe, "data bus driven during a register read");
    pc_ctrl[CTL_REG_RD] = 1'b0;
    @(negedge pc_clk);
  endtask

  task automatic wait_not_busy(input int max_cycles);
    int i;
    for (i = 0; i < max_cycles; i++) begin
      @(negedge pc_clk);
      if (!status[ST_BUSY]) break;
    end
    check(i < max_cycles, "transfer finished in time");
  endtask

  // Load the chain: START_WR, then stream WORDS configuration words.
  task automatic load_chain(input int spacing);
    logic [15:0] v;
    reg_write(REG_MPX_CTRL, 16'(MPX_MODE_LOAD) | 16'(1 << MPX_RESET_BIT));
    reg_write(REG_MPX_CTRL, 16'(MPX_MODE_LOAD));
    reg_write(CMD_START_WR, 16'h0);
    check(status[ST_BUSY], "busy after START_WR");
    in_load = 1;
    for (int k = 0; k < WORDS; k++) begin
      @(negedge pc_clk);
      pc_data_i = config_word(k);
      pc_ctrl[CTL_TX_WR] = 1'b1;
      if (spacing > 0) begin
        @(negedge pc_clk); pc_ctrl[CTL_TX_WR] = 1'b0;
        repeat (spacing - 1) @(negedge pc_clk);
      end
    end
    @(negedge pc_clk); pc_ctrl[CTL_TX_WR] = 1'b0;
    wait_not_busy(4 * WORDS + 1000);
    in_load = 0;
    check(u_chain.words_loaded == WORDS, $sformatf("chain took %0d words", u_chain.words_loaded));
    begin
      int bad = 0;
      for (int k = 0; k < WORDS; k++) if (u_chain.loaded[k] != config_word(k)) bad++;
      check(bad == 0, $sformatf("%0d configuration words wrong", bad));
    end
    u_chain.words_loaded = 0;
    n_load++;
    if (spacing > 0) n_load_pause++;
  endtask

  // Read whatever arrives while RX_RD is held, for `frames` complete frames.
  // Returns the number of PC clocks from the first to the last word.
  int rx_k = 0, rx_bad = 0;
  task automatic collect_words(input int frames, output int span);
    int first = -1, cyc = 0, got = 0;
    @(negedge pc_clk); pc_ctrl[CTL_RX_RD] = 1'b1;
    while (got < frames * WORDS && cyc < frames * (WORDS * 4 + 5000) + 20000) begin
      @(negedge pc_clk);
      cyc++;
      if (status[ST_RX_VALID]) begin
        int c, k;
        c = (rx_k / (BITS / 16)) % NCHIPS;
        k = rx_k % (BITS / 16);
        if (pc_data_o != pixel_word(c, k)) begin
          if (rx_bad < 5) $display("word %0d: got %h expected %h", rx_k, pc_data_o, pixel_word(c, k));
          rx_bad++;
        end
        if (first < 0) first = cyc;
        span = cyc - first + 1;
        got++;
        rx_k = (rx_k + 1) % WORDS;
      end
    end
    pc_ctrl[CTL_RX_RD] = 1'b0;
    check(got == frames * WORDS, $sformatf("received %0d words, expected %0d", got, frames * WORDS));
  endtask

  // ---------------- scenario ----------------
  initial begin
    logic [15:0] d;
    int span;
    realtime t0, t1;
    repeat (3) @(posedge clk_main);
    rst_n = 1'b1;
    repeat (4) @(negedge pc_clk);
    live = 1;

    if (!FULL_OPERATION) begin
      // registers
      for (int a = 0; a < 11; a++) reg_write(4'(a), 16'(16'h1000 * a + 16'h0F0 + a) & ~16'h0001);
      for (int a = 0; a < 11; a++) begin
        reg_read(4'(a), d);
        if (a != REG_ADC) check(d == (16'(16'h1000 * a + 16'h0F0 + a) & ~16'h0001), $sformatf("register %0d read back %h", a, d));
      end
      reg_read(REG_VERSION, d);
      check(d == VERSION, "version register");
      reg_write(REG_VERSION, 16'hFFFF);
      reg_read(REG_VERSION, d);
      check(d == VERSION, "version register is read-only");
      check(dac_bias == 16'h50F4 && dac_ext == 16'h60F6 && dac_tp_hi == 16'h70F6 &&
            dac_tp_lo == 16'h80F8 && extra_io == 16'hA0FA, "converter and extra I/O outputs");
      @(negedge clk_main); adc_data = 16'h0ABC; adc_valid = 1'b1;
      @(negedge clk_main); adc_valid = 1'b0;
      reg_read(REG_ADC, d);
      check(d == 16'h0ABC, "ADC result readable");
      reg_write(REG_CONFIG, 16'h0000);
    end

    // load the chain back to back, then with pauses
    load_chain(0);
    if (!FULL_OPERATION) begin
      load_chain(3);
      check(token_pauses > 0, "token paused while the TX FIFO was empty");
    end

    // readout, with rate measured on the serial clock
    reg_write(REG_MPX_CTRL, 16'(MPX_MODE_READ));
    t0 = $realtime;
    fork
      collect_words(1, span);
      reg_write(CMD_START_RD, 16'h0);
    join
    t1 = $realtime;
    wait_not_busy(1000);
    check(rx_bad == 0, $sformatf("%0d readout words wrong", rx_bad));
    // the transfer must take about one serial clock (6.25 ns) per bit
    check((t1 - t0) < real'(NCHIPS) * BITS * 6.25ns + 20us,
          $sformatf("readout took %0.1f us for %0d bits", (t1 - t0) / 1us, NCHIPS * BITS));
    check(span <= WORDS + 8, $sformatf("PC received the words in %0d PC clocks", span));
    n_readout++;

    if (!FULL_OPERATION) begin
      // refused while the shutter is open (manual mode)
      reg_write(REG_CONFIG, 16'h0001);
      check(mpx_shutter == 1'b0, "manual mode opens the shutter");
      reg_write(CMD_START_RD, 16'h0);
      repeat (4) @(negedge pc_clk);
      check(!status[ST_BUSY] && !mpx_token_in, "readout refused while counting");
      n_refused++;
      reg_write(REG_CONFIG, 16'h0000);
      check(mpx_shutter == 1'b1, "manual mode closes the shutter");

      // continuous acquisition: 3 frames, PC only reads
      reg_write(REG_TIMER_LO, 16'd200);
      reg_write(REG_TIMER_HI, 16'd0);
      reg_write(REG_FRAMES, 16'd3);
      fork
        collect_words(3, span);
        reg_write(REG_CONFIG, {8'd0, 2'b00, 1'b0, 1'b0, MODE_CONTINUOUS, 1'b1});
      join
      check(rx_bad == 0, "continuous readout words");
      repeat (10) @(negedge pc_clk);
      check(!status[ST_ACQ], "continuous acquisition finished");
      n_cont_frames = 3;
      check(open_during_token == 0, "no readout while the shutter was open");

      // timed exposure with test pulses, half period 5, 100 cycles -> 10 pulses
      n_test_pulses = 0;
      reg_write(REG_TIMER_LO, 16'd100);
      reg_write(REG_CONFIG, {8'd5, 2'b00, 1'b0, 1'b1, MODE_TIMED, 1'b1});
      repeat (150) @(negedge pc_clk);
      check(n_test_pulses == 10, $sformatf("test pulses %0d", n_test_pulses));

      // external shutter, timed
      reg_write(REG_TIMER_LO, 16'd50);
      reg_write(REG_CONFIG, {8'd0, 2'b00, 1'b0, 1'b0, MODE_EXT_TIMED, 1'b0});
      begin
        int open_cnt = 0;
        @(negedge pc_clk); ext_shutter = 1'b1;
        repeat (100) begin @(negedge pc_clk); if (!mpx_shutter) open_cnt++; end
        ext_shutter = 1'b0;
        check(open_cnt == 50, $sformatf("external timed exposure %0d cycles", open_cnt));
        n_ext++;
      end

      if (CHECK_OVERFLOW) begin
        reg_write(REG_CONFIG, 16'h0000);
        reg_write(CMD_START_RD, 16'h0);
        wait_not_busy(4 * WORDS + 1000);
        repeat (4) @(negedge pc_clk);
        check(status[ST_RX_OVF], "receive FIFO overflow reported");
        if (status[ST_RX_OVF]) n_overflow++;
      end

      check(n_reg_wr > 0, "mechanism: register writes");
      check(n_load_pause > 0, "mechanism: load with pauses");
      check(n_refused > 0, "mechanism: refused readout");
      check(n_cont_frames == 3, "mechanism: continuous acquisition");
      check(n_ext > 0, "mechanism: external shutter");
      check(!CHECK_OVERFLOW || n_overflow > 0, "mechanism: receive overflow");
    end
    check(n_load > 0, "mechanism: chain load");
    check(n_readout > 0, "mechanism: chain readout");
    $display("mechanisms: reg_writes=%0d loads=%0d paused_loads=%0d readouts=%0d refused=%0d cont_frames=%0d test_pulses=%0d ext=%0d overflow=%0d",
             n_reg_wr, n_load, n_load_pause, n_readout, n_refused, n_cont_frames, n_test_pulses, n_ext, n_overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

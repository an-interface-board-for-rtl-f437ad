// tb_shutter_test: exercises the five acquisition modes and the test
// pulse train. Counts, sampled between clock edges: cycles with the
// shutter open, separate exposures (openings), readout requests, test
// pulses. Expected values come from the mode definitions: manual and
// external-manual openings last as long as their control input; a timed
// opening lasts exactly TIMER cycles; continuous mode makes FRAMES
// exposures with a readout after each, never opening during a readout;
// with ext_trig each exposure waits for an external edge; a stop write
// aborts; the test pulse train gives ceil(floor(T/H)/2) pulses in an
// exposure of T cycles with half period H.
module tb_shutter_test;
  import muros2_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  config_t cfg;
  logic [31:0] timer = '0;
  logic [15:0] frames = '0, frame_cnt;
  logic sstart = 1'b0, sstop = 1'b0, ext = 1'b0, rdone = 1'b0;
  logic rreq, open, mpx_shutter, busy, tp;
  int checks = 0, failures = 0;
  int open_cycles = 0, openings = 0, reqs = 0, pulses = 0, open_in_readout = 0;
  logic open_q = 1'b0, tp_q = 1'b0;
  bit in_readout = 0;

  shutter_test dut (
    .clk_i(clk), .rst_ni(rst_n), .cfg_i(cfg), .timer_i(timer), .frames_i(frames),
    .shutter_start_i(sstart), .shutter_stop_i(sstop), .ext_shutter_i(ext),
    .readout_done_i(rdone), .readout_req_o(rreq), .shutter_open_o(open),
    .mpx_shutter_o(mpx_shutter), .acq_busy_o(busy), .frame_cnt_o(frame_cnt), .tp_o(tp));

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial #1ns rst_n = 1'b0;   // asynchronous reset needs a falling edge

  initial begin
    #200us;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitors, sampled on the falling edge
  always @(negedge clk) begin
    if (open) open_cycles++;
    if (open && !open_q) openings++;
    if (tp && !tp_q) pulses++;
    if (mpx_shutter == open) begin failures++; $display("FAIL: mpx_shutter not the inverse of open"); end
    if (in_readout && open) open_in_readout++;
    open_q = open;
    tp_q = tp;
  end

  // readout responder: answers each request after 15 cycles
  int done_in = 0;
  always @(negedge clk) begin
    rdone = 1'b0;
    if (done_in > 0) begin
      done_in--;
      if (done_in == 0) begin rdone = 1'b1; in_readout = 0; end
    end
    if (rreq) begin
      reqs++;
      in_readout = 1;
      done_in = 15;
    end
  end

  task automatic clear_counts();
    open_cycles = 0; openings = 0; reqs = 0; pulses = 0; open_in_readout = 0;
  endtask

  task automatic pulse_start();
    @(negedge clk); sstart = 1'b1; @(negedge clk); sstart = 1'b0;
  endtask

  task automatic set_cfg(acq_mode_e m, logic sh, logic tpen, logic et, logic [7:0] half);
    cfg = '0;
    cfg.mode = m; cfg.shutter = sh; cfg.tp_en = tpen; cfg.ext_trig = et;
    cfg.tp_half_period = half;
  endtask

  initial begin
    set_cfg(MODE_MANUAL, 1'b0, 1'b0, 1'b0, 8'd0);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(mpx_shutter && !open && !busy, "closed after reset");

    // 1: manual
    clear_counts();
    @(negedge clk); set_cfg(MODE_MANUAL, 1'b1, 1'b0, 1'b0, 8'd0);
    repeat (20) @(negedge clk);
    set_cfg(MODE_MANUAL, 1'b0, 1'b0, 1'b0, 8'd0);
    repeat (5) @(negedge clk);
    check(open_cycles == 20 && openings == 1, $sformatf("manual: open %0d cycles", open_cycles));

    // 2: timed, then aborted timed
    clear_counts();
    set_cfg(MODE_TIMED, 1'b1, 1'b0, 1'b0, 8'd0);
    timer = 37;
    pulse_start();
    check(busy, "timed: busy");
    repeat (60) @(negedge clk);
    check(open_cycles == 37 && openings == 1, $sformatf("timed: open %0d cycles", open_cycles));
    check(!busy, "timed: idle after exposure");
    clear_counts();
    timer = 100;
    pulse_start();
    repeat (9) @(negedge clk);
    sstop = 1'b1; @(negedge clk); sstop = 1'b0;
    repeat (120) @(negedge clk);
    check(open_cycles == 10, $sformatf("timed abort: open %0d cycles", open_cycles));

    // 3: external manual
    clear_counts();
    set_cfg(MODE_EXT_MANUAL, 1'b0, 1'b0, 1'b0, 8'd0);
    @(negedge clk); ext = 1'b1;
    repeat (25) @(negedge clk); ext = 1'b0;
    repeat (6) @(negedge clk);
    check(open_cycles == 25 && openings == 1, $sformatf("ext manual: open %0d cycles", open_cycles));

    // 4: external timed
    clear_counts();
    set_cfg(MODE_EXT_TIMED, 1'b0, 1'b0, 1'b0, 8'd0);
    timer = 30;
    @(negedge clk); ext = 1'b1;
    repeat (100) @(negedge clk); ext = 1'b0;
    repeat (5) @(negedge clk);
    check(open_cycles == 30 && openings == 1, $sformatf("ext timed: open %0d cycles", open_cycles));

    // 5: continuous, three frames
    clear_counts();
    set_cfg(MODE_CONTINUOUS, 1'b1, 1'b0, 1'b0, 8'd0);
    timer = 20; frames = 3;
    pulse_start();
    wait (!busy);
    repeat (5) @(negedge clk);
    check(openings == 3 && open_cycles == 60, $sformatf("continuous: %0d exposures, %0d cycles", openings, open_cycles));
    check(reqs == 3, $sformatf("continuous: %0d readouts", reqs));
    check(open_in_readout == 0, "continuous: shutter opened during readout");
    check(frame_cnt == 3, "continuous: frame count");

    // 6: continuous with external trigger
    clear_counts();
    set_cfg(MODE_CONTINUOUS, 1'b1, 1'b0, 1'b1, 8'd0);
    frames = 2;
    pulse_start();
    repeat (40) @(negedge clk);
    check(openings == 0, "ext-trig continuous: waits for the trigger");
    ext = 1'b1; repeat (3) @(negedge clk); ext = 1'b0;
    repeat (60) @(negedge clk);
    check(openings == 1 && reqs == 1, "ext-trig continuous: first exposure");
    ext = 1'b1; repeat (3) @(negedge clk); ext = 1'b0;
    repeat (60) @(negedge clk);
    check(openings == 2 && open_cycles == 40 && !busy, "ext-trig continuous: second exposure, done");

    // 7: test pulses in a timed exposure
    clear_counts();
    set_cfg(MODE_TIMED, 1'b1, 1'b1, 1'b0, 8'd4);
    timer = 50;
    pulse_start();
    repeat (70) @(negedge clk);
    check(pulses == ((50 / 4) + 1) / 2, $sformatf("test pulses %0d", pulses));
    check(!tp, "test pulse low when closed");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

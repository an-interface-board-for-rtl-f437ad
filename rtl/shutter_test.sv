// shutter_test: "Shutter & test" - generates the Medipix2 shutter in the
// five acquisition modes of the document and the digital train that
// drives the analog test-pulse switch.
//
// Shutter (document, Section 3.2): high = closed (counters frozen,
// readout allowed), low = open (counting). Modes, from CONFIG.mode:
//   MANUAL      shutter open while CONFIG.shutter is 1;
//   TIMED       a write of CONFIG with shutter=1 opens it for TIMER cycles;
//   EXT_MANUAL  shutter open while the external input is high;
//   EXT_TIMED   a rising edge of the external input opens it for TIMER cycles;
//   CONTINUOUS  FRAMES exposures of TIMER cycles each; after each one a
//               readout is requested (readout_req_o) and the next exposure
//               starts when the readout is done (readout_done_i). The
//               sequence starts with a shutter=1 write; with CONFIG.ext_trig
//               set, each exposure instead waits for a rising edge of the
//               external input.
// A CONFIG write with shutter=0 aborts a timed or continuous acquisition.
// The document does not say which clock the timer counts; here it counts
// PC-clock cycles (the clock of this block). A TIMER or test pulse half
// period of 0 counts as 1. The external input must be synchronous to
// clk_i; in the FPGA the control block synchronizes it.
//
// Test pulses (document, Section 3.3): while CONFIG.tp_en is set and the
// shutter is open, tp_o toggles every tp_half_period cycles, starting low,
// so the chip's counters see one pulse per 2*tp_half_period cycles. Gating
// the train with the shutter is this design's choice.
//
// Timing: mpx_shutter_o and shutter_open_o are registered; a timed
// exposure keeps the shutter open for exactly TIMER clock cycles.
module shutter_test
  import muros2_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  config_t     cfg_i,
  input  logic [31:0] timer_i,
  input  logic [15:0] frames_i,
  input  logic        shutter_start_i,
  input  logic        shutter_stop_i,
  input  logic        ext_shutter_i,   // external shutter control, synchronous to clk_i
  input  logic        readout_done_i,
  output logic        readout_req_o,   // one-cycle pulse
  output logic        shutter_open_o,
  output logic        mpx_shutter_o,   // to the chips: 1 = closed
  output logic        acq_busy_o,
  output logic [15:0] frame_cnt_o,     // exposures completed in this sequence
  output logic        tp_o
);
  typedef enum logic [1:0] {S_IDLE, S_EXPOSE, S_READOUT, S_WAIT_TRIG} state_e;
  state_e      state, state_n;
  logic [31:0] cnt, cnt_n;
  logic [15:0] frames_left, frames_left_n;
  logic [15:0] frame_cnt_n;
  logic        req_n, open_n;

  logic ext_s, ext_q, ext_rise;
  assign ext_s    = ext_shutter_i;
  assign ext_rise = ext_s && !ext_q;

  logic [31:0] timer_len;
  assign timer_len = (timer_i == 0) ? 32'd1 : timer_i;

  always_comb begin
    state_n       = state;
    cnt_n         = cnt;
    frames_left_n = frames_left;
    frame_cnt_n   = frame_cnt_o;
    req_n         = 1'b0;
    open_n        = 1'b0;
    unique case (state)
      S_IDLE: begin
        unique case (cfg_i.mode)
          MODE_MANUAL:     open_n = cfg_i.shutter;
          MODE_EXT_MANUAL: open_n = ext_s;
          MODE_TIMED, MODE_EXT_TIMED: begin
            if ((cfg_i.mode == MODE_TIMED) ? shutter_start_i : ext_rise) begin
              state_n = S_EXPOSE;
              cnt_n   = timer_len;
            end
          end
          MODE_CONTINUOUS: begin
            if (shutter_start_i && frames_i != 0) begin
              frames_left_n = frames_i;
              frame_cnt_n   = '0;
              cnt_n         = timer_len;
              state_n       = cfg_i.ext_trig ? S_WAIT_TRIG : S_EXPOSE;
            end
          end
          default: ;
        endcase
      end
      S_EXPOSE: begin
        open_n = 1'b1;
        cnt_n  = cnt - 32'd1;
        if (cnt == 32'd1) begin
          open_n = 1'b0;
          if (cfg_i.mode == MODE_CONTINUOUS) begin
            state_n     = S_READOUT;
            req_n       = 1'b1;
            frame_cnt_n = frame_cnt_o + 16'd1;
          end else begin
            state_n = S_IDLE;
          end
        end
      end
      S_READOUT: begin
        if (readout_done_i) begin
          frames_left_n = frames_left - 16'd1;
          cnt_n         = timer_len;
          if (frames_left == 16'd1) state_n = S_IDLE;
          else state_n = cfg_i.ext_trig ? S_WAIT_TRIG : S_EXPOSE;
        end
      end
      S_WAIT_TRIG: begin
        if (ext_rise) state_n = S_EXPOSE;
      end
      default: state_n = S_IDLE;
    endcase
    if (shutter_stop_i && state != S_IDLE) begin
      state_n = S_IDLE;
      open_n  = 1'b0;
      req_n   = 1'b0;
    end
    // the exposure's first cycle: open as soon as the state is entered
    if (state != S_EXPOSE && state_n == S_EXPOSE) open_n = 1'b1;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state          <= S_IDLE;
      cnt            <= '0;
      frames_left    <= '0;
      frame_cnt_o    <= '0;
      readout_req_o  <= 1'b0;
      shutter_open_o <= 1'b0;
      mpx_shutter_o  <= 1'b1;
      ext_q          <= 1'b0;
    end else begin
      state          <= state_n;
      cnt            <= cnt_n;
      frames_left    <= frames_left_n;
      frame_cnt_o    <= frame_cnt_n;
      readout_req_o  <= req_n;
      shutter_open_o <= open_n;
      mpx_shutter_o  <= !open_n;
      ext_q          <= ext_s;
    end
  end

  assign acq_busy_o = (state != S_IDLE);

  // ---------------- test pulse train ----------------
  logic [7:0] tp_cnt;
  logic [7:0] tp_half;
  assign tp_half = (cfg_i.tp_half_period == 0) ? 8'd1 : cfg_i.tp_half_period;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      tp_cnt <= '0;
      tp_o   <= 1'b0;
    end else if (cfg_i.tp_en && shutter_open_o) begin
      if (tp_cnt == tp_half - 8'd1) begin
        tp_cnt <= '0;
        tp_o   <= !tp_o;
      end else begin
        tp_cnt <= tp_cnt + 8'd1;
      end
    end else begin
      tp_cnt <= '0;
      tp_o   <= 1'b0;
    end
  end
endmodule

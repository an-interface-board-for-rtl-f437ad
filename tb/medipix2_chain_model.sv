// medipix2_chain_model: behavioural model of the serial port of a daisy
// chain of Medipix2 chips, for testbenches only (not synthesizable).
//
// Only what the FPGA sees is modelled: NCHIPS chips of BITS bits each,
// taking turns by a token. All actions happen on the falling edge of
// clk_in (the middle of a bit sent on the rising edge).
//   READ mode (mode_i = 0): while token_in is high, the chip holding the
//     token drives its BITS counter bits (pixel_word(), MSB first) on
//     data_out, one per clock, then hands the token on; after the last
//     chip, token_out goes high. clk_out is clk_in gated so that it runs
//     only while a bit is being driven; its rising edge is mid-bit.
//     token_in low re-arms the chain.
//   LOAD mode (mode_i = 1): on each clock with token_in high, the chip
//     holding the token takes one bit of data_in (MSB first) and stores
//     whole words in loaded[]; token_in low pauses the transfer. After
//     NCHIPS*BITS bits, token_out goes high and stays high.
// A change of mode_i or a high reset_i (a chip control line) re-arms the
// chain.
module medipix2_chain_model
  import tb_mpx_pkg::*;
#(
  parameter int unsigned NCHIPS = 1,
  parameter int unsigned BITS   = 851968
) (
  input  logic       clk_in,
  input  logic       data_in,
  input  logic       token_in,
  input  logic [1:0] mode_i,
  input  logic       reset_i,
  output logic       clk_out,
  output logic       data_out,
  output logic       token_out
);
  localparam int unsigned WORDS = NCHIPS * BITS / 16;

  logic [15:0] loaded [WORDS];
  int unsigned words_loaded;
  int unsigned h, idx;        // token holder, bit index within the chip
  logic        out_active;
  logic [1:0]  mode_q;
  logic [15:0] sh, w;

  initial begin
    h = 0; idx = 0; out_active = 1'b0; data_out = 1'b0; token_out = 1'b0;
    mode_q = 2'd0; words_loaded = 0; sh = '0;
    for (int unsigned i = 0; i < WORDS; i++) loaded[i] = '0;
  end

  assign clk_out = clk_in & out_active;

  always @(negedge clk_in) begin
    if (mode_i != mode_q || reset_i) begin
      mode_q = mode_i; h = 0; idx = 0;
      token_out  <= 1'b0;
      out_active <= 1'b0;
    end else if (mode_i == MPX_MODE_READ) begin
      if (!token_in) begin
        h = 0; idx = 0;
        token_out  <= 1'b0;
        out_active <= 1'b0;
      end else if (h < NCHIPS) begin
        w = pixel_word(h, idx / 16);
        data_out   <= w[15 - (idx % 16)];
        out_active <= 1'b1;
        if (idx == BITS - 1) begin idx = 0; h++; end
        else idx++;
      end else begin
        out_active <= 1'b0;
        token_out  <= 1'b1;
      end
    end else if (mode_i == MPX_MODE_LOAD) begin
      if (token_in && h < NCHIPS) begin
        sh = {sh[14:0], data_in};
        if (idx % 16 == 15) begin
          loaded[(h * BITS + idx) / 16] = sh;
          words_loaded++;
        end
        if (idx == BITS - 1) begin idx = 0; h++; end
        else idx++;
        if (h == NCHIPS) token_out <= 1'b1;
      end
    end
  end
endmodule

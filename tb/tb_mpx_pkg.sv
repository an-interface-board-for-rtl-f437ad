// tb_mpx_pkg: constants and reference data shared by the testbenches.
// pixel_word() defines the counter contents the Medipix2 chain model
// shifts out, so that testbenches can compute the expected words on their
// own; mode codes are the values of the two chip operation-mode lines
// (MPX_CTRL[1:0]) and the chain reset line (MPX_CTRL[2]) the chain model
// understands.
package tb_mpx_pkg;
  localparam logic [1:0] MPX_MODE_READ = 2'd0;  // shift the pixel counters out
  localparam logic [1:0] MPX_MODE_LOAD = 2'd1;  // shift configuration bits in
  localparam int unsigned MPX_RESET_BIT = 2;     // MPX_CTRL bit that re-arms the chain

  // Word k (0-based, 16 bits, first bit is the MSB) of chip c's counter data.
  function automatic logic [15:0] pixel_word(int unsigned c, int unsigned k);
    logic [31:0] x;
    x = (k * 32'h9E37_79B1) ^ ((c + 1) * 32'h85EB_CA6B);
    x = x ^ (x >> 15);
    return x[15:0];
  endfunction

  // Configuration word k sent to the chain in the tests.
  function automatic logic [15:0] config_word(int unsigned k);
    logic [31:0] x;
    x = (k + 7) * 32'hC2B2_AE35;
    return x[31:16] ^ x[15:0];
  endfunction
endpackage

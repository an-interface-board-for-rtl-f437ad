// tb_muros2_movie: the complete end-to-end scenario of muros2_system_tb
// (registers, loads with and without pauses, readout, refused readout,
// three-frame continuous acquisition, test pulses, external shutter) with
// a full chipboard - eight Medipix2 chips of 851968 bits each - and
// muros2_fpga at its default parameters. Each continuous-mode frame moves
// 6.8 Mbit through the 512-word FIFOs while the PC only reads.
// The harness has its own watchdog (2 s of simulated time here); a
// backstop at 2.5 s ends the run should that one ever fail to.
module tb_muros2_movie;
  muros2_system_tb #(
    .NCHIPS(8), .BITS(851968), .USE_DEFAULTS(1'b1), .RX_DEPTH(512),
    .CHECK_OVERFLOW(1'b0), .FULL_OPERATION(1'b0), .WATCHDOG_NS(64'd2_000_000_000)
  ) u_tb ();

  initial begin
    #2.5s;
    $display("backstop watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end
endmodule

// tb_muros2_full: one complete load and readout of a full chain - eight
// Medipix2 chips of 851968 bits each - through muros2_fpga at its default
// parameters (512-word FIFOs), at 160 Mbit/s on the serial link and 16-bit
// words at 10 MHz on the PC side. Checks every configuration bit the
// chips receive, every counter word the PC reads, and that the readout
// keeps pace with the serial clock. See muros2_system_tb.
module tb_muros2_full;
  muros2_system_tb #(
    .NCHIPS(8), .BITS(851968), .USE_DEFAULTS(1'b1), .RX_DEPTH(512),
    .CHECK_OVERFLOW(1'b0), .FULL_OPERATION(1'b1), .WATCHDOG_NS(64'd200_000_000)
  ) u_tb ();
endmodule

// tb_muros2_fpga: end-to-end test of the FPGA at reduced sizes: a chain
// of two chips of 512 bits each and a 16-word receive FIFO (so that an
// unread readout overflows it). See muros2_system_tb for the scenario.
module tb_muros2_fpga;
  muros2_system_tb #(
    .NCHIPS(2), .BITS(512), .USE_DEFAULTS(1'b0), .RX_DEPTH(16),
    .CHECK_OVERFLOW(1'b1), .FULL_OPERATION(1'b0), .WATCHDOG_NS(64'd5_000_000)
  ) u_tb ();
endmodule

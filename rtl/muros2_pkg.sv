// muros2_pkg: types and constants shared by the MUROS2 FPGA blocks.
//
// The FPGA has a bank of 12 sixteen-bit registers written and read by the
// PC (one of them, VERSION, read-only), a 16-bit data bus and 16 control
// lines. The document fixes the number of registers, their purpose (data
// converters, acquisition modes, Medipix2 operation mode, extra I/O,
// version) and the five shutter modes. Addresses, bit positions, the
// command codes and the split of the control lines are this design's own
// choice and are collected here so that they can be changed in one place.
package muros2_pkg;

  localparam int unsigned DATA_W  = 16;  // PC data bus width
  localparam int unsigned NUM_REGS = 12; // register bank size
  localparam int unsigned ADDR_W  = 4;

  // Register addresses (0..11). Addresses 12..15 are commands, not storage.
  typedef enum logic [ADDR_W-1:0] {
    REG_CONFIG    = 4'd0,  // shutter bit, acquisition mode, test pulse
    REG_TIMER_LO  = 4'd1,  // exposure length in PC-clock cycles, bits 15:0
    REG_TIMER_HI  = 4'd2,  // exposure length, bits 31:16
    REG_FRAMES    = 4'd3,  // number of exposures in continuous mode
    REG_MPX_CTRL  = 4'd4,  // Medipix2 operation-mode lines
    REG_DAC_BIAS  = 4'd5,  // detector bias DAC code
    REG_DAC_EXT   = 4'd6,  // external DAC code
    REG_DAC_TP_HI = 4'd7,  // test pulse high level DAC code
    REG_DAC_TP_LO = 4'd8,  // test pulse low level DAC code
    REG_ADC       = 4'd9,  // last ADC result (also writable)
    REG_EXTRA_IO  = 4'd10, // extra I/O output lines
    REG_VERSION   = 4'd11, // read-only firmware version
    CMD_START_WR  = 4'd12, // start loading the chips (serializer -> chips)
    CMD_START_RD  = 4'd13, // start reading the chips (chips -> deserializer)
    CMD_ABORT     = 4'd14, // abandon a transfer and release the token
    CMD_NONE      = 4'd15
  } addr_e;

  localparam logic [DATA_W-1:0] VERSION = 16'h0201;

  // Shutter acquisition modes, CONFIG[3:1].
  typedef enum logic [2:0] {
    MODE_MANUAL     = 3'd0, // shutter follows CONFIG.SHUTTER
    MODE_TIMED      = 3'd1, // writing SHUTTER=1 opens it for TIMER cycles
    MODE_EXT_MANUAL = 3'd2, // shutter follows the external input
    MODE_EXT_TIMED  = 3'd3, // external rising edge opens it for TIMER cycles
    MODE_CONTINUOUS = 3'd4  // FRAMES timed exposures, each followed by readout
  } acq_mode_e;

  // CONFIG register layout.
  typedef struct packed {
    logic [7:0] tp_half_period; // [15:8] test pulse half period, PC-clock cycles
    logic [1:0] reserved;       // [7:6]
    logic       ext_trig;       // [5] continuous mode: external signal starts each exposure
    logic       tp_en;          // [4] test pulse train enable
    acq_mode_e  mode;           // [3:1]
    logic       shutter;        // [0] shutter bit (1 = open / start)
  } config_t;

  // Register contents the rest of the FPGA uses.
  typedef struct packed {
    config_t     cfg;
    logic [31:0] timer;
    logic [15:0] frames;
    logic [15:0] mpx_ctrl;
    logic [15:0] dac_bias;
    logic [15:0] dac_ext;
    logic [15:0] dac_tp_hi;
    logic [15:0] dac_tp_lo;
    logic [15:0] extra_io;
  } regs_t;

  // The 16 PC control lines: bits 7:0 are driven by the PC, bits 15:8 by
  // the board (status). Positions inside each byte:
  localparam int unsigned CTL_ADDR_LSB = 0; // [3:0] register address / command
  localparam int unsigned CTL_REG_WR   = 4; // rising edge: write data to address
  localparam int unsigned CTL_REG_RD   = 5; // level: drive register[address] on data bus
  localparam int unsigned CTL_TX_WR    = 6; // level: one data word per PC clock into TX FIFO
  localparam int unsigned CTL_RX_RD    = 7; // level: one data word per PC clock out of RX FIFO

  localparam int unsigned ST_RX_VALID  = 0; // data bus holds a fresh chip word
  localparam int unsigned ST_RX_EMPTY  = 1;
  localparam int unsigned ST_TX_FULL   = 2;
  localparam int unsigned ST_BUSY      = 3; // chip transfer in progress
  localparam int unsigned ST_SHUTTER   = 4; // shutter open
  localparam int unsigned ST_RX_OVF    = 5; // RX FIFO overflowed (sticky)
  localparam int unsigned ST_TX_OVF    = 6; // write to full TX FIFO (sticky)
  localparam int unsigned ST_ACQ       = 7; // acquisition sequence running

  // Route chosen by the control block for the data bus.
  typedef enum logic [1:0] {
    BUS_IDLE = 2'd0,
    BUS_REG  = 2'd1,  // register read on the bus
    BUS_RX   = 2'd2   // chip data on the bus
  } bus_sel_e;

endpackage

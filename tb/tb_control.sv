// tb_control: drives the PC control lines as the PC card would (address
// set up, then the write strobe raised for several clocks) and plays the
// Medipix2 token output. Checks: one register write per strobe, at the
// strobe's address, and none for command addresses; START_WR holds the
// load mode until the token returns; START_RD holds the readout token
// until it returns and then pulses readout_done once; commands are
// ignored while the shutter is open; a readout request from the shutter
// block waits for the previous token to clear; ABORT ends a readout
// without readout_done; the streaming lines become FIFO push/pop (no pop
// from an empty FIFO) and the status lines report the block's state.
module tb_control;
  import muros2_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [7:0] ctl = '0, status;
  logic reg_we, tx_push, rx_pop, wr_mode, rd_token, rdone, busy;
  logic [3:0] reg_addr;
  bus_sel_e bus_sel;
  logic tx_full = 1'b0, tx_ovf = 1'b0, rx_empty = 1'b1, rx_ovf = 1'b0;
  logic tok = 1'b0, sh_open = 1'b0, acq = 1'b0, rreq = 1'b0, ext = 1'b0, ext_s;
  int checks = 0, failures = 0;
  int we_count = 0, done_count = 0, pops = 0;
  logic [3:0] last_addr;

  control dut (
    .clk_i(clk), .rst_ni(rst_n), .pc_ctrl_i(ctl), .pc_status_o(status),
    .reg_we_o(reg_we), .reg_addr_o(reg_addr), .bus_sel_o(bus_sel),
    .tx_push_o(tx_push), .rx_pop_o(rx_pop), .tx_full_i(tx_full),
    .tx_overflow_i(tx_ovf), .rx_empty_i(rx_empty), .rx_overflow_i(rx_ovf),
    .token_out_i(tok), .wr_mode_o(wr_mode), .rd_token_o(rd_token),
    .shutter_open_i(sh_open), .acq_busy_i(acq), .readout_req_i(rreq),
    .readout_done_o(rdone), .ext_shutter_i(ext), .ext_shutter_o(ext_s), .busy_o(busy));

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

  always @(negedge clk) begin
    if (reg_we) begin we_count++; last_addr = reg_addr; end
    if (rdone) done_count++;
    if (rx_pop) pops++;
    if (rx_pop && rx_empty) begin failures++; $display("FAIL: pop from empty FIFO"); end
  end

  task automatic strobe(input logic [3:0] a);
    @(negedge clk); ctl[3:0] = a;
    @(negedge clk); ctl[CTL_REG_WR] = 1'b1;
    repeat (4) @(negedge clk); ctl[CTL_REG_WR] = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(!busy && !wr_mode && !rd_token, "idle after reset");

    // register writes
    strobe(4'd5);
    check(we_count == 1 && last_addr == 4'd5, "one write to register 5");
    strobe(4'd11);
    check(we_count == 2 && last_addr == 4'd11, "write strobe to 11 passed on (bank ignores it)");
    strobe(CMD_NONE);
    check(we_count == 2, "no register write for a command address");

    // load transfer
    strobe(CMD_START_WR);
    check(wr_mode && !rd_token && busy, "load mode after START_WR");
    check(status[ST_BUSY], "BUSY status");
    repeat (10) @(negedge clk);
    tok = 1'b1;
    repeat (4) @(negedge clk);
    check(!wr_mode && !busy, "load ends when the token returns");
    check(done_count == 0, "no readout_done after a load");
    tok = 1'b0;
    repeat (4) @(negedge clk);

    // readout refused while the shutter is open
    sh_open = 1'b1;
    strobe(CMD_START_RD);
    check(!rd_token && !busy, "START_RD ignored with shutter open");
    check(status[ST_SHUTTER], "SHUTTER status");
    sh_open = 1'b0;

    // readout
    strobe(CMD_START_RD);
    check(rd_token && busy, "token raised after START_RD");
    repeat (20) @(negedge clk);
    check(rd_token, "token held");
    tok = 1'b1;
    repeat (4) @(negedge clk);
    check(!rd_token && done_count == 1, "readout ends with one readout_done");

    // a readout request while the token output is still high waits
    @(negedge clk); rreq = 1'b1; @(negedge clk); rreq = 1'b0;
    repeat (5) @(negedge clk);
    check(!rd_token, "request waits for the token to clear");
    tok = 1'b0;
    repeat (4) @(negedge clk);
    check(rd_token, "pending request starts the readout");
    strobe(CMD_ABORT);
    check(!rd_token && !busy && done_count == 1, "abort ends readout without readout_done");

    // streaming lines
    @(negedge clk); ctl[CTL_TX_WR] = 1'b1;
    repeat (2) @(negedge clk);
    check(tx_push, "TX_WR becomes push after the synchronizer");
    ctl[CTL_TX_WR] = 1'b0;
    repeat (3) @(negedge clk);
    check(!tx_push, "push released");
    ctl[CTL_RX_RD] = 1'b1;
    rx_empty = 1'b1;
    repeat (5) @(negedge clk);
    check(pops == 0 && bus_sel == BUS_RX, "no pop while empty, RX route");
    rx_empty = 1'b0;
    repeat (6) @(negedge clk);
    check(pops == 6, $sformatf("one pop per clock: %0d", pops));
    check(status[ST_RX_VALID], "RX_VALID status");
    ctl[CTL_RX_RD] = 1'b0; ctl[CTL_REG_RD] = 1'b1;
    repeat (3) @(negedge clk);
    check(bus_sel == BUS_REG, "register route");
    ctl[CTL_REG_RD] = 1'b0;
    rx_ovf = 1'b1; tx_full = 1'b1; acq = 1'b1;
    repeat (4) @(negedge clk);
    check(status[ST_RX_OVF] && status[ST_TX_FULL] && status[ST_ACQ] && !status[ST_RX_EMPTY],
          "status lines");
    // external shutter control: passed on after the two-flop synchronizer
    @(negedge clk); ext = 1'b1;
    @(negedge clk); check(!ext_s, "external shutter not yet through");
    @(negedge clk); check(ext_s, "external shutter after two clocks");
    ext = 1'b0;
    repeat (2) @(negedge clk); check(!ext_s, "external shutter released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

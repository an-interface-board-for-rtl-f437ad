// tb_tx_serializer: the PC side (clock = 16 serial clocks) pushes words
// while the load mode is on; the chip side samples data and token on the
// falling edge of the serial clock, as the chips do. Checks: every word
// comes out MSB first, token high exactly on the bits sent (16 per word);
// once the stream has started, back-to-back pushes at the PC rate leave no
// gap (same data rate on both links); with pushes spaced out the token
// pauses; a readout token request drives the token continuously; pushing
// into a full FIFO sets the overflow flag.
module tb_tx_serializer;
  localparam int DEPTH = 16;
  logic rst_n = 1'b1, clk_ser = 1'b0, pc_clk = 1'b0;
  logic push = 1'b0, wr_mode = 1'b0, rd_token = 1'b0;
  logic [15:0] wdata = '0;
  logic full, ovf, mpx_data, mpx_token, idle;
  int checks = 0, failures = 0;
  logic [15:0] sent[$];
  int nbits = 0, gaps = 0, token_cycles = 0;
  logic [15:0] sh;
  bit started = 0, count_gaps = 0;

  tx_serializer #(.DEPTH(DEPTH)) dut (
    .rst_ni(rst_n), .pc_clk_i(pc_clk), .push_i(push), .wdata_i(wdata),
    .full_o(full), .overflow_o(ovf), .clk_ser_i(clk_ser),
    .wr_mode_i(wr_mode), .rd_token_i(rd_token),
    .mpx_data_o(mpx_data), .mpx_token_o(mpx_token), .idle_o(idle));

  always #5ns clk_ser = ~clk_ser;
  // PC clock: rising edge on every 8th serial rising edge, i.e. 16x slower
  initial forever begin repeat (8) @(posedge clk_ser); pc_clk = ~pc_clk; end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial #1ns rst_n = 1'b0;   // asynchronous reset needs a falling edge

  initial begin
    #500us;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // chip side
  always @(negedge clk_ser) begin
    if (mpx_token) begin
      token_cycles++;
      if (wr_mode) begin
        started = 1;
        sh = {sh[14:0], mpx_data};
        nbits++;
        if (nbits % 16 == 0) begin
          logic [15:0] e;
          e = sent.pop_front();
          check(sh == e, $sformatf("word %0d: got %h expected %h", nbits / 16, sh, e));
        end
      end
    end else if (started && count_gaps && sent.size() != 0) begin
      gaps++;
    end
  end

  task automatic push_words(input int n, input int spacing);
    for (int i = 0; i < n; i++) begin
      @(negedge pc_clk);
      push = 1'b1; wdata = 16'($urandom);
      sent.push_back(wdata);
      if (spacing > 0) begin
        @(negedge pc_clk); push = 1'b0;
        repeat (spacing - 1) @(negedge pc_clk);
      end
    end
    @(negedge pc_clk); push = 1'b0;
  endtask

  initial begin
    int pauses_before;
    repeat (4) @(posedge pc_clk);
    rst_n = 1'b1;
    repeat (2) @(posedge pc_clk);
    // 1: back-to-back stream in load mode
    wr_mode = 1'b1;
    count_gaps = 1;
    push_words(40, 0);
    wait (sent.size() == 0);
    repeat (3) @(posedge pc_clk);
    check(nbits == 40 * 16, $sformatf("bits sent %0d", nbits));
    check(token_cycles == 40 * 16, $sformatf("token cycles %0d", token_cycles));
    check(gaps == 0, $sformatf("gaps in back-to-back stream: %0d", gaps));
    check(idle, "idle after stream");
    // 2: spaced pushes: the token must pause between words
    count_gaps = 0;
    gaps = 0;
    pauses_before = token_cycles;
    push_words(6, 3);
    wait (sent.size() == 0);
    repeat (3) @(posedge pc_clk);
    check(nbits == 46 * 16, "bits after spaced words");
    check(token_cycles - pauses_before == 6 * 16, "token only on valid bits");
    wr_mode = 1'b0;
    // 3: readout token request
    repeat (2) @(posedge pc_clk);
    rd_token = 1'b1;
    repeat (4) @(posedge pc_clk);
    begin
      int hi = 0;
      for (int i = 0; i < 32; i++) begin @(negedge clk_ser); if (mpx_token) hi++; end
      check(hi == 32, "token held during readout request");
    end
    rd_token = 1'b0;
    repeat (2) @(posedge pc_clk);
    @(negedge clk_ser);
    check(!mpx_token, "token released");
    // 4: overflow: fill without load mode
    push_words(DEPTH + 2, 0);
    repeat (3) @(posedge pc_clk);
    check(full, "full");
    check(ovf, "overflow flag");
    sent.delete();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

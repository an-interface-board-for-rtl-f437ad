// tb_rx_deserializer: the chip side drives bits on the falling edge of a
// clock that runs only while data are valid (with random stops in
// between), as the chain's clock out does; the PC side pops words on its
// own clock. Checks: every 16 bits give one word, MSB first, in order;
// a partial word is held until its remaining bits arrive; the PC clock
// reads them regardless of the stops; if the PC does not read, the FIFO
// fills and the overflow flag is set.
module tb_rx_deserializer;
  localparam int DEPTH = 8;
  logic rst_n = 1'b1, pc_clk = 1'b0, rx_en = 1'b0, ser = 1'b0;
  logic clk_rx, mpx_data = 1'b0, pop = 1'b0;
  logic [15:0] rdata;
  logic empty, ovf;
  int checks = 0, failures = 0;
  logic [15:0] sent[$];
  int nread = 0;
  bit reading = 1;

  rx_deserializer #(.DEPTH(DEPTH)) dut (
    .rst_ni(rst_n), .clk_rx_i(clk_rx), .mpx_data_i(mpx_data), .overflow_o(ovf),
    .pc_clk_i(pc_clk), .pop_i(pop), .rdata_o(rdata), .empty_o(empty));

  always #5ns ser = ~ser;
  always #40ns pc_clk = ~pc_clk;
  assign clk_rx = ser & rx_en;

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

  always @(negedge pc_clk) begin
    pop = reading;
    if (pop && !empty) begin
      logic [15:0] e;
      e = sent.pop_front();
      check(rdata == e, $sformatf("word %0d: got %h expected %h", nread, rdata, e));
      nread++;
    end
  end

  // send n words; the clock stops for a random time between random bits
  task automatic send_words(input int n, input bit stops);
    for (int w = 0; w < n; w++) begin
      logic [15:0] v;
      v = 16'($urandom);
      sent.push_back(v);
      for (int b = 15; b >= 0; b--) begin
        @(negedge ser);
        mpx_data = v[b];
        rx_en = 1'b1;
        if (stops && $urandom_range(0, 9) == 0) begin
          @(negedge ser); rx_en = 1'b0;   // this bit is taken on the rising edge before
          repeat ($urandom_range(1, 30)) @(negedge ser);
        end
      end
    end
    @(negedge ser); rx_en = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge pc_clk);
    rst_n = 1'b1;
    repeat (2) @(posedge pc_clk);
    send_words(50, 1'b0);
    send_words(50, 1'b1);
    repeat (10) @(posedge pc_clk);
    check(nread == 100, $sformatf("words read %0d", nread));
    check(empty, "empty at end");
    check(!ovf, "no overflow while reading");
    // a partial word stays inside until completed
    reading = 0;
    begin
      logic [15:0] v;
      v = 16'hA5C3;
      sent.push_back(v);
      for (int b = 15; b >= 8; b--) begin @(negedge ser); mpx_data = v[b]; rx_en = 1'b1; end
      @(negedge ser); rx_en = 1'b0;
      repeat (10) @(posedge pc_clk);
      check(empty, "half word not pushed");
      for (int b = 7; b >= 0; b--) begin @(negedge ser); mpx_data = v[b]; rx_en = 1'b1; end
      @(negedge ser); rx_en = 1'b0;
      repeat (10) @(posedge pc_clk);
      check(!empty, "completed word pushed");
    end
    // overflow: keep sending without reading
    send_words(DEPTH + 4, 1'b0);
    repeat (4) @(posedge pc_clk);
    check(ovf, "overflow flag set");
    reading = 1;
    wait (empty);
    repeat (4) @(posedge pc_clk);
    check(nread == 101 + DEPTH - 1, $sformatf("words kept %0d", nread - 100));
    sent.delete();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

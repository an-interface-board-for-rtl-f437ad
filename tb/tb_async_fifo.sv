// tb_async_fifo: drives the dual-clock FIFO with unrelated write (7 ns)
// and read (11 ns) clocks. Phase 1 fills it without reading: exactly
// DEPTH words must be accepted before full, and one more push must set the
// overflow flag. Phase 2 drains it and checks order and empty. Phase 3
// streams 400 random words with random enables on both sides and compares
// every word read against a reference queue.
module tb_async_fifo;
  localparam int DEPTH = 16;
  logic rst_n = 1'b1, wclk = 1'b0, rclk = 1'b0;
  logic wen = 1'b0, ren = 1'b0;
  logic [15:0] wdata = '0, rdata;
  logic wfull, wovf, rempty;
  int checks = 0, failures = 0;
  logic [15:0] q[$];

  async_fifo #(.WIDTH(16), .DEPTH(DEPTH)) dut (
    .rst_ni(rst_n), .wclk_i(wclk), .wen_i(wen), .wdata_i(wdata),
    .wfull_o(wfull), .woverflow_o(wovf),
    .rclk_i(rclk), .ren_i(ren), .rdata_o(rdata), .rempty_o(rempty));

  always #3.5ns wclk = ~wclk;
  always #5.5ns rclk = ~rclk;

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

  // reader: pops on random cycles in phase 3, compares with the queue
  bit random_read = 0;
  int nread = 0;
  bit drain = 0;
  // decisions are made on the falling edge; the pop happens on the next rising edge
  always @(negedge rclk) begin
    ren = random_read ? ($urandom_range(0, 2) != 0) : drain;
    if (ren && !rempty) begin
      logic [15:0] e;
      e = q.pop_front();
      check(rdata == e, $sformatf("read %h expected %h", rdata, e));
      nread++;
    end
  end

  initial begin
    int accepted;
    repeat (4) @(posedge wclk);
    rst_n = 1'b1;
    repeat (4) @(posedge wclk);
    check(rempty && !wfull && !wovf, "state after reset");
    // phase 1: fill
    accepted = 0;
    for (int i = 0; i < DEPTH + 4; i++) begin
      @(negedge wclk);
      wen = 1'b1; wdata = 16'(i * 3 + 1);
      if (!wfull) begin accepted++; q.push_back(wdata); end
    end
    @(negedge wclk); wen = 1'b0;
    check(accepted == DEPTH, $sformatf("accepted %0d words, expected %0d", accepted, DEPTH));
    check(wfull, "full after filling");
    check(wovf, "overflow flag after push into full FIFO");
    // phase 2: drain
    repeat (4) @(posedge rclk);
    drain = 1;
    wait (q.size() == 0);
    @(negedge rclk); drain = 0;
    repeat (2) @(posedge rclk);
    check(rempty, "empty after draining");
    check(nread == DEPTH, "read count after draining");
    // phase 3: random streaming
    random_read = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge wclk);
      wen = 1'b0;
      if ($urandom_range(0, 3) != 0 && !wfull) begin
        wen = 1'b1; wdata = 16'($urandom);
        q.push_back(wdata);
      end
    end
    @(negedge wclk); wen = 1'b0;
    wait (q.size() == 0);
    repeat (4) @(posedge rclk);
    check(rempty, "empty at end");
    check(nread - DEPTH > 150, $sformatf("words streamed %0d", nread - DEPTH));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// async_fifo: dual-clock FIFO, the decoupling buffer of the serializer and
// of the deserializer.
//
// The document says only that each of the two serial blocks holds a FIFO
// between the PC side and the Medipix2 side and that its depth is set when
// the FPGA is programmed; the structure is this design's choice: a
// standard Gray-code pointer FIFO with binary pointers one bit wider than
// the address, so that full and empty are told apart.
//
// Interface: write side (wclk_i) pushes wdata_i when wen_i and not
// wfull_o; a push while full is dropped and sets the sticky woverflow_o.
// Read side (rclk_i) is first-word-fall-through: rdata_o shows the oldest
// word whenever rempty_o is low, and ren_i pops it. Timing: a word pushed
// becomes visible to the reader after two to three rclk_i edges (pointer
// synchronizer); freed space is seen by the writer after two to three
// wclk_i edges. DEPTH must be a power of two. Reset is asynchronous and
// common to both sides, because the write clock of the receive FIFO (the
// chip's clock out) may be stopped while reset is applied.
module async_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 512
) (
  input  logic             rst_ni,
  // write side
  input  logic             wclk_i,
  input  logic             wen_i,
  input  logic [WIDTH-1:0] wdata_i,
  output logic             wfull_o,
  output logic             woverflow_o,
  // read side
  input  logic             rclk_i,
  input  logic             ren_i,
  output logic [WIDTH-1:0] rdata_o,
  output logic             rempty_o
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w, wgray_r; // pointers seen in the other domain

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write side ----------------
  logic [AW:0] wbin_next;
  logic        wpush;
  assign wpush     = wen_i && !wfull_o;
  assign wbin_next = wbin + (AW+1)'(wpush);

  always_ff @(posedge wclk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      wbin        <= '0;
      wgray       <= '0;
      wfull_o     <= 1'b0;
      woverflow_o <= 1'b0;
    end else begin
      wbin    <= wbin_next;
      wgray   <= bin2gray(wbin_next);
      // full: next write pointer equals read pointer with the top two Gray bits inverted
      wfull_o <= (bin2gray(wbin_next) == {~rgray_w[AW:AW-1], rgray_w[AW-2:0]});
      if (wen_i && wfull_o) woverflow_o <= 1'b1;
    end
  end

  always_ff @(posedge wclk_i) begin
    if (wpush) mem[wbin[AW-1:0]] <= wdata_i;
  end

  sync_2ff #(.WIDTH(AW+1)) u_sync_r2w (
    .clk_i(wclk_i), .rst_ni(rst_ni), .d_i(rgray), .q_o(rgray_w));

  // ---------------- read side ----------------
  logic [AW:0] rbin_next;
  logic        rpop;
  assign rpop      = ren_i && !rempty_o;
  assign rbin_next = rbin + (AW+1)'(rpop);

  always_ff @(posedge rclk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rbin     <= '0;
      rgray    <= '0;
      rempty_o <= 1'b1;
    end else begin
      rbin     <= rbin_next;
      rgray    <= bin2gray(rbin_next);
      rempty_o <= (bin2gray(rbin_next) == wgray_r);
    end
  end

  assign rdata_o = mem[rbin[AW-1:0]];

  sync_2ff #(.WIDTH(AW+1)) u_sync_w2r (
    .clk_i(rclk_i), .rst_ni(rst_ni), .d_i(wgray), .q_o(wgray_r));

  initial begin
    assert (DEPTH >= 4 && (1 << AW) == DEPTH)
      else $error("async_fifo: DEPTH must be a power of two >= 4");
  end
endmodule

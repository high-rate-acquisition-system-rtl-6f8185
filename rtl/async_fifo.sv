// Dual-clock FIFO with Gray-coded pointers (first-word fall-through).
//
// Write and read sides run on independent clocks. Each side keeps a binary
// pointer one bit wider than the address and its Gray-coded copy; the Gray
// pointer crosses to the other side through two flip-flops, so at most one
// bit changes per crossing. full compares the write pointer with the
// synchronised read pointer (top two Gray bits inverted), empty compares the
// read pointer with the synchronised write pointer. Both flags are
// conservative: a write becomes visible to the reader two to three read
// clocks after it, and freed space to the writer likewise.
// Write: wdata is stored on a wclk edge with wr_en high and full low (a write
// while full is ignored). Read: rdata always shows the oldest word while empty
// is low; a rclk edge with rd_en high and empty low removes it. The memory is
// a plain array with a registered write and an asynchronous read.
// wrst and rrst are synchronous to their own clocks and should be applied
// together. DEPTH must be a power of two.
module async_fifo #(
  parameter int unsigned W     = 12,
  parameter int unsigned DEPTH = 1024
) (
  input  logic         wclk,
  input  logic         wrst,
  input  logic         wr_en,
  input  logic [W-1:0] wdata,
  output logic         full,
  input  logic         rclk,
  input  logic         rrst,
  input  logic         rd_en,
  output logic [W-1:0] rdata,
  output logic         empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;  // read pointer in the write domain
  logic [AW:0] wgray_r1, wgray_r2;  // write pointer in the read domain
  logic [AW:0] wbin_nxt, rbin_nxt;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---- write side ----
  assign full     = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wbin_nxt = wbin + (AW+1)'(wr_en && !full);

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_nxt;
      wgray    <= bin2gray(wbin_nxt);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  // ---- read side ----
  assign empty    = (rgray == wgray_r2);
  assign rbin_nxt = rbin + (AW+1)'(rd_en && !empty);
  assign rdata    = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_nxt;
      rgray    <= bin2gray(rbin_nxt);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end
endmodule

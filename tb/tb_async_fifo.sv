// Self-checking testbench for async_fifo (W=12, DEPTH=16) with unrelated
// write (10 ns) and read (7.3 ns) clocks.
//  1. Random writes and reads: every word read must be the oldest one written
//     (scoreboard queue), and nothing may be lost or duplicated.
//  2. Reader stopped: exactly DEPTH writes are accepted before full rises.
//  3. Reader restarted: the DEPTH words come out in order, then empty rises.
`timescale 1ps/1ps
module tb_async_fifo;
  localparam int W = 12, DEPTH = 16;
  logic wclk = 1'b0, rclk = 1'b0, wrst, rrst;
  logic wr_en, rd_en, full, empty;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] sb [$];
  int checks = 0, failures = 0;
  int n_written = 0, n_read = 0;
  bit reading = 1'b1, writing = 1'b1;

  async_fifo #(.W(W), .DEPTH(DEPTH)) dut (
    .wclk(wclk), .wrst(wrst), .wr_en(wr_en), .wdata(wdata), .full(full),
    .rclk(rclk), .rrst(rrst), .rd_en(rd_en), .rdata(rdata), .empty(empty));

  always #5000 wclk = ~wclk;
  always #3650 rclk = ~rclk;

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // write side
  always @(posedge wclk) begin
    if (!wrst && wr_en && !full) begin
      sb.push_back(wdata);
      n_written++;
    end
    #1;
    wr_en <= writing && ($urandom_range(0, 3) != 0);
    wdata <= W'($urandom);
  end

  // read side
  always @(posedge rclk) begin
    if (!rrst && rd_en && !empty) begin
      checks++;
      if (sb.size() == 0) begin
        failures++; $display("read from a FIFO the scoreboard thinks is empty");
      end else begin
        logic [W-1:0] e;
        e = sb.pop_front();
        if (rdata !== e) begin failures++; $display("read %h expected %h", rdata, e); end
      end
      n_read++;
    end
    #1;
    rd_en <= reading && ($urandom_range(0, 2) != 0);
  end

  initial begin
    int acc;
    wr_en = 1'b0; rd_en = 1'b0; wdata = '0;
    wrst = 1'b1; rrst = 1'b1;
    #50_000;
    @(posedge wclk); #1 wrst = 1'b0;
    @(posedge rclk); #1 rrst = 1'b0;
    checks++; if (!empty) begin failures++; $display("not empty after reset"); end
    // phase 1
    #5_000_000;
    writing = 1'b0;
    #500_000;
    checks++;
    if (n_read != n_written || !empty) begin
      failures++; $display("phase 1: written %0d read %0d", n_written, n_read);
    end
    // phase 2: fill
    reading = 1'b0;
    #100_000;
    acc = n_written;
    writing = 1'b1;
    #2_000_000;
    checks++;
    if (n_written - acc != DEPTH || !full) begin
      failures++; $display("phase 2: accepted %0d writes, full=%b", n_written - acc, full);
    end
    writing = 1'b0;
    // phase 3: drain
    reading = 1'b1;
    #1_000_000;
    checks++;
    if (!empty || sb.size() != 0 || full) begin
      failures++; $display("phase 3: empty=%b full=%b left=%0d", empty, full, sb.size());
    end
    $display("words through the FIFO: %0d", n_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

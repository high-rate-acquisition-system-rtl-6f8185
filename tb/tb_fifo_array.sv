// Self-checking testbench for fifo_array (16 channels, DEPTH=8 to reach the
// full condition quickly). Frames are written on a 10 ns clock, streams are
// read on an unrelated 7.3 ns clock.
//  1. All streams read with random TREADY: every channel must deliver every
//     frame's sample, in order, zero-extended to 16 bits; no overflow.
//  2. Channel 3 stalled (TREADY low) for 20 frames: its overflow flag must
//     rise, no other flag may, and after release channel 3 must deliver
//     exactly the first DEPTH samples of the stalled period.
`timescale 1ps/1ps
module tb_fifo_array;
  localparam int NUM_CH = 16, RES = 12, DEPTH = 8, AXIS_W = 16;
  logic wclk = 1'b0, aclk = 1'b0, wrst, aresetn, wvalid;
  logic [NUM_CH-1:0][RES-1:0]    wdata;
  logic [NUM_CH-1:0][AXIS_W-1:0] tdata;
  logic [NUM_CH-1:0]             tvalid, tready, overflow;
  logic [RES-1:0] sb [NUM_CH][$];
  int checks = 0, failures = 0, beats = 0, stalls = 0;
  int stall_ch = -1;
  int frame = 0;

  fifo_array #(.NUM_CH(NUM_CH), .RES(RES), .DEPTH(DEPTH), .AXIS_W(AXIS_W)) dut (
    .wclk(wclk), .wrst(wrst), .wvalid(wvalid), .wdata(wdata),
    .aclk(aclk), .aresetn(aresetn), .m_axis_tdata(tdata), .m_axis_tvalid(tvalid),
    .m_axis_tready(tready), .overflow(overflow));

  always #5000 wclk = ~wclk;
  always #3650 aclk = ~aclk;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [RES-1:0] val(input int f, input int c);
    return RES'(f * 37 + c * 256);
  endfunction

  task automatic write_frames(input int n, input int gap);
    for (int i = 0; i < n; i++) begin
      @(posedge wclk); #1;
      wvalid = 1'b1;
      for (int c = 0; c < NUM_CH; c++) wdata[c] = val(frame, c);
      @(posedge wclk); #1;
      wvalid = 1'b0;
      for (int c = 0; c < NUM_CH; c++) if (c != stall_ch || sb[c].size() < DEPTH) sb[c].push_back(val(frame, c));
      frame++;
      repeat (gap) @(posedge wclk);
    end
  endtask

  always @(posedge aclk) begin
    if (aresetn) begin
      for (int c = 0; c < NUM_CH; c++) begin
        if (tvalid[c] && tready[c]) begin
          checks++; beats++;
          if (sb[c].size() == 0) begin
            failures++; $display("ch %0d: unexpected beat %h", c, tdata[c]);
          end else begin
            logic [RES-1:0] e;
            e = sb[c].pop_front();
            if (tdata[c] !== AXIS_W'(e)) begin
              failures++; $display("ch %0d: got %h expected %h", c, tdata[c], e);
            end
          end
        end
        if (tvalid[c] && !tready[c]) stalls++;
      end
    end
    #1;
    for (int c = 0; c < NUM_CH; c++) tready[c] <= (c == stall_ch) ? 1'b0 : ($urandom_range(0, 3) != 0);
  end

  initial begin
    wvalid = 1'b0; wdata = '0; tready = '0;
    wrst = 1'b1; aresetn = 1'b0;
    #100_000;
    @(posedge wclk); #1 wrst = 1'b0;
    @(posedge aclk); #1 aresetn = 1'b1;
    // phase 1
    write_frames(40, 3);
    #2_000_000;
    for (int c = 0; c < NUM_CH; c++) begin
      checks++;
      if (sb[c].size() != 0 || tvalid[c]) begin failures++; $display("ch %0d not drained", c); end
    end
    checks++; if (overflow != '0) begin failures++; $display("overflow in phase 1: %b", overflow); end
    // phase 2
    stall_ch = 3;
    #100_000;
    write_frames(20, 1);
    #500_000;
    checks++;
    if (overflow != NUM_CH'(1 << 3)) begin failures++; $display("overflow flags %b, expected only channel 3", overflow); end
    checks++;
    if (sb[3].size() != DEPTH) begin failures++; $display("scoreboard of channel 3 holds %0d", sb[3].size()); end
    stall_ch = -1;
    #2_000_000;
    for (int c = 0; c < NUM_CH; c++) begin
      checks++;
      if (sb[c].size() != 0) begin failures++; $display("ch %0d: %0d samples missing", c, sb[c].size()); end
    end
    checks++; if (stalls == 0) begin failures++; $display("back-pressure never happened"); end
    $display("beats %0d, back-pressure cycles %0d", beats, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// End-to-end testbench of acq_top at its default size (16 channels, 12 bits,
// 1024-sample FIFOs), driven by the converter model at 16.25 Msps and a
// 100 MHz processor clock. The processor side is modelled by AXI4-Lite tasks
// and one AXI4-Stream sink per channel.
// Sequence and checks:
//   1. SPI read of the chip ID (0x92) and SPI write of test mode 0 through the
//      AXI4-Lite wrapper.
//   2. Full rate: every beat of every stream must carry (k + 256*c) mod 4096
//      with k advancing by one frame per beat; the beat count over a window
//      must match 16.25 Msps.
//   3. Prescaler ratio 3: k must advance by 3 per beat and the rate drop to a
//      third.
//   4. Channel 5 stalled for 1200 frames: its overflow flag, and only its,
//      must rise; the other channels keep running without a gap.
//   5. Mode switch: SPI write of the mid-scale test pattern; all channels
//      must then deliver 0x800; switching back restores the ramp.
// Each mechanism (SPI write, SPI read with SDIO turnaround, back-pressure,
// downsampling, overflow, test-pattern switch) is counted and must occur.
`timescale 1ps/1ps
module tb_acq_top;
  import acq_pkg::*;
  localparam int NCH = NUM_CH, BIT_PS = 5128, FRAME_PS = RES * BIT_PS;

  logic aclk = 1'b0, aresetn, run;
  logic [NCH-1:0] d_p, d_n;
  logic dco_p, dco_n, fco_p, fco_n;
  logic [15:0] prescale;
  logic sclk, csb, sdio_o, sdio_oe, sdio_i, spi_busy, s_out, s_oe;
  int unsigned frame_no, s_writes, s_reads;
  logic [4:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  logic [NCH-1:0][AXIS_W-1:0] tdata;
  logic [NCH-1:0] tvalid, tready, overflow;

  int checks = 0, failures = 0;
  int last_k [NCH];
  int beats [NCH];
  bit checking = 1'b0, midscale = 1'b0;
  int ratio = 1, stall_ch = -1;
  // mechanism counters
  int n_spi_wr = 0, n_spi_rd = 0, n_backpressure = 0, n_decimated = 0, n_overflow = 0,
      n_midscale = 0;

  ad9249_model #(.NUM_CH(NCH), .RES(RES), .BIT_PS(BIT_PS)) adc (
    .run(run), .ext_en(1'b0), .ext_data('0), .d_p(d_p), .d_n(d_n), .dco_p(dco_p), .dco_n(dco_n), .fco_p(fco_p), .fco_n(fco_n),
    .frame_no(frame_no), .sclk(sclk), .csb(csb), .sdio_in(sdio_o), .sdio_out(s_out),
    .sdio_oe(s_oe), .spi_writes(s_writes), .spi_reads(s_reads));

  assign sdio_i = s_oe ? s_out : sdio_o;

  acq_top dut (
    .db1_p(d_p[7:0]), .db1_n(d_n[7:0]), .db2_p(d_p[15:8]), .db2_n(d_n[15:8]),
    .dco_p(dco_p), .dco_n(dco_n), .fco_p(fco_p), .fco_n(fco_n), .prescale(prescale),
    .spi_sclk(sclk), .spi_csb(csb), .spi_sdio_o(sdio_o), .spi_sdio_oe(sdio_oe),
    .spi_sdio_i(sdio_i), .spi_busy(spi_busy),
    .aclk(aclk), .aresetn(aresetn),
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .m_axis_tdata(tdata), .m_axis_tvalid(tvalid), .m_axis_tready(tready),
    .fifo_overflow(overflow));

  always #5000 aclk = ~aclk;

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- AXI4-Lite master ----------------
  task automatic axil_write(input logic [4:0] a, input logic [31:0] d);
    @(negedge aclk);
    awaddr = a; wdata = d; wstrb = 4'hF; awvalid = 1'b1; wvalid = 1'b1; bready = 1'b1;
    do @(posedge aclk); while (!(awready && wready));
    @(negedge aclk);
    awvalid = 1'b0; wvalid = 1'b0;
    while (!bvalid) @(negedge aclk);
    @(negedge aclk);
    bready = 1'b0;
  endtask

  task automatic axil_read(input logic [4:0] a, output logic [31:0] d);
    @(negedge aclk);
    araddr = a; arvalid = 1'b1; rready = 1'b1;
    do @(posedge aclk); while (!arready);
    @(negedge aclk);
    arvalid = 1'b0;
    while (!rvalid) @(negedge aclk);
    d = rdata;
    @(negedge aclk);
    rready = 1'b0;
  endtask

  task automatic spi_run(input logic [23:0] tx, input int n_wr, output logic [7:0] rx);
    logic [31:0] st;
    axil_write(REG_LEN, {18'd0, 6'(n_wr), 2'd0, 6'd24});
    axil_write(REG_TXDATA, {8'd0, tx});
    axil_write(REG_CTRL, 32'h1);
    do axil_read(REG_STATUS, st); while (st[0]);
    axil_read(REG_RXDATA, st);
    rx = st[7:0];
  endtask

  task automatic adc_reg_write(input logic [12:0] addr, input logic [7:0] val);
    logic [7:0] rx;
    int w0;
    w0 = s_writes;
    spi_run({3'b000, addr, val}, 24, rx);
    checks++;
    if (s_writes != w0 + 1 || adc.regs[addr[7:0]] != val) begin
      failures++; $display("SPI write of %h to %h not seen", val, addr);
    end else n_spi_wr++;
  endtask

  task automatic adc_reg_read(input logic [12:0] addr, input logic [7:0] expv);
    logic [7:0] rx;
    spi_run({3'b100, addr, 8'h00}, 16, rx);
    checks++;
    if (rx !== expv) begin failures++; $display("SPI read of %h gave %h expected %h", addr, rx, expv); end
    else n_spi_rd++;
  endtask

  // ---------------- AXI4-Stream sinks and checker ----------------
  always @(posedge aclk) begin
    if (aresetn) begin
      for (int c = 0; c < NCH; c++) begin
        if (tvalid[c] && !tready[c]) n_backpressure++;
        if (tvalid[c] && tready[c]) begin
          int k;
          beats[c]++;
          checks++;
          if (tdata[c][AXIS_W-1:RES] != '0) begin failures++; $display("ch %0d: upper TDATA bits set", c); end
          if (!checking) begin
            last_k[c] = -1;
          end else if (midscale) begin
            if (tdata[c] !== 16'h0800) begin failures++; $display("ch %0d: %h in mid-scale mode", c, tdata[c]); end
            else n_midscale++;
          end else begin
            k = int'(RES'(tdata[c] - AXIS_W'(256 * c)));
            // the sample must be one the converter sent recently (FIFO depth plus pipeline)
            if (c != stall_ch && int'(RES'(frame_no - k)) > FIFO_DEPTH + 16) begin
              failures++; $display("ch %0d: frame %0d is not recent (converter at %0d)", c, k, frame_no);
            end
            if (last_k[c] >= 0 && RES'(k - last_k[c]) != RES'(ratio)) begin
              if (c == stall_ch && RES'(k - last_k[c]) > RES'(ratio)) begin
                // samples lost while this channel was stalled: allowed once
                stall_ch = -1;
              end else begin
                failures++;
                $display("ch %0d: k %0d -> %0d, ratio %0d", c, last_k[c], k, ratio);
              end
            end
            if (ratio > 1) n_decimated++;
            last_k[c] = k;
          end
        end
      end
    end
    #1;
    for (int c = 0; c < NCH; c++) tready[c] <= (c == stall_ch && !checking) ? 1'b0 : ($urandom_range(0, 3) != 0);
  end

  task automatic settle();
    checking = 1'b0;
    #(4 * FRAME_PS);
    repeat (8) @(posedge aclk);
    checking = 1'b1;
  endtask

  task automatic rate_window(input int n_frames, input int r);
    int b0;
    b0 = beats[0];
    #(longint'(n_frames) * FRAME_PS);
    checks++;
    if (beats[0] - b0 < n_frames / r - 3 || beats[0] - b0 > n_frames / r + 3) begin
      failures++; $display("ratio %0d: %0d beats in %0d frame times", r, beats[0] - b0, n_frames);
    end
  endtask

  initial begin
    logic [7:0] rx;
    for (int c = 0; c < NCH; c++) begin last_k[c] = -1; beats[c] = 0; end
    run = 1'b1; aresetn = 1'b0; prescale = 16'd1;
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awaddr = 0; araddr = 0; wdata = 0; wstrb = 0;
    #500_000;
    @(negedge aclk) aresetn = 1'b1;

    // 1. configuration over SPI
    axil_write(REG_CLKDIV, 32'd4);           // 10 MHz SCLK
    adc_reg_read(13'h001, 8'h92);
    adc_reg_write(13'h00D, 8'h00);
    adc_reg_read(13'h00D, 8'h00);

    // 2. full rate
    settle();
    rate_window(300, 1);

    // 3. prescaler
    ratio = 3; prescale = 16'd3;
    settle();
    rate_window(300, 3);

    // 4. stall channel 5 past the FIFO depth
    ratio = 1; prescale = 16'd1;
    settle();
    stall_ch = 5;
    checking = 1'b0;
    #(longint'(FIFO_DEPTH + 200) * FRAME_PS);
    checks++;
    if (overflow != NCH'(1 << 5)) begin failures++; $display("overflow flags %b", overflow); end
    else n_overflow++;
    #(4 * FRAME_PS);
    repeat (8) @(posedge aclk);
    for (int c = 0; c < NCH; c++) if (c != 5) last_k[c] = -1;
    checking = 1'b1;
    rate_window(1300, 1);   // channel 5 drains its 1024 samples, then the gap
    checks++;
    if (stall_ch != -1) begin failures++; $display("gap after overflow never seen on channel 5"); end
    stall_ch = -1;

    // 5. test pattern switch
    checking = 1'b0;
    adc_reg_write(13'h00D, 8'h01);
    midscale = 1'b1;
    settle();
    #(100 * FRAME_PS);
    checking = 1'b0;
    adc_reg_write(13'h00D, 8'h00);
    midscale = 1'b0;
    settle();
    rate_window(100, 1);

    // every mechanism must have happened
    checks += 6;
    if (n_spi_wr == 0)       begin failures++; $display("no SPI write"); end
    if (n_spi_rd == 0)       begin failures++; $display("no SPI read"); end
    if (n_backpressure == 0) begin failures++; $display("no back-pressure"); end
    if (n_decimated == 0)    begin failures++; $display("no decimated beat"); end
    if (n_overflow == 0)     begin failures++; $display("no overflow"); end
    if (n_midscale == 0)     begin failures++; $display("no test-pattern beat"); end
    $display("spi writes %0d, spi reads %0d, back-pressure cycles %0d, decimated beats %0d, overflow events %0d, test-pattern beats %0d",
             n_spi_wr, n_spi_rd, n_backpressure, n_decimated, n_overflow, n_midscale);
    $display("beats on channel 0: %0d", beats[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

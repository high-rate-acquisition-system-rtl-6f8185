// Workload testbench: one full period of a BPSK-coded infrared emission
// acquired on all twelve receiver channels at 16.25 Msps.
//
// Emission: a 1151-chip binary code, one chip per carrier cycle, BPSK on a
// 250 kHz carrier. Sampled at 16.25 Msps a carrier cycle is 65 samples and a
// code period 1151*65 = 74815 samples (4.6 ms). The published system uses
// loosely synchronised (LS) codes; their construction is not reproduced here,
// so the chips come from an 11-bit maximal-length LFSR (x^11 + x^9 + 1),
// which has the same length and a comparably low cross-correlation for this
// test. Four receivers each give a sum, a left-right and a bottom-top
// channel (channels 3q, 3q+1, 3q+2), scaled by per-receiver factors; values
// are offset-binary 12-bit: 2048 + round(A * chip * sin(2*pi*(n mod 65)/65)).
// Channels 12-15 stay at mid-scale.
//
// The design runs at its default size and full rate, the streams are read
// with random back-pressure, and 74815 consecutive samples of every channel
// are captured. As in the offline processing of the original experiment, a
// matched filter (correlation with the chip-modulated carrier) finds the code
// phase of the sum channel of receiver 0; it must peak at the emission's
// phase, at least 3x above any lag one chip or more away. With that phase,
// every captured sample of all sixteen channels is compared with the value
// sent: a lost or duplicated sample would show. The capture must also take
// 74815 frame periods (the 16.25 Msps rate).
`timescale 1ps/1ps
module tb_acq_workload;
  import acq_pkg::*;
  localparam int NCH = NUM_CH, BIT_PS = 5128, FRAME_PS = RES * BIT_PS;
  localparam int SPC = 65, CHIPS = 1151, NS = SPC * CHIPS;
  localparam int OFFSET = 23456;   // code phase of the emission at frame 0

  logic aclk = 1'b0, aresetn, run;
  logic [NCH-1:0] d_p, d_n;
  logic dco_p, dco_n, fco_p, fco_n;
  logic sclk, csb, sdio_o, sdio_oe, sdio_i, spi_busy, s_out, s_oe;
  int unsigned frame_no, s_writes, s_reads;
  logic [NCH-1:0][RES-1:0] ext_data;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [31:0] rdata;
  logic [1:0]  bresp, rresp;
  logic [NCH-1:0][AXIS_W-1:0] tdata;
  logic [NCH-1:0] tvalid, tready, overflow;

  real    carrier [SPC];
  int     chip [CHIPS];
  real    gain [NCH];
  logic [RES-1:0] cap [NCH][NS];
  int     ncap [NCH];
  int     checks = 0, failures = 0, stalls = 0;
  bit     capturing = 1'b0;

  ad9249_model #(.NUM_CH(NCH), .RES(RES), .BIT_PS(BIT_PS)) adc (
    .run(run), .ext_en(1'b1), .ext_data(ext_data), .d_p(d_p), .d_n(d_n), .dco_p(dco_p),
    .dco_n(dco_n), .fco_p(fco_p), .fco_n(fco_n), .frame_no(frame_no), .sclk(sclk), .csb(csb),
    .sdio_in(sdio_o), .sdio_out(s_out), .sdio_oe(s_oe), .spi_writes(s_writes), .spi_reads(s_reads));

  assign sdio_i = s_oe ? s_out : sdio_o;

  acq_top dut (
    .db1_p(d_p[7:0]), .db1_n(d_n[7:0]), .db2_p(d_p[15:8]), .db2_n(d_n[15:8]),
    .dco_p(dco_p), .dco_n(dco_n), .fco_p(fco_p), .fco_n(fco_n), .prescale(16'd1),
    .spi_sclk(sclk), .spi_csb(csb), .spi_sdio_o(sdio_o), .spi_sdio_oe(sdio_oe),
    .spi_sdio_i(sdio_i), .spi_busy(spi_busy),
    .aclk(aclk), .aresetn(aresetn),
    .s_axil_awaddr(5'd0), .s_axil_awvalid(1'b0), .s_axil_awready(awready),
    .s_axil_wdata(32'd0), .s_axil_wstrb(4'd0), .s_axil_wvalid(1'b0), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(1'b1),
    .s_axil_araddr(5'd0), .s_axil_arvalid(1'b0), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(1'b1),
    .m_axis_tdata(tdata), .m_axis_tvalid(tvalid), .m_axis_tready(tready),
    .fifo_overflow(overflow));

  always #5000 aclk = ~aclk;

  initial begin
    #20_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [RES-1:0] sent(input int c, input longint f);
    int n;
    real v;
    if (gain[c] == 0.0) return RES'(2048);
    n = int'((f + OFFSET) % NS);
    v = 1800.0 * gain[c] * real'(chip[n / SPC]) * carrier[n % SPC];
    return RES'(2048 + $rtoi(v + ((v >= 0.0) ? 0.5 : -0.5)));
  endfunction

  // the "analog" input of the converter for the frame about to be sent
  always @(frame_no) begin
    for (int c = 0; c < NCH; c++) ext_data[c] = sent(c, longint'(frame_no));
  end

  // stream sinks
  always @(posedge aclk) begin
    for (int c = 0; c < NCH; c++) begin
      if (tvalid[c] && !tready[c]) stalls++;
      if (capturing && tvalid[c] && tready[c] && ncap[c] < NS) begin
        cap[c][ncap[c]] = tdata[c][RES-1:0];
        ncap[c]++;
      end
    end
    #1;
    for (int c = 0; c < NCH; c++) tready[c] <= ($urandom_range(0, 3) != 0);
  end

  function automatic real corr(input int lag);
    real s = 0.0;
    for (int i = 0; i < NS; i++) begin
      int n;
      n = (i + lag) % NS;
      s += (real'(cap[0][i]) - 2048.0) * real'(chip[n / SPC]) * carrier[n % SPC];
    end
    return s;
  endfunction

  initial begin
    logic [10:0] lfsr;
    real qgain [4] = '{1.0, 0.7, 0.5, 0.35};
    real lr [4]    = '{0.30, -0.25, 0.10, -0.40};
    real bt [4]    = '{-0.20, 0.15, 0.45, 0.05};
    longint t0, t1;
    int est, best_lag, f0, mism;
    real best, side, v;

    for (int i = 0; i < SPC; i++) carrier[i] = $sin(2.0 * 3.14159265358979 * real'(i) / real'(SPC));
    lfsr = 11'h5A5;
    for (int i = 0; i < CHIPS; i++) begin
      chip[i] = lfsr[0] ? 1 : -1;
      lfsr = {lfsr[0] ^ lfsr[2], lfsr[10:1]};
    end
    for (int c = 0; c < NCH; c++) gain[c] = 0.0;
    for (int q = 0; q < 4; q++) begin
      gain[3 * q]     = qgain[q];
      gain[3 * q + 1] = qgain[q] * lr[q];
      gain[3 * q + 2] = qgain[q] * bt[q];
    end
    for (int c = 0; c < NCH; c++) begin ncap[c] = 0; ext_data[c] = sent(c, 0); end
    tready = '0;

    run = 1'b1; aresetn = 1'b0;
    #500_000;
    @(negedge aclk) aresetn = 1'b1;
    #(20 * FRAME_PS);
    // capture one full code period
    @(negedge aclk);
    est = int'(frame_no);
    capturing = 1'b1;
    t0 = $time;
    wait (ncap[0] == NS);
    t1 = $time;
    for (int c = 1; c < NCH; c++) wait (ncap[c] == NS);
    capturing = 1'b0;
    checks++;
    if (overflow != '0) begin failures++; $display("samples dropped: %b", overflow); end
    checks++;
    if ((t1 - t0) < longint'(NS - 20) * FRAME_PS || (t1 - t0) > longint'(NS + 20) * FRAME_PS) begin
      failures++; $display("capture took %0d ps for %0d frames", t1 - t0, NS);
    end

    // matched filter on the sum channel of receiver 0, around the expected phase
    best = -1.0e30; best_lag = -1;
    for (int l = -40; l <= 40; l++) begin
      int lag;
      lag = (est + OFFSET + l + NS) % NS;
      v = corr(lag);
      if (v > best) begin best = v; best_lag = lag; end
    end
    side = 0.0;
    for (int j = 0; j < 12; j++) begin
      int lag;
      lag = (best_lag + SPC * (1 + int'($urandom_range(0, CHIPS - 3)))) % NS;
      v = corr(lag);
      if (v < 0.0) v = -v;
      if (v > side) side = v;
    end
    $display("correlation peak %0.1f at code phase %0d, largest side lobe checked %0.1f", best, best_lag, side);
    checks++;
    if (best < 3.0 * side) begin failures++; $display("no clear correlation peak"); end

    // every sample of every channel, at the phase the matched filter found
    f0 = (best_lag - OFFSET + NS) % NS;
    mism = 0;
    for (int c = 0; c < NCH; c++) begin
      for (int i = 0; i < NS; i++) begin
        checks++;
        if (cap[c][i] !== sent(c, longint'(f0 + i))) begin
          failures++;
          if (mism++ < 10) $display("ch %0d sample %0d: %h expected %h", c, i, cap[c][i], sent(c, longint'(f0 + i)));
        end
      end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("no back-pressure happened"); end
    $display("captured %0d samples per channel, back-pressure cycles %0d", NS, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

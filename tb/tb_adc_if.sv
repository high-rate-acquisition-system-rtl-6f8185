// Self-checking testbench for adc_if driven by the converter model at the
// full rate: 12-bit frames at 16.25 Msps (bit period 5128 ps, DCO 97.5 MHz).
// Two links run side by side: in link 0 each frame starts on a rising DCO
// edge, in link 1 on a falling edge (the half-bit alignment).
// For every sample_valid strobe the frame number k is recovered from channel
// 0 (the model sends (k + 256*c) mod 4096 on channel c) and all 16 channels
// must agree with it. Between strobes k must advance by the prescale ratio,
// and the strobes must be exactly 6*ratio DCO cycles and 12*ratio bit periods
// apart (the frame rate). Ratios 1 and 4 are run, then the converter's
// mid-scale test pattern.
`timescale 1ps/1ps
module tb_adc_if;
  localparam int NUM_CH = 16, RES = 12, BIT_PS = 5128;
  logic run, rst;
  logic [15:0] prescale;
  int checks = 0, failures = 0;
  int frames [2], midscale_frames [2];
  bit midscale = 1'b0;

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 2; g++) begin : g_link
    logic [NUM_CH-1:0] d_p, d_n;
    logic dco_p, dco_n, fco_p, fco_n, dco_clk, sample_valid;
    logic [NUM_CH-1:0][RES-1:0] sample;
    logic s_out, s_oe;
    int unsigned frame_no, s_writes, s_reads;
    int last_k = -1, cyc = 0, last_cyc = 0;
    longint last_t = 0;

    ad9249_model #(.NUM_CH(NUM_CH), .RES(RES), .BIT_PS(BIT_PS), .FALL_START(g == 1)) adc (
      .run(run), .ext_en(1'b0), .ext_data('0), .d_p(d_p), .d_n(d_n), .dco_p(dco_p), .dco_n(dco_n),
      .fco_p(fco_p), .fco_n(fco_n), .frame_no(frame_no), .sclk(1'b0), .csb(1'b1), .sdio_in(1'b0),
      .sdio_out(s_out), .sdio_oe(s_oe), .spi_writes(s_writes), .spi_reads(s_reads));

    adc_if #(.NUM_CH(NUM_CH), .RES(RES), .PRESC_W(16)) dut (
      .rst(rst), .d_p(d_p), .d_n(d_n), .dco_p(dco_p), .dco_n(dco_n), .fco_p(fco_p), .fco_n(fco_n),
      .prescale(prescale), .dco_clk(dco_clk), .sample(sample), .sample_valid(sample_valid));

    always @(posedge dco_clk) begin
      cyc++;
      if (rst) last_k = -1;
      if (!rst && sample_valid) begin
        int k, r;
        r = (prescale <= 1) ? 1 : int'(prescale);
        frames[g]++;
        if (midscale) begin
          midscale_frames[g]++;
          for (int c = 0; c < NUM_CH; c++) begin
            checks++;
            if (sample[c] !== 12'h800) begin failures++; $display("link %0d mid-scale: ch %0d = %h", g, c, sample[c]); end
          end
        end else begin
          k = int'(sample[0]);
          for (int c = 1; c < NUM_CH; c++) begin
            checks++;
            if (sample[c] !== RES'(k + 256 * c)) begin
              failures++; $display("link %0d frame %0d ch %0d = %h expected %h", g, k, c, sample[c], RES'(k + 256 * c));
            end
          end
          if (last_k >= 0) begin
            checks++;
            if (RES'(k - last_k) != RES'(r)) begin failures++; $display("link %0d: k jumped %0d -> %0d, ratio %0d", g, last_k, k, r); end
            checks++;
            if (cyc - last_cyc != 6 * r || ($time - last_t) != longint'(12 * BIT_PS * r)) begin
              failures++; $display("link %0d: strobe spacing %0d cycles / %0d ps", g, cyc - last_cyc, $time - last_t);
            end
          end
          last_k = k;
        end
        last_cyc = cyc; last_t = $time;
      end
    end
  end

  task automatic session(input int ratio, input int n);
    rst = 1'b1; prescale = 16'(ratio);
    repeat (8) @(posedge g_link[0].dco_clk);
    rst = 1'b0;
    frames[0] = 0; frames[1] = 0;
    while (frames[0] < n || frames[1] < n) @(posedge g_link[0].dco_clk);
  endtask

  initial begin
    frames = '{0, 0}; midscale_frames = '{0, 0};
    run = 1'b1; rst = 1'b1; prescale = 16'd1;
    #200_000;
    session(1, 60);
    $display("ratio 1: %0d / %0d frames", frames[0], frames[1]);
    session(4, 20);
    $display("ratio 4: %0d / %0d frames", frames[0], frames[1]);
    g_link[0].adc.regs[8'h0D] = 8'h01;
    g_link[1].adc.regs[8'h0D] = 8'h01;
    #(3 * 12 * BIT_PS);
    midscale = 1'b1;
    session(1, 10);
    checks++;
    if (midscale_frames[0] < 10 || midscale_frames[1] < 10) begin failures++; $display("mid-scale not seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

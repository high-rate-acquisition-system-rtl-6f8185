// AD9249 serial LVDS interface: buffers, DDR capture, framing, prescaler.
//
// The converter sends each of its NUM_CH channels on its own LVDS lane, RES
// bits per sample, MSB first, two bits per period of the bit clock DCO (one
// on each edge). The frame clock FCO is high for the first half of every
// frame, so its rising edge marks the first bit of a new sample.
//
// Datapath, all in the DCO domain:
//   1. lvds_ibuf turns every pair (lanes, DCO, FCO) into a single-ended line.
//   2. iddr_cap samples the lanes and FCO on both DCO edges and hands over one
//      bit pair per lane per rising edge (earlier bit, later bit).
//   3. Each lane shifts its pairs into a RES-bit register. The FCO bits show
//      where a frame starts, at either of two alignments:
//        - between pairs (FCO high in the rising-edge bit, low in the last
//          bit of the previous pair): the register holds the whole previous
//          frame;
//        - inside a pair (FCO low in the rising-edge bit, high in the
//          falling-edge bit): the previous frame is the register's last RES-1
//          bits followed by the rising-edge bit of the current pair.
//      The previous frame is latched into the output if exactly RES/2 pairs
//      have passed since the previous FCO edge. Frames with a wrong length,
//      and the first partial frame after reset, are discarded.
//   4. adc_prescaler keeps one frame in `prescale`.
// Outputs: sample (all channels of one frame) is stable from one sample_valid
// strobe to the next; sample_valid is high for one dco_clk cycle per kept
// frame. Latency from the last bit of a frame on the wire to sample_valid is
// two to three DCO periods (half a period more for the inside-a-pair
// alignment). `prescale` may come from any clock domain: it is passed through
// two flip-flops, so a change while frames flow can leave one irregular gap
// before the new ratio holds. rst is synchronous to dco_clk. RES must be even.
//
// The buffer/DDR/frame-clock structure and the prescaler follow the published
// acquisition stage; the length check and the wire format details follow the
// converter's usual one-lane DDR mode and are this design's choice.
module adc_if #(
  parameter int unsigned NUM_CH  = 16,
  parameter int unsigned RES     = 12,
  parameter int unsigned PRESC_W = 16
) (
  input  logic                          rst,
  input  logic [NUM_CH-1:0]             d_p,
  input  logic [NUM_CH-1:0]             d_n,
  input  logic                          dco_p,
  input  logic                          dco_n,
  input  logic                          fco_p,
  input  logic                          fco_n,
  input  logic [PRESC_W-1:0]            prescale,
  output logic                          dco_clk,
  output logic [NUM_CH-1:0][RES-1:0]    sample,
  output logic                          sample_valid
);
  localparam int unsigned PAIRS = RES / 2;
  localparam int unsigned CW    = $clog2(PAIRS + 2);

  // ---- 1. differential input buffers --------------------------------------
  logic [NUM_CH-1:0] d_se;
  logic              fco_se;

  lvds_ibuf u_ibuf_dco (.i_p(dco_p), .i_n(dco_n), .o(dco_clk));
  lvds_ibuf u_ibuf_fco (.i_p(fco_p), .i_n(fco_n), .o(fco_se));
  for (genvar c = 0; c < NUM_CH; c++) begin : g_ibuf
    lvds_ibuf u_ibuf (.i_p(d_p[c]), .i_n(d_n[c]), .o(d_se[c]));
  end

  // ---- 2. DDR capture (lanes and FCO together) ----------------------------
  logic [NUM_CH:0] q_rise, q_fall;
  iddr_cap #(.W(NUM_CH + 1)) u_iddr (
    .clk   (dco_clk),
    .d     ({fco_se, d_se}),
    .q_rise(q_rise),
    .q_fall(q_fall)
  );

  // ---- 3. framing on the FCO rising edge -----------------------------------
  logic                       fco_r, fco_f, fco_f_prev;
  logic                       start_pair, start_mid, frame_start;
  logic [CW-1:0]              pair_cnt;
  logic                       locked;
  logic [NUM_CH-1:0][RES-1:0] sreg;
  logic [NUM_CH-1:0][RES-1:0] frame_q;
  logic                       frame_valid;

  assign fco_r       = q_rise[NUM_CH];
  assign fco_f       = q_fall[NUM_CH];
  assign start_pair  = fco_r && !fco_f_prev;
  assign start_mid   = fco_f && !fco_r;
  assign frame_start = start_pair || start_mid;

  always_ff @(posedge dco_clk) begin
    if (rst) begin
      fco_f_prev  <= 1'b1;
      pair_cnt    <= '0;
      locked      <= 1'b0;
      frame_valid <= 1'b0;
    end else begin
      fco_f_prev  <= fco_f;
      frame_valid <= frame_start && locked && (pair_cnt == CW'(PAIRS));
      if (frame_start) begin
        locked   <= 1'b1;
        pair_cnt <= CW'(1);
      end else if (pair_cnt != '1) begin
        pair_cnt <= pair_cnt + 1'b1;
      end
    end
  end

  // Shift registers and the frame latch carry data only; no reset needed.
  always_ff @(posedge dco_clk) begin
    for (int c = 0; c < NUM_CH; c++) begin
      sreg[c] <= {sreg[c][RES-3:0], q_rise[c], q_fall[c]};
    end
    for (int c = 0; c < NUM_CH; c++) begin
      if (start_pair)     frame_q[c] <= sreg[c];
      else if (start_mid) frame_q[c] <= {sreg[c][RES-2:0], q_rise[c]};
    end
  end

  // ---- 4. prescaler ---------------------------------------------------------
  logic [PRESC_W-1:0] presc_s1, presc_s2;
  always_ff @(posedge dco_clk) begin
    presc_s1 <= prescale;
    presc_s2 <= presc_s1;
  end

  adc_prescaler #(.PRESC_W(PRESC_W)) u_presc (
    .clk      (dco_clk),
    .rst      (rst),
    .ratio    (presc_s2),
    .in_valid (frame_valid),
    .out_valid(sample_valid)
  );

  assign sample = frame_q;
endmodule

// Array of per-channel asynchronous FIFOs with AXI4-Stream outputs.
//
// Each kept ADC frame (wvalid high for one wclk cycle, wdata holding all
// channels) writes one sample into each channel's async_fifo in the bit-clock
// domain. On the processing-system side (aclk) every channel is an AXI4-Stream
// master: TVALID is "FIFO not empty", TDATA is the oldest sample zero-extended
// to AXIS_W bits, and a beat is taken on every aclk edge with TVALID and
// TREADY high. The FIFOs therefore both cross the clock domain and absorb a
// consumer that is temporarily slower than the converter.
// If a channel's FIFO is full when a frame arrives, that channel's sample is
// dropped and its overflow flag is set; the flag is sticky, crosses to aclk
// through two flip-flops and is cleared only by reset. Dropping and the flag
// are this design's choice. wrst is synchronous to wclk (active high),
// aresetn to aclk (active low); both should be asserted together.
module fifo_array #(
  parameter int unsigned NUM_CH = 16,
  parameter int unsigned RES    = 12,
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned AXIS_W = 16
) (
  input  logic                          wclk,
  input  logic                          wrst,
  input  logic                          wvalid,
  input  logic [NUM_CH-1:0][RES-1:0]    wdata,

  input  logic                          aclk,
  input  logic                          aresetn,
  output logic [NUM_CH-1:0][AXIS_W-1:0] m_axis_tdata,
  output logic [NUM_CH-1:0]             m_axis_tvalid,
  input  logic [NUM_CH-1:0]             m_axis_tready,
  output logic [NUM_CH-1:0]             overflow
);
  logic [NUM_CH-1:0] full, empty;
  logic [NUM_CH-1:0] ovf_w, ovf_s1, ovf_s2;

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    logic [RES-1:0] rdata;

    async_fifo #(.W(RES), .DEPTH(DEPTH)) u_fifo (
      .wclk (wclk),
      .wrst (wrst),
      .wr_en(wvalid),
      .wdata(wdata[c]),
      .full (full[c]),
      .rclk (aclk),
      .rrst (!aresetn),
      .rd_en(m_axis_tready[c]),
      .rdata(rdata),
      .empty(empty[c])
    );

    assign m_axis_tdata[c]  = AXIS_W'(rdata);
    assign m_axis_tvalid[c] = !empty[c];

    // AXI4-Stream rule: once offered, a beat stays until it is taken.
    a_axis_hold : assert property (@(posedge aclk) disable iff (!aresetn)
      m_axis_tvalid[c] && !m_axis_tready[c] |=> m_axis_tvalid[c] && $stable(m_axis_tdata[c]));
  end

  always_ff @(posedge wclk) begin
    if (wrst) ovf_w <= '0;
    else      ovf_w <= ovf_w | (wvalid ? full : '0);
  end

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      ovf_s1 <= '0;
      ovf_s2 <= '0;
    end else begin
      ovf_s1 <= ovf_w;
      ovf_s2 <= ovf_s1;
    end
  end
  assign overflow = ovf_s2;
endmodule

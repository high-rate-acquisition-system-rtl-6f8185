// Acquisition stage for a 16-channel serial-LVDS ADC (AD9249) on an FPGA.
//
// Four quadrant-photodiode receivers give twelve analog signals (sum and two
// differences each) that the converter samples at up to 16.25 Msps with 12-bit
// serial output. This top wires the three parts of the acquisition stage:
//   - spi3w_axil: AXI4-Lite wrapper and three-wire SPI master that configures
//     the converter (aclk domain);
//   - adc_if: LVDS buffers, DDR capture, framing on the FCO rising edge and
//     prescaler (DCO domain); bank D_B1 carries channels 0-7, D_B2 8-15;
//   - fifo_array: one asynchronous FIFO per channel, read out as one
//     AXI4-Stream per channel in the aclk domain.
// Timing: at 16.25 Msps and 12 bits the lanes run at 195 Mb/s and DCO at
// 97.5 MHz. A sample reaches its stream a few DCO periods plus three aclk
// periods after its last bit. Reset: aresetn (aclk domain) also resets the DCO
// domain through rst_sync; the DCO must be running while reset is released.
// The SDIO pin is split into sdio_o/sdio_oe/sdio_i for the I/O pad, and
// fifo_overflow flags a channel that lost samples because its stream was not
// read fast enough. The block structure follows the published acquisition
// stage; the stream organisation, FIFO depth, register map and overflow flag
// are this design's own.
module acq_top
  import acq_pkg::*;
#(
  parameter int unsigned NUM_CH_P   = acq_pkg::NUM_CH,
  parameter int unsigned RES_P      = acq_pkg::RES,
  parameter int unsigned DEPTH_P    = acq_pkg::FIFO_DEPTH,
  parameter int unsigned AXIS_W_P   = acq_pkg::AXIS_W,
  parameter int unsigned PRESC_W_P  = acq_pkg::PRESC_W
) (
  // converter LVDS outputs
  input  logic [NUM_CH_P/2-1:0]             db1_p,
  input  logic [NUM_CH_P/2-1:0]             db1_n,
  input  logic [NUM_CH_P/2-1:0]             db2_p,
  input  logic [NUM_CH_P/2-1:0]             db2_n,
  input  logic                              dco_p,
  input  logic                              dco_n,
  input  logic                              fco_p,
  input  logic                              fco_n,
  input  logic [PRESC_W_P-1:0]              prescale,
  // converter SPI port
  output logic                              spi_sclk,
  output logic                              spi_csb,
  output logic                              spi_sdio_o,
  output logic                              spi_sdio_oe,
  input  logic                              spi_sdio_i,
  output logic                              spi_busy,
  // processing system
  input  logic                              aclk,
  input  logic                              aresetn,
  input  logic [4:0]                        s_axil_awaddr,
  input  logic                              s_axil_awvalid,
  output logic                              s_axil_awready,
  input  logic [31:0]                       s_axil_wdata,
  input  logic [3:0]                        s_axil_wstrb,
  input  logic                              s_axil_wvalid,
  output logic                              s_axil_wready,
  output logic [1:0]                        s_axil_bresp,
  output logic                              s_axil_bvalid,
  input  logic                              s_axil_bready,
  input  logic [4:0]                        s_axil_araddr,
  input  logic                              s_axil_arvalid,
  output logic                              s_axil_arready,
  output logic [31:0]                       s_axil_rdata,
  output logic [1:0]                        s_axil_rresp,
  output logic                              s_axil_rvalid,
  input  logic                              s_axil_rready,
  output logic [NUM_CH_P-1:0][AXIS_W_P-1:0] m_axis_tdata,
  output logic [NUM_CH_P-1:0]               m_axis_tvalid,
  input  logic [NUM_CH_P-1:0]               m_axis_tready,
  output logic [NUM_CH_P-1:0]               fifo_overflow
);
  logic                            dco_clk, dco_rst;
  logic [NUM_CH_P-1:0][RES_P-1:0]  sample;
  logic                            sample_valid;

  spi3w_axil u_spi (
    .aclk          (aclk),
    .aresetn       (aresetn),
    .s_axil_awaddr (s_axil_awaddr),
    .s_axil_awvalid(s_axil_awvalid),
    .s_axil_awready(s_axil_awready),
    .s_axil_wdata  (s_axil_wdata),
    .s_axil_wstrb  (s_axil_wstrb),
    .s_axil_wvalid (s_axil_wvalid),
    .s_axil_wready (s_axil_wready),
    .s_axil_bresp  (s_axil_bresp),
    .s_axil_bvalid (s_axil_bvalid),
    .s_axil_bready (s_axil_bready),
    .s_axil_araddr (s_axil_araddr),
    .s_axil_arvalid(s_axil_arvalid),
    .s_axil_arready(s_axil_arready),
    .s_axil_rdata  (s_axil_rdata),
    .s_axil_rresp  (s_axil_rresp),
    .s_axil_rvalid (s_axil_rvalid),
    .s_axil_rready (s_axil_rready),
    .spi_sclk      (spi_sclk),
    .spi_csb       (spi_csb),
    .spi_sdio_o    (spi_sdio_o),
    .spi_sdio_oe   (spi_sdio_oe),
    .spi_sdio_i    (spi_sdio_i),
    .spi_busy      (spi_busy)
  );

  rst_sync u_rst_dco (.clk(dco_clk), .arst_n(aresetn), .rst_out(dco_rst));

  adc_if #(.NUM_CH(NUM_CH_P), .RES(RES_P), .PRESC_W(PRESC_W_P)) u_adc_if (
    .rst         (dco_rst),
    .d_p         ({db2_p, db1_p}),
    .d_n         ({db2_n, db1_n}),
    .dco_p       (dco_p),
    .dco_n       (dco_n),
    .fco_p       (fco_p),
    .fco_n       (fco_n),
    .prescale    (prescale),
    .dco_clk     (dco_clk),
    .sample      (sample),
    .sample_valid(sample_valid)
  );

  fifo_array #(.NUM_CH(NUM_CH_P), .RES(RES_P), .DEPTH(DEPTH_P), .AXIS_W(AXIS_W_P)) u_fifos (
    .wclk         (dco_clk),
    .wrst         (dco_rst),
    .wvalid       (sample_valid),
    .wdata        (sample),
    .aclk         (aclk),
    .aresetn      (aresetn),
    .m_axis_tdata (m_axis_tdata),
    .m_axis_tvalid(m_axis_tvalid),
    .m_axis_tready(m_axis_tready),
    .overflow     (fifo_overflow)
  );
endmodule

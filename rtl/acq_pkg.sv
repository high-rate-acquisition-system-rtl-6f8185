// Shared constants of the AD9249 acquisition stage.
//
// Channel organisation: the converter delivers 16 serial lanes, split into
// two banks of 8 (D_B1 = channels 0-7, D_B2 = channels 8-15). Each sample is
// sent as a 12-bit frame, MSB first, two bits per DCO period (DDR). The
// register map of the AXI4-Lite SPI wrapper is also defined here; the
// channel count and resolution follow the published system, the register map
// and stream width are this design's own choice.
package acq_pkg;
  localparam int unsigned NUM_CH     = 16;  // AD9249 channels
  localparam int unsigned BANK_LANES = 8;   // lanes per data bank
  localparam int unsigned RES        = 12;  // serial stream resolution
  localparam int unsigned AXIS_W     = 16;  // AXI4-Stream TDATA width
  localparam int unsigned FIFO_DEPTH = 1024;
  localparam int unsigned PRESC_W    = 16;

  // SPI wrapper (AXI4-Lite) register offsets
  localparam logic [4:0] REG_CTRL   = 5'h00;  // [0] start (self clearing), [1] cpol
  localparam logic [4:0] REG_STATUS = 5'h04;  // [0] busy
  localparam logic [4:0] REG_CLKDIV = 5'h08;  // SCLK half period - 1, in aclk cycles
  localparam logic [4:0] REG_LEN    = 5'h0C;  // [5:0] n_bits, [13:8] n_wr
  localparam logic [4:0] REG_TXDATA = 5'h10;  // right-aligned transmit bits
  localparam logic [4:0] REG_RXDATA = 5'h14;  // right-aligned received bits

  // AXI response codes
  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_SLVERR = 2'b10
  } axi_resp_e;
endpackage

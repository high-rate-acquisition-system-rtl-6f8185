// AXI4-Lite register wrapper around the three-wire SPI master.
//
// Lets the processor configure the SPI bus and run transactions. Registers
// (32-bit, byte strobes honoured), offsets from acq_pkg:
//   0x00 CTRL   W: bit0 = 1 starts a transaction (self clearing, ignored while
//                  busy); R/W bit1 = cpol
//   0x04 STATUS R: bit0 = busy
//   0x08 CLKDIV R/W: SCLK half period minus one, in aclk cycles (reset 4)
//   0x0C LEN    R/W: bits 5:0 n_bits, bits 13:8 n_wr (reset 24 and 24, an
//                  AD9249 register write: 16 instruction bits + 8 data bits)
//   0x10 TXDATA R/W: transmit bits, right-aligned
//   0x14 RXDATA R: received bits, right-aligned
// Handshake: a write is accepted when AWVALID and WVALID are both high and no
// response is pending (AWREADY = WREADY for that one cycle); BVALID follows on
// the next cycle. A read is accepted when no read data is pending; RVALID and
// RDATA follow on the next cycle. Responses are OKAY, also for unmapped
// offsets (reads return 0). All logic runs on aclk, reset by aresetn.
// The wrapper and its purpose (bus features and serial clock frequency set by
// the processor) follow the published design; the register map is this
// design's own.
module spi3w_axil
  import acq_pkg::*;
#(
  parameter int unsigned MAX_BITS = 32,
  parameter int unsigned DIV_W    = 16
) (
  input  logic        aclk,
  input  logic        aresetn,
  input  logic [4:0]  s_axil_awaddr,
  input  logic        s_axil_awvalid,
  output logic        s_axil_awready,
  input  logic [31:0] s_axil_wdata,
  input  logic [3:0]  s_axil_wstrb,
  input  logic        s_axil_wvalid,
  output logic        s_axil_wready,
  output logic [1:0]  s_axil_bresp,
  output logic        s_axil_bvalid,
  input  logic        s_axil_bready,
  input  logic [4:0]  s_axil_araddr,
  input  logic        s_axil_arvalid,
  output logic        s_axil_arready,
  output logic [31:0] s_axil_rdata,
  output logic [1:0]  s_axil_rresp,
  output logic        s_axil_rvalid,
  input  logic        s_axil_rready,
  output logic        spi_sclk,
  output logic        spi_csb,
  output logic        spi_sdio_o,
  output logic        spi_sdio_oe,
  input  logic        spi_sdio_i,
  output logic        spi_busy
);
  logic [31:0]         r_ctrl, r_clkdiv, r_len, r_tx;
  logic [MAX_BITS-1:0] rx;
  logic                start;
  logic                wr_go, rd_go;

  function automatic logic [31:0] apply_strb(input logic [31:0] old, input logic [31:0] nw,
                                             input logic [3:0] strb);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = strb[b] ? nw[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

  assign wr_go          = s_axil_awvalid && s_axil_wvalid && !s_axil_bvalid;
  assign s_axil_awready = wr_go;
  assign s_axil_wready  = wr_go;
  assign rd_go          = s_axil_arvalid && !s_axil_rvalid;
  assign s_axil_arready = rd_go;
  assign s_axil_bresp   = RESP_OKAY;
  assign s_axil_rresp   = RESP_OKAY;

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      r_ctrl        <= '0;
      r_clkdiv      <= 32'd4;
      r_len         <= {18'd0, 6'd24, 2'd0, 6'd24};
      r_tx          <= '0;
      start         <= 1'b0;
      s_axil_bvalid <= 1'b0;
      s_axil_rvalid <= 1'b0;
      s_axil_rdata  <= '0;
    end else begin
      start <= 1'b0;
      if (wr_go) begin
        s_axil_bvalid <= 1'b1;
        unique case (s_axil_awaddr & 5'h1C)
          REG_CTRL: begin
            r_ctrl <= apply_strb(r_ctrl, s_axil_wdata, s_axil_wstrb) & 32'h2;
            start  <= s_axil_wstrb[0] && s_axil_wdata[0] && !spi_busy;
          end
          REG_CLKDIV: r_clkdiv <= apply_strb(r_clkdiv, s_axil_wdata, s_axil_wstrb);
          REG_LEN:    r_len    <= apply_strb(r_len, s_axil_wdata, s_axil_wstrb);
          REG_TXDATA: r_tx     <= apply_strb(r_tx, s_axil_wdata, s_axil_wstrb);
          default: ;
        endcase
      end else if (s_axil_bready) begin
        s_axil_bvalid <= 1'b0;
      end

      if (rd_go) begin
        s_axil_rvalid <= 1'b1;
        unique case (s_axil_araddr & 5'h1C)
          REG_CTRL:   s_axil_rdata <= r_ctrl;
          REG_STATUS: s_axil_rdata <= {31'd0, spi_busy};
          REG_CLKDIV: s_axil_rdata <= r_clkdiv;
          REG_LEN:    s_axil_rdata <= r_len;
          REG_TXDATA: s_axil_rdata <= r_tx;
          REG_RXDATA: s_axil_rdata <= 32'(rx);
          default:    s_axil_rdata <= '0;
        endcase
      end else if (s_axil_rready) begin
        s_axil_rvalid <= 1'b0;
      end
    end
  end

  spi3w_ctrl #(.MAX_BITS(MAX_BITS), .DIV_W(DIV_W)) u_spi (
    .clk    (aclk),
    .rst    (!aresetn),
    .start  (start),
    .clk_div(r_clkdiv[DIV_W-1:0]),
    .cpol   (r_ctrl[1]),
    .n_bits (r_len[5:0]),
    .n_wr   (r_len[13:8]),
    .tx_data(r_tx[MAX_BITS-1:0]),
    .rx_data(rx),
    .busy   (spi_busy),
    .sclk   (spi_sclk),
    .csb    (spi_csb),
    .sdio_o (spi_sdio_o),
    .sdio_oe(spi_sdio_oe),
    .sdio_i (spi_sdio_i)
  );

  // AXI4-Lite: a response stays valid and unchanged until it is accepted.
  a_b_hold : assert property (@(posedge aclk) disable iff (!aresetn)
    s_axil_bvalid && !s_axil_bready |=> s_axil_bvalid);
  a_r_hold : assert property (@(posedge aclk) disable iff (!aresetn)
    s_axil_rvalid && !s_axil_rready |=> s_axil_rvalid && $stable(s_axil_rdata));
endmodule

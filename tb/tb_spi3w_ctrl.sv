// Self-checking testbench for spi3w_ctrl against the converter's SPI model.
//  - write transaction (24 bits, all driven): register 0x0D <- 0x01;
//  - read transactions (16 bits driven, 8 read): register 0x01 must return the
//    chip ID 0x92 and register 0x0D the value written;
//  - busy must last exactly (2*n_bits + 2)*(clk_div + 1) cycles, SCLK must
//    show n_bits rising edges, SDIO must be released only for read bits;
//  - with cpol=1 SCLK must idle high.
`timescale 1ps/1ps
module tb_spi3w_ctrl;
  logic clk = 1'b0, rst, start, cpol, busy, sclk, csb, sdio_o, sdio_oe, sdio_i;
  logic [15:0] clk_div;
  logic [5:0]  n_bits, n_wr;
  logic [31:0] tx_data, rx_data;
  logic        s_out, s_oe;
  int unsigned s_writes, s_reads, frame_no;
  logic [15:0] dp, dn;
  logic dcop, dcon, fcop, fcon;
  int checks = 0, failures = 0;
  int sclk_rises = 0, oe_conflicts = 0;

  spi3w_ctrl #(.MAX_BITS(32), .DIV_W(16)) dut (
    .clk(clk), .rst(rst), .start(start), .clk_div(clk_div), .cpol(cpol), .n_bits(n_bits),
    .n_wr(n_wr), .tx_data(tx_data), .rx_data(rx_data), .busy(busy), .sclk(sclk), .csb(csb),
    .sdio_o(sdio_o), .sdio_oe(sdio_oe), .sdio_i(sdio_i));

  ad9249_model #(.NUM_CH(16), .RES(12)) adc (
    .run(1'b0), .ext_en(1'b0), .ext_data('0), .d_p(dp), .d_n(dn), .dco_p(dcop), .dco_n(dcon), .fco_p(fcop), .fco_n(fcon),
    .frame_no(frame_no), .sclk(sclk ^ cpol), .csb(csb), .sdio_in(sdio_o), .sdio_out(s_out),
    .sdio_oe(s_oe), .spi_writes(s_writes), .spi_reads(s_reads));

  assign sdio_i = s_oe ? s_out : sdio_o;

  always #5000 clk = ~clk;
  always @(posedge sclk) sclk_rises++;
  always @(posedge clk) if (sdio_oe && s_oe) oe_conflicts++;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xfer(input logic [31:0] tx, input int nb, input int nw, input int div);
    int cycles, r0;
    @(negedge clk);
    tx_data = tx; n_bits = 6'(nb); n_wr = 6'(nw); clk_div = 16'(div);
    start = 1'b1;
    r0 = sclk_rises;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    while (busy) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != (2 * nb + 2) * (div + 1)) begin
      failures++; $display("busy for %0d cycles, expected %0d", cycles, (2 * nb + 2) * (div + 1));
    end
    checks++;
    if (!cpol && sclk_rises - r0 != nb) begin failures++; $display("%0d SCLK edges", sclk_rises - r0); end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; cpol = 1'b0; clk_div = 16'd3; n_bits = 6'd24; n_wr = 6'd24; tx_data = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    checks++; if (!csb || busy) begin failures++; $display("bus not idle after reset"); end
    // write 0x01 to register 0x0D
    xfer(32'h00_0D_01, 24, 24, 3);
    checks++; if (s_writes != 1 || adc.regs[8'h0D] != 8'h01) begin failures++; $display("write not seen by slave"); end
    // read chip ID
    xfer({8'h0, 16'h8001, 8'h00}, 24, 16, 2);
    checks++; if (rx_data[7:0] !== 8'h92) begin failures++; $display("chip id read %h", rx_data[7:0]); end
    // read back 0x0D with a slow clock
    xfer({8'h0, 16'h800D, 8'h00}, 24, 16, 7);
    checks++; if (rx_data[7:0] !== 8'h01) begin failures++; $display("reg 0x0D read %h", rx_data[7:0]); end
    checks++; if (s_reads != 2) begin failures++; $display("slave counted %0d reads", s_reads); end
    checks++; if (oe_conflicts != 0) begin failures++; $display("SDIO driven by both sides %0d cycles", oe_conflicts); end
    // cpol=1: SCLK idles high
    cpol = 1'b1;
    xfer(32'h00_0D_00, 24, 24, 1);
    checks++; if (sclk !== 1'b1 || adc.regs[8'h0D] != 8'h00) begin failures++; $display("cpol=1 transfer wrong"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

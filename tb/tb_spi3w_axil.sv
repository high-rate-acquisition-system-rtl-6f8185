// Self-checking testbench for spi3w_axil. An AXI4-Lite master (tasks below)
// configures the wrapper, runs a register write and a register read on the
// converter's SPI model, polls STATUS.busy and reads RXDATA. Register
// read-back, write strobes, the busy bit and the SPI results are checked.
`timescale 1ps/1ps
module tb_spi3w_axil;
  import acq_pkg::*;
  logic aclk = 1'b0, aresetn;
  logic [4:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  logic sclk, csb, sdio_o, sdio_oe, sdio_i, busy, s_out, s_oe;
  int unsigned s_writes, s_reads, frame_no;
  logic [15:0] dp, dn;
  logic dcop, dcon, fcop, fcon;
  int checks = 0, failures = 0, busy_polls = 0;

  spi3w_axil dut (
    .aclk(aclk), .aresetn(aresetn),
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .spi_sclk(sclk), .spi_csb(csb), .spi_sdio_o(sdio_o), .spi_sdio_oe(sdio_oe),
    .spi_sdio_i(sdio_i), .spi_busy(busy));

  ad9249_model adc (
    .run(1'b0), .ext_en(1'b0), .ext_data('0), .d_p(dp), .d_n(dn), .dco_p(dcop), .dco_n(dcon), .fco_p(fcop), .fco_n(fcon),
    .frame_no(frame_no), .sclk(sclk), .csb(csb), .sdio_in(sdio_o), .sdio_out(s_out),
    .sdio_oe(s_oe), .spi_writes(s_writes), .spi_reads(s_reads));

  assign sdio_i = s_oe ? s_out : sdio_o;

  always #5000 aclk = ~aclk;

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic axil_write(input logic [4:0] a, input logic [31:0] d, input logic [3:0] s = 4'hF);
    @(negedge aclk);
    awaddr = a; wdata = d; wstrb = s; awvalid = 1'b1; wvalid = 1'b1;
    do @(posedge aclk); while (!(awready && wready));
    @(negedge aclk);
    awvalid = 1'b0; wvalid = 1'b0;
    bready = 1'b0;
    repeat ($urandom_range(0, 2)) @(negedge aclk);
    bready = 1'b1;
    while (!bvalid) @(negedge aclk);
    checks++; if (bresp != RESP_OKAY) begin failures++; $display("bad bresp"); end
    @(negedge aclk);
    bready = 1'b0;
  endtask

  task automatic axil_read(input logic [4:0] a, output logic [31:0] d);
    @(negedge aclk);
    araddr = a; arvalid = 1'b1; rready = 1'b0;
    do @(posedge aclk); while (!arready);
    @(negedge aclk);
    arvalid = 1'b0;
    repeat ($urandom_range(0, 2)) @(negedge aclk);
    rready = 1'b1;
    while (!rvalid) @(negedge aclk);
    d = rdata;
    @(negedge aclk);
    rready = 1'b0;
  endtask

  task automatic expect_reg(input logic [4:0] a, input logic [31:0] e);
    logic [31:0] d;
    axil_read(a, d);
    checks++;
    if (d !== e) begin failures++; $display("reg %h read %h expected %h", a, d, e); end
  endtask

  task automatic wait_idle();
    logic [31:0] st;
    do begin axil_read(REG_STATUS, st); busy_polls += int'(st[0]); end while (st[0]);
  endtask

  initial begin
    logic [31:0] st;
    aresetn = 1'b0; awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awaddr = 0; araddr = 0; wdata = 0; wstrb = 0;
    repeat (4) @(posedge aclk);
    #1 aresetn = 1'b1;
    expect_reg(REG_CLKDIV, 32'd4);
    expect_reg(REG_LEN, 32'h0000_1818);
    axil_write(REG_CLKDIV, 32'd2);
    expect_reg(REG_CLKDIV, 32'd2);
    axil_write(REG_TXDATA, 32'hFFFF_FFFF);
    axil_write(REG_TXDATA, 32'h0000_0D01, 4'b0011);   // only the low half
    expect_reg(REG_TXDATA, 32'hFFFF_0D01);
    axil_write(REG_TXDATA, 32'h0000_0D01);
    axil_write(REG_CTRL, 32'h1);
    axil_read(REG_STATUS, st);
    checks++; if (!st[0]) begin failures++; $display("busy not set after start"); end
    wait_idle();
    checks++; if (adc.regs[8'h0D] != 8'h01 || s_writes != 1) begin failures++; $display("SPI write not done"); end
    // read chip id
    axil_write(REG_LEN, {18'd0, 6'd16, 2'd0, 6'd24});
    axil_write(REG_TXDATA, 32'h0080_0100);
    axil_write(REG_CTRL, 32'h1);
    wait_idle();
    expect_reg(REG_RXDATA, 32'h0000_0092);
    checks++; if (busy_polls == 0) begin failures++; $display("busy never observed"); end
    expect_reg(REG_CTRL, 32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

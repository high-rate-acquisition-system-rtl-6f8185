// Behavioural model of the AD9249 converter's digital outputs, for testbenches.
//
// Serial LVDS side: every channel sends one RES-bit sample per frame, MSB
// first, one bit per BIT_PS picoseconds. The bit clock DCO toggles in the
// middle of every bit (rising in the middle of even bits, so a frame starts on
// a rising edge; with FALL_START set the first bit of a frame is centred on a
// falling edge instead), and the frame clock FCO is high for the first RES/2
// bits.
// Sample values (offset binary, test mode off):
//     sample(k, c) = (k + 256*c) mod 2^RES      k = frame number, c = channel
// which lets a checker recover k from any sample. Register 0x0D (test mode)
// = 0x01 replaces every sample with mid-scale 2^(RES-1). With ext_en high the
// samples are taken from ext_data instead (an "analog" input supplied by the
// testbench). frame_no is advanced half a bit before the end of each frame, so
// a testbench that computes ext_data from frame_no has that half bit to do it
// before the next frame is loaded.
// `run` gates the outputs: while low the lanes sit at 0 and DCO stops.
// SPI side: three-wire port with a 16-bit instruction (bit 15 read, bits 14:13
// byte count - 1, only single bytes are modelled, bits 12:0 address) followed
// by one data byte; write data is taken on SCLK rising edges, read data is
// driven after SCLK falling edges. Register 0x01 holds the chip ID 0x92.
// spi_writes / spi_reads count completed transfers. Not synthesisable.
`timescale 1ps/1ps
module ad9249_model #(
  parameter int unsigned NUM_CH = 16,
  parameter int unsigned RES    = 12,
  parameter int unsigned BIT_PS = 5128,
  parameter bit          FALL_START = 1'b0
) (
  input  logic              run,
  input  logic              ext_en,
  input  logic [NUM_CH-1:0][RES-1:0] ext_data,
  output logic [NUM_CH-1:0] d_p,
  output logic [NUM_CH-1:0] d_n,
  output logic              dco_p,
  output logic              dco_n,
  output logic              fco_p,
  output logic              fco_n,
  output int unsigned       frame_no,
  input  logic              sclk,
  input  logic              csb,
  input  logic              sdio_in,
  output logic              sdio_out,
  output logic              sdio_oe,
  output int unsigned       spi_writes,
  output int unsigned       spi_reads
);
  logic [7:0] regs [256];
  logic [NUM_CH-1:0] d;
  logic dco, fco;

  assign d_p = d;  assign d_n = ~d;
  assign dco_p = dco; assign dco_n = ~dco;
  assign fco_p = fco; assign fco_n = ~fco;

  function automatic logic [RES-1:0] sample(input int unsigned k, input int unsigned c);
    return RES'(k + 256 * c);
  endfunction

  initial begin
    for (int i = 0; i < 256; i++) regs[i] = 8'h00;
    regs[1] = 8'h92;
    d = '0; dco = 1'b0; fco = 1'b0; frame_no = 0;
  end

  // ---- serial data ----
  initial begin
    logic [RES-1:0] w [NUM_CH];
    forever begin
      if (!run) begin
        d = '0; fco = 1'b0;
        #(BIT_PS);
      end else begin
        for (int c = 0; c < NUM_CH; c++)
          w[c] = (regs[8'h0D][3:0] == 4'h1) ? RES'(1 << (RES - 1)) :
                 ext_en ? ext_data[c] : sample(frame_no, c);
        for (int b = 0; b < RES; b++) begin
          for (int c = 0; c < NUM_CH; c++) d[c] = w[c][RES-1-b];
          fco = (b < RES / 2);
          #(BIT_PS / 2);
          dco = ((b + int'(FALL_START)) % 2 == 0);
          if (b == RES - 1) frame_no++;
          #(BIT_PS - BIT_PS / 2);
        end
      end
    end
  end

  // ---- SPI ----
  int          bitn;
  logic [15:0] instr;
  logic [7:0]  data;
  initial begin
    bitn = 0; instr = '0; data = '0; sdio_out = 1'b0; sdio_oe = 1'b0;
    spi_writes = 0; spi_reads = 0;
  end

  always @(negedge csb) begin
    bitn = 0; sdio_oe = 1'b0;
  end
  always @(posedge csb) sdio_oe = 1'b0;

  always @(posedge sclk) if (!csb) begin
    if (bitn < 16) begin
      instr = {instr[14:0], sdio_in};
    end else if (!instr[15]) begin
      data = {data[6:0], sdio_in};
      if (bitn == 23) begin
        regs[instr[7:0]] = data;
        spi_writes++;
      end
    end else if (bitn == 23) begin
      spi_reads++;
    end
    bitn++;
  end

  always @(negedge sclk) if (!csb && instr[15] && bitn >= 16 && bitn < 24) begin
    sdio_oe  = 1'b1;
    sdio_out = regs[instr[7:0]][23 - bitn];
  end
endmodule

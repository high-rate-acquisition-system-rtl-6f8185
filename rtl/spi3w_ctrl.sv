// Three-wire SPI master for the converter's configuration port.
//
// The bus has a chip select CSB (active low), a serial clock SCLK and one
// bidirectional data line SDIO, presented here as sdio_o / sdio_oe / sdio_i
// for the I/O pad. A transaction is n_bits long, MSB first; the first n_wr
// bits are driven by the master (instruction and write data), the remaining
// bits are read from the slave after SDIO has been turned around.
//
// Hierarchical state machine. Top level:
//   IDLE  - CSB high, SCLK idle, busy low; `start` latches the settings.
//   SETUP - CSB low, first bit driven, SCLK still idle (one half period).
//   XFER  - the bit loop, with a clock-phase sub-state:
//             HIGH: SCLK active; a read bit is sampled on entry (rising edge);
//             LOW : SCLK idle; the next bit is shifted out.
//   HOLD  - after the last bit, CSB still low for one half period.
//   GAP   - CSB high for one half period before a new start is accepted.
// Every state and phase lasts clk_div+1 clk cycles, so SCLK runs at
// f_clk / (2*(clk_div+1)). A transaction takes (2*n_bits + 2)*(clk_div+1)
// cycles from start to busy falling, the GAP included. With cpol=1 the SCLK
// waveform is inverted (idle high, bits then sampled on falling edges).
// tx_data is right-aligned (bit n_bits-1 goes first); rx_data holds the read
// bits right-aligned, the last one in bit 0, and is cleared at start.
// The published controller is named as an HSM with a busy port managing the
// three lines before, during and after a transaction; the state breakdown,
// timing and the settings offered are this design's choice.
module spi3w_ctrl #(
  parameter int unsigned MAX_BITS = 32,
  parameter int unsigned DIV_W    = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic [DIV_W-1:0]    clk_div,
  input  logic                cpol,
  input  logic [5:0]          n_bits,
  input  logic [5:0]          n_wr,
  input  logic [MAX_BITS-1:0] tx_data,
  output logic [MAX_BITS-1:0] rx_data,
  output logic                busy,
  output logic                sclk,
  output logic                csb,
  output logic                sdio_o,
  output logic                sdio_oe,
  input  logic                sdio_i
);
  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_XFER, S_HOLD, S_GAP} state_e;
  typedef enum logic {PH_LOW, PH_HIGH} phase_e;

  state_e              state;
  phase_e              phase;
  logic [DIV_W-1:0]    div_q, cnt;
  logic                cpol_q;
  logic [5:0]          nbits_q, nwr_q, bit_idx;
  logic [MAX_BITS-1:0] shreg;
  logic                tick, is_read_bit;

  assign tick        = (cnt == div_q);
  assign is_read_bit = (bit_idx >= nwr_q);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      phase   <= PH_LOW;
      cnt     <= '0;
      div_q   <= '0;
      cpol_q  <= 1'b0;
      nbits_q <= '0;
      nwr_q   <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      rx_data <= '0;
    end else begin
      cnt <= (state == S_IDLE || tick) ? '0 : cnt + 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          div_q   <= clk_div;
          cpol_q  <= cpol;
          nbits_q <= (n_bits == 0) ? 6'd1 : n_bits;
          nwr_q   <= n_wr;
          bit_idx <= '0;
          shreg   <= tx_data << (MAX_BITS - ((n_bits == 0) ? 1 : int'(n_bits)));
          rx_data <= '0;
          phase   <= PH_LOW;
          state   <= S_SETUP;
        end
        S_SETUP: if (tick) begin
          state <= S_XFER;
          phase <= PH_HIGH;
          if (is_read_bit) rx_data <= {rx_data[MAX_BITS-2:0], sdio_i};
        end
        S_XFER: if (tick) begin
          if (phase == PH_HIGH) begin
            if (bit_idx == nbits_q - 1'b1) begin
              state <= S_HOLD;
            end else begin
              phase   <= PH_LOW;
              bit_idx <= bit_idx + 1'b1;
              shreg   <= shreg << 1;
            end
          end else begin
            phase <= PH_HIGH;
            if (is_read_bit) rx_data <= {rx_data[MAX_BITS-2:0], sdio_i};
          end
        end
        S_HOLD: if (tick) state <= S_GAP;
        S_GAP:  if (tick) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy    = (state != S_IDLE);
  assign csb     = !(state == S_SETUP || state == S_XFER || state == S_HOLD);
  assign sclk    = cpol_q ^ (state == S_XFER && phase == PH_HIGH);
  assign sdio_o  = shreg[MAX_BITS-1];
  assign sdio_oe = (state == S_SETUP || state == S_XFER) && !is_read_bit;

  // Settings must not change the shape of a running transaction.
  a_start_len : assert property (@(posedge clk) disable iff (rst)
    start && !busy |-> n_wr <= n_bits);
endmodule

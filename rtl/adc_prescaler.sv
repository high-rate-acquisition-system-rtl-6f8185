// Frame prescaler (downsampler) of the ADC interface.
//
// Passes one of every `ratio` input strobes: the first strobe after reset is
// kept, then every ratio-th after it. A ratio of 0 or 1 keeps every frame. The
// samples themselves are not filtered, only decimated. out_valid is
// combinational from in_valid and the internal counter, so the kept frame is
// marked in the same cycle it arrives. The ratio is read at every strobe; a
// change takes effect when the running count next wraps.
module adc_prescaler #(
  parameter int unsigned PRESC_W = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [PRESC_W-1:0] ratio,
  input  logic               in_valid,
  output logic               out_valid
);
  logic [PRESC_W-1:0] cnt;  // strobes since the last kept one
  logic               wrap;

  assign wrap      = (cnt == '0);
  assign out_valid = in_valid && wrap;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
    end else if (in_valid) begin
      if (ratio <= 1 || cnt == ratio - 1'b1) cnt <= '0;
      else                                   cnt <= cnt + 1'b1;
    end
  end
endmodule

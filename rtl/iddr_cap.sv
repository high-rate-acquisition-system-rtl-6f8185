// Double-data-rate capture stage for the serial ADC lanes.
//
// Every line in d is sampled on both edges of the bit clock: on the rising
// edge into r and on the falling edge into f. On the next rising edge both
// bits are presented together, q_rise being the earlier bit (taken at the
// previous rising edge) and q_fall the later one (taken at the falling edge
// in between). This "same edge, pipelined" alignment lets everything after it
// run on the rising edge only. Latency: q_rise appears one clock after it was
// sampled, q_fall half a clock after.
module iddr_cap #(
  parameter int unsigned W = 17
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q_rise,
  output logic [W-1:0] q_fall
);
  logic [W-1:0] r, f;

  always_ff @(posedge clk) r <= d;
  always_ff @(negedge clk) f <= d;

  always_ff @(posedge clk) begin
    q_rise <= r;
    q_fall <= f;
  end
endmodule

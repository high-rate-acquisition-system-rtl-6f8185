// Behavioural model of an FPGA differential (LVDS) input buffer.
//
// This is a model of the I/O primitive that converts each AD9249 LVDS pair
// into a single-ended signal, not logic to be synthesised into fabric; on the
// FPGA the vendor's differential input buffer takes its place. The output
// follows the sign of (i_p - i_n). When both legs carry the same level (an
// open or undriven pair) the output keeps its last value, which models the
// receiver's fail-safe hysteresis; that hold is why the model is written as a
// latch, and the latch warning for this file is expected. No delay is
// modelled.
module lvds_ibuf (
  input  logic i_p,
  input  logic i_n,
  output logic o
);
  always_latch begin
    if (i_p != i_n) o = i_p;
  end
endmodule

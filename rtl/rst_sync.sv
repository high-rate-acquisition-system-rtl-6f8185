// Reset synchroniser: asserts asynchronously, releases synchronously.
//
// rst_out goes high as soon as arst_n falls and stays high until two rising
// edges of clk have seen arst_n high again, so the release is aligned to clk.
// Used to bring the processor's reset into the converter's bit-clock domain.
module rst_sync (
  input  logic clk,
  input  logic arst_n,
  output logic rst_out
);
  logic s1, s2;
  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) begin
      s1 <= 1'b1;
      s2 <= 1'b1;
    end else begin
      s1 <= 1'b0;
      s2 <= s1;
    end
  end
  assign rst_out = s2;
endmodule

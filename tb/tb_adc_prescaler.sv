// Self-checking testbench for adc_prescaler. For several ratios (including 0
// and 1, which keep everything) random input strobes are applied after a
// reset; the strobe with index i since reset must be kept exactly when
// i mod ratio == 0.
`timescale 1ps/1ps
module tb_adc_prescaler;
  logic clk = 1'b0, rst, in_valid, out_valid;
  logic [15:0] ratio;
  int checks = 0, failures = 0;

  adc_prescaler #(.PRESC_W(16)) dut (.clk(clk), .rst(rst), .ratio(ratio),
                                     .in_valid(in_valid), .out_valid(out_valid));

  always #5000 clk = ~clk;

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ratios [6] = '{1, 2, 3, 7, 0, 16};
    in_valid = 1'b0; rst = 1'b1; ratio = 16'd1;
    foreach (ratios[r]) begin
      int idx, kept;
      idx = 0; kept = 0;
      ratio = 16'(ratios[r]);
      rst = 1'b1; in_valid = 1'b0;
      repeat (2) @(posedge clk);
      #1 rst = 1'b0;
      for (int cyc = 0; cyc < 300; cyc++) begin
        @(negedge clk);
        in_valid = ($urandom_range(0, 2) != 0);
        #1;
        if (in_valid) begin
          logic exp_keep;
          exp_keep = (ratios[r] <= 1) || (idx % ratios[r] == 0);
          checks++;
          if (out_valid !== exp_keep) begin
            failures++;
            $display("ratio %0d strobe %0d: out_valid=%b expected %b", ratios[r], idx, out_valid, exp_keep);
          end
          kept += int'(out_valid);
          idx++;
        end else begin
          checks++;
          if (out_valid) begin failures++; $display("out_valid without in_valid"); end
        end
      end
      $display("ratio %0d: %0d of %0d strobes kept", ratios[r], kept, idx);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

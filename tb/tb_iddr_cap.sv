// Self-checking testbench for iddr_cap. A random bit stream is driven on W
// lines, one bit per half period of the clock, centred on the clock edges.
// After rising edge k+1 the outputs must hold the bits centred on rising
// edge k (q_rise) and on the falling edge after it (q_fall).
`timescale 1ps/1ps
module tb_iddr_cap;
  localparam int W = 4;
  localparam int HALF = 5000;
  localparam int N = 200;
  logic clk = 1'b0;
  logic [W-1:0] d, q_rise, q_fall;
  logic [W-1:0] bits [2*N];
  int checks = 0, failures = 0;

  iddr_cap #(.W(W)) dut (.clk(clk), .d(d), .q_rise(q_rise), .q_fall(q_fall));

  initial begin
    #(100 * HALF * N);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bit i is on the wire from i*HALF - HALF/2 to i*HALF + HALF/2; edge i/2 at i*HALF
  initial begin
    for (int i = 0; i < 2 * N; i++) bits[i] = W'($urandom);
    d = bits[0];
    #(HALF / 2);
    for (int i = 1; i < 2 * N; i++) begin
      d = bits[i];
      #(HALF);
    end
  end

  initial begin
    #(HALF * 2 * 2);   // clock starts at t=0, first rising edge at 2*HALF
    forever #(HALF) clk = ~clk;
  end

  // rising edges at t = 2*HALF*(k+1)... compare after each one
  initial begin
    @(posedge clk);  // edge at bits index 4? compute from time
    for (int e = 0; e < N - 4; e++) begin
      int k;
      @(posedge clk);
      #(HALF / 4);
      // this rising edge is at time t; the previous one captured bit (t - 2*HALF)/HALF
      k = int'(($time - HALF / 4) / HALF) - 2;
      checks++;
      if (q_rise !== bits[k] || q_fall !== bits[k + 1]) begin
        failures++;
        $display("edge %0d: got %b/%b expected %b/%b", e, q_rise, q_fall, bits[k], bits[k + 1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for lvds_ibuf: the output follows p when p != n and
// holds its last value when both legs are equal. A reference value is kept in
// the testbench and compared after every random change of the pair.
`timescale 1ps/1ps
module tb_lvds_ibuf;
  logic p, n, o, ref_o;
  int checks = 0, failures = 0;

  lvds_ibuf dut (.i_p(p), .i_n(n), .o(o));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int holds = 0;
    p = 1'b1; n = 1'b0; ref_o = 1'b1;
    #10;
    checks++; if (o !== 1'b1) begin failures++; $display("initial drive failed"); end
    for (int i = 0; i < 400; i++) begin
      {p, n} = 2'($urandom);
      if (p != n) ref_o = p; else holds++;
      #10;
      checks++;
      if (o !== ref_o) begin
        failures++;
        $display("step %0d p=%b n=%b o=%b expected %b", i, p, n, o, ref_o);
      end
    end
    checks++; if (holds == 0) begin failures++; $display("hold case never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

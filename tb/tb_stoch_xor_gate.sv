// tb_stoch_xor_gate: checks the parity-check stochastic gate.
// Cycle by cycle the output must equal the XOR of the previous inputs; over a
// long run with independent streams Pa = 0.2, Pb = 0.3 the output frequency
// must be near 0.2*0.7 + 0.8*0.3 = 0.38. clr must force 0.
module tb_stoch_xor_gate;
  logic clk = 0, rst_n = 1, clr = 0, a = 0, b = 0, c;
  int checks = 0, failures = 0, ones = 0;
  logic exp_c;
  localparam int RUN = 20000;

  stoch_xor_gate dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a falling edge applies the asynchronous reset

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    checks++; if (c !== 1'b0) begin failures++; $display("reset value %b", c); end
    for (int t = 0; t < RUN; t++) begin
      @(negedge clk);
      a = ($urandom_range(999) < 200);
      b = ($urandom_range(999) < 300);
      exp_c = a ^ b;
      @(posedge clk); #1;
      checks++;
      if (c !== exp_c) begin failures++; if (failures < 10) $display("t=%0d c=%b exp=%b", t, c, exp_c); end
      ones += c;
    end
    checks++;
    if (ones < int'(0.36 * RUN) || ones > int'(0.40 * RUN)) begin
      failures++; $display("frequency %0d / %0d", ones, RUN);
    end
    @(negedge clk); a = 1; b = 0; clr = 1;
    @(posedge clk); #1; checks++; if (c !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

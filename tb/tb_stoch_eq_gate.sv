// tb_stoch_eq_gate: checks the J-K equality stochastic gate.
// A behavioural reference (set on 11, clear on 00, hold otherwise) is compared
// every cycle, and with Pa = 0.7, Pb = 0.6 the output frequency must be near
// 0.42 / (0.42 + 0.12) = 0.778. clr must force 0.
module tb_stoch_eq_gate;
  logic clk = 0, rst_n = 1, clr = 0, a = 0, b = 0, c;
  int checks = 0, failures = 0, ones = 0;
  logic ref_c = 0;
  localparam int RUN = 20000;

  stoch_eq_gate dut (.*);
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
    for (int t = 0; t < RUN; t++) begin
      @(negedge clk);
      a = ($urandom_range(999) < 700);
      b = ($urandom_range(999) < 600);
      case ({a, b})
        2'b11: ref_c = 1'b1;
        2'b00: ref_c = 1'b0;
        default: ;
      endcase
      @(posedge clk); #1;
      checks++;
      if (c !== ref_c) begin failures++; if (failures < 10) $display("t=%0d c=%b exp=%b", t, c, ref_c); end
      ones += c;
    end
    checks++;
    if (ones < int'(0.75 * RUN) || ones > int'(0.805 * RUN)) begin
      failures++; $display("frequency %0d / %0d", ones, RUN);
    end
    @(negedge clk); a = 1; b = 1; @(posedge clk); #1;
    @(negedge clk); clr = 1; @(posedge clk); #1;
    checks++; if (c !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

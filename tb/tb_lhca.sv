// tb_lhca: checks the rule-90/150 cellular automaton.
// 1) A 13-cell automaton with a rule vector whose characteristic polynomial is
//    primitive must return to its seed after exactly 2^13 - 1 = 8191 steps and
//    never pass through zero.
// 2) The default 31-cell automaton is compared step by step with a model of
//    the cell rule q[i] <= q[i-1] ^ q[i+1] ^ (rule[i] & q[i]), and its bits
//    must be balanced.
// 3) en low must freeze the state.
module tb_lhca;
  logic clk = 0, rst_n = 1, en = 0;
  logic [12:0] q13;
  logic [30:0] q31, m31;
  localparam logic [12:0] R13 = 13'h0BA0;
  localparam logic [30:0] R31 = 31'h16d7b4b2;
  int checks = 0, failures = 0;

  lhca #(.N(13), .RULE(R13), .SEED(13'h1)) dut13 (.clk, .rst_n, .en, .q(q13));
  lhca dut31 (.clk, .rst_n, .en, .q(q31));
  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a falling edge applies the asynchronous reset

  function automatic logic [30:0] step31(logic [30:0] s);
    logic [30:0] r;
    for (int i = 0; i < 31; i++)
      r[i] = (i > 0 ? s[i-1] : 1'b0) ^ (i < 30 ? s[i+1] : 1'b0) ^ (R31[i] & s[i]);
    return r;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int period = 0, zero_seen = 0, ones = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    m31 = 31'd1;
    checks++; if (q31 !== m31 || q13 !== 13'h1) failures++;
    @(negedge clk); en = 1;
    do begin
      @(posedge clk); #1;
      period++;
      if (q13 == '0) zero_seen++;
      m31 = step31(m31);
      checks++;
      if (q31 !== m31) begin failures++; if (failures < 10) $display("step %0d q31=%h exp=%h", period, q31, m31); end
      ones += $countones(q31);
    end while (q13 !== 13'h1 && period < 20000);
    checks++;
    if (period != 8191) begin failures++; $display("period %0d", period); end
    checks++;
    if (zero_seen != 0) failures++;
    checks++;
    if (real'(ones) / (31.0 * period) < 0.47 || real'(ones) / (31.0 * period) > 0.53) begin
      failures++; $display("ones fraction %f", real'(ones) / (31.0 * period));
    end
    @(negedge clk); en = 0; m31 = q31;
    repeat (5) @(posedge clk); #1;
    checks++; if (q31 !== m31) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_var_node: checks the stochastic equality node.
// A behavioural model of J-K equality gates (set on 11, clear on 00, hold
// otherwise), chained the way the node is specified, is run next to the node
// for a degree-2 and a degree-1 node with random streams and compared every
// cycle:
//   degree 2: out[0] = EQ(ch, in[1]), out[1] = EQ(ch, in[0]),
//             dec = EQ(EQ(ch, in[0]), in[1])
//   degree 1: out[0] = ch, dec = EQ(ch, in[0])
// A frequency check on the degree-1 decision stream (ch 0.6, in 0.7 ->
// 0.42 / (0.42 + 0.12) = 0.778) follows.
module tb_var_node;
  logic clk = 0, rst_n = 1, clr = 0;
  logic ch = 0;
  logic [1:0] in2 = '0, out2;
  logic [0:0] in1 = '0, out1;
  logic dec2, dec1;
  int checks = 0, failures = 0, ones = 0;
  // model state
  logic m_o0 = 0, m_o1 = 0, m_a = 0, m_d2 = 0, m_d1 = 0;
  localparam int RUN = 20000;

  var_node #(.DEG(2)) dut2 (.clk, .rst_n, .clr, .ch, .in_msg(in2), .out_msg(out2), .dec(dec2));
  var_node #(.DEG(1)) dut1 (.clk, .rst_n, .clr, .ch, .in_msg(in1), .out_msg(out1), .dec(dec1));
  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a falling edge applies the asynchronous reset

  function automatic logic jk(logic q, logic a, logic b);
    return (a && b) ? 1'b1 : (!a && !b) ? 1'b0 : q;
  endfunction

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
      ch  = ($urandom_range(999) < 600);
      in2 = 2'($urandom);
      in1 = ($urandom_range(999) < 700);
      // combinational pass-through of the degree-1 node
      #1; checks++;
      if (out1[0] !== ch) failures++;
      // model update for this edge
      m_d2 = jk(m_d2, m_a, in2[1]);   // uses the old m_a
      m_a  = jk(m_a, ch, in2[0]);
      m_o0 = jk(m_o0, ch, in2[1]);
      m_o1 = jk(m_o1, ch, in2[0]);
      m_d1 = jk(m_d1, ch, in1[0]);
      @(posedge clk); #1;
      checks += 4;
      if (out2 !== {m_o1, m_o0}) begin failures++; if (failures < 10) $display("t=%0d out2=%b exp=%b", t, out2, {m_o1, m_o0}); end
      if (dec2 !== m_d2) begin failures++; if (failures < 10) $display("t=%0d dec2=%b exp=%b", t, dec2, m_d2); end
      if (dec1 !== m_d1) begin failures++; if (failures < 10) $display("t=%0d dec1=%b exp=%b", t, dec1, m_d1); end
      if (out1[0] !== ch) failures++;
      ones += dec1;
    end
    checks++;
    if (ones < int'(0.75 * RUN) || ones > int'(0.805 * RUN)) begin
      failures++; $display("frequency %0d / %0d", ones, RUN);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

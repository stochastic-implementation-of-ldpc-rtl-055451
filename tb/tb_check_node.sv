// tb_check_node: checks the stochastic parity-check node.
// With random inputs every edge output must be, one cycle later, the XOR of
// the other edges' inputs. Run for the degree-3 node of the code and for a
// degree-4 node.
module tb_check_node;
  logic clk = 0, rst_n = 1, clr = 0;
  logic [2:0] in3, out3, exp3;
  logic [3:0] in4, out4, exp4;
  int checks = 0, failures = 0;

  check_node #(.DEG(3)) dut3 (.clk, .rst_n, .clr, .in_msg(in3), .out_msg(out3));
  check_node #(.DEG(4)) dut4 (.clk, .rst_n, .clr, .in_msg(in4), .out_msg(out4));
  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a falling edge applies the asynchronous reset

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in3 = '0; in4 = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      in3 = 3'($urandom); in4 = 4'($urandom);
      exp3 = {in3[0] ^ in3[1], in3[0] ^ in3[2], in3[1] ^ in3[2]};
      exp4 = {in4[0] ^ in4[1] ^ in4[2], in4[0] ^ in4[1] ^ in4[3],
              in4[0] ^ in4[2] ^ in4[3], in4[1] ^ in4[2] ^ in4[3]};
      @(posedge clk); #1;
      checks += 2;
      if (out3 !== exp3) begin failures++; if (failures < 10) $display("deg3 in=%b out=%b exp=%b", in3, out3, exp3); end
      if (out4 !== exp4) begin failures++; if (failures < 10) $display("deg4 in=%b out=%b exp=%b", in4, out4, exp4); end
    end
    @(negedge clk); in3 = 3'b001; clr = 1; @(posedge clk); #1;
    checks++; if (out3 !== 3'b000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

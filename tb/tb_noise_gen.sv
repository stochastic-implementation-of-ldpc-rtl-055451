// tb_noise_gen: checks the decoder's random-bit source.
// Over 8000 cycles every one of the 176 bits must be a one between 44% and
// 56% of the time, each pair of neighbouring bits must agree between 44% and
// 56% of the time (no strong correlation), and the 31 bits of the first
// automaton must follow the rule-90/150 update with the package's rule vector.
module tb_noise_gen;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 1, en = 0;
  logic [NOISE_ALL-1:0] noise, prev;
  int checks = 0, failures = 0;
  int ones [NOISE_ALL];
  int agree [NOISE_ALL];
  localparam int RUN = 8000;

  noise_gen dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a falling edge applies the asynchronous reset

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ones[i]) begin ones[i] = 0; agree[i] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk); en = 1;
    prev = noise;
    for (int t = 0; t < RUN; t++) begin
      logic [LHCA_N0-1:0] exp0;
      @(posedge clk); #1;
      for (int i = 0; i < LHCA_N0; i++)
        exp0[i] = (i > 0 ? prev[i-1] : 1'b0) ^ (i < LHCA_N0 - 1 ? prev[i+1] : 1'b0) ^ (LHCA_R0[i] & prev[i]);
      checks++;
      if (noise[LHCA_N0-1:0] !== exp0) begin failures++; if (failures < 10) $display("t=%0d automaton 0 mismatch", t); end
      for (int i = 0; i < NOISE_ALL; i++) begin
        ones[i] += noise[i];
        if (i > 0) agree[i] += (noise[i] == noise[i-1]);
      end
      prev = noise;
    end
    for (int i = 0; i < NOISE_ALL; i++) begin
      checks++;
      if (ones[i] < int'(0.44 * RUN) || ones[i] > int'(0.56 * RUN)) begin
        failures++; $display("bit %0d ones %0d", i, ones[i]);
      end
      if (i > 0) begin
        checks++;
        if (agree[i] < int'(0.44 * RUN) || agree[i] > int'(0.56 * RUN)) begin
          failures++; $display("bits %0d,%0d agree %0d", i - 1, i, agree[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_stoch_graph: checks that the stochastic factor graph corrects errors.
// Random codewords of the (16,8) code are presented as channel streams (a
// correct bit with probability 0.9 of showing its value each cycle), with
// one or two bits given on the wrong side (0.45 towards the true value). The
// graph runs 64 cycles to settle and then its decision streams are counted
// for 512 cycles; the majority of every decision stream must equal the sent
// codeword, so every wrong channel bit must have been corrected by the graph.
module tb_stoch_graph;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 1, clr = 0;
  logic [N_VAR-1:0] ch = '0, dec;
  logic [NOISE_SN-1:0] noise = '0;
  int checks = 0, failures = 0;
  int trials_fixed = 0, bit_errors = 0;
  localparam int TRIALS = 60;

  stoch_graph dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a falling edge applies the asynchronous reset

  function automatic logic [15:0] encode(logic [7:0] u);
    logic [15:0] c = '0;
    for (int i = 0; i < 8; i++) c[2*i+1] = u[i];
    for (int j = 0; j < 8; j++) c[2*j] = c[(2*j+15) % 16] ^ c[2*j+1];
    return c;
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
    for (int tr = 0; tr < TRIALS; tr++) begin
      logic [15:0] cw, wrong;
      int p_true [16];
      int cnt [16];
      cw = encode(8'($urandom));
      wrong = 16'h1 << $urandom_range(15);
      if (tr % 3 == 2) wrong |= 16'h1 << ((($urandom_range(3) + 4) + $clog2(wrong)) % 16);
      for (int v = 0; v < 16; v++) begin
        p_true[v] = wrong[v] ? 450 : 900;   // per mille probability of the true value
        cnt[v] = 0;
      end
      @(negedge clk); clr = 1; @(negedge clk); clr = 0;
      for (int t = 0; t < 64 + 512; t++) begin
        for (int v = 0; v < 16; v++)
          ch[v] = ($urandom_range(999) < p_true[v]) ? cw[v] : ~cw[v];
        for (int i = 0; i < NOISE_SN / 16; i++) noise[i*16 +: 16] = 16'($urandom);
        @(posedge clk); #1;
        if (t >= 64) for (int v = 0; v < 16; v++) cnt[v] += dec[v];
        @(negedge clk);
      end
      for (int v = 0; v < 16; v++) begin
        logic hard;
        hard = (cnt[v] >= 256);
        checks++;
        if (hard !== cw[v]) begin
          failures++; bit_errors++;
          $display("trial %0d bit %0d: ones %0d/512, sent %b, channel wrong %b", tr, v, cnt[v], cw[v], wrong[v]);
        end
      end
      trials_fixed++;
    end
    $display("trials %0d, bit errors %0d", trials_fixed, bit_errors);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

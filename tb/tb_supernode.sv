// tb_supernode: checks the stream regenerator.
// A reference model counts the ones of each 2^W-cycle window (saturating at
// 2^W - 1), holds the tally for the next window (2^(W-1) after reset), and
// predicts every output bit from the held tally and the noise bits through the
// priority rule of the converter. Input streams of several densities are
// applied, including all-ones windows (saturation). The output frequency
// during a steady all-ones input must be (2*7 + 1)/16 with random noise.
module tb_supernode;
  localparam int W = 3;
  logic clk = 0, rst_n = 1, clr = 0, in_s = 0, out_s;
  logic [W:0] n = '0;
  int checks = 0, failures = 0;
  int r_win = 0, r_ones = 0, r_held = 2 ** (W - 1);
  int sat_windows = 0;

  supernode #(.W(W)) dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a falling edge applies the asynchronous reset

  function automatic logic conv(int d, logic [W:0] nv);
    for (int k = 0; k < W; k++) if (nv[k]) return d[W-1-k];
    return nv[W];
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones_out = 0, steady = 0;
    repeat (2) @(posedge clk);
    for (int t = 0; t < 40000; t++) begin
      int dens;
      @(negedge clk);
      rst_n = 1;   // released just before the first modelled edge
      // density changes every 800 cycles: 0, 1/8 .. 7/8, then all ones
      dens = (t / 800) % 10;
      in_s = (dens == 9) ? 1'b1 : ($urandom_range(7) < dens);
      n = (W+1)'($urandom);
      #1;
      checks++;
      if (out_s !== conv(r_held, n)) begin
        failures++; if (failures < 10) $display("t=%0d out=%b held=%0d n=%b rtl held=%0d win=%0d mwin=%0d", t, out_s, r_held, n, dut.held, dut.win, r_win);
      end
      if (dens == 9 && (t % 800) > 32) begin
        steady++; ones_out += out_s;
      end
      // model step at the coming edge
      if (in_s && r_ones < 2 ** W - 1) r_ones++;
      else if (in_s) sat_windows += (r_win == 2 ** W - 1);
      if (r_win == 2 ** W - 1) begin r_held = r_ones; r_ones = 0; end
      r_win = (r_win + 1) % (2 ** W);
      @(posedge clk);
    end
    checks++;
    if (sat_windows == 0) begin failures++; $display("saturation never exercised"); end
    checks++;
    if (real'(ones_out) / steady < 0.90 || real'(ones_out) / steady > 0.975) begin
      failures++; $display("all-ones frequency %0d / %0d", ones_out, steady);
    end
    // clear returns the held value to mid-scale
    @(negedge clk); clr = 1; @(posedge clk); #1; clr = 0;
    r_held = 2 ** (W - 1);
    for (int nv = 0; nv < 2 ** (W + 1); nv++) begin
      n = (W+1)'(nv); #1;
      checks++; if (out_s !== conv(r_held, n)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

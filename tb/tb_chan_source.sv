// tb_chan_source: checks the channel sample source.
//
// 1. Noise off (sd_gain = 0, mu = 6 LSB): every sample is exactly +6 or -6,
//    the 16 signs of each word form a valid codeword whose odd bits are the
//    word_info reported at word_push, and with out_ready always high the
//    words follow each other with no gap (a push every 16 cycles).
// 2. Random out_ready: a sample does not change while it waits.
// 3. Noise on (mu = 8 LSB, sd_gain = 10): the mean of the sample times the
//    sign of its code bit is 8 LSB and the standard deviation is
//    147.8 * 10 / 256 = 5.77 LSB, both within a few percent; the information
//    bits are balanced.
// 4. en low: the word in progress finishes and then nothing is sent.
module tb_chan_source;
  import ldpc_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #2 rst_n = 0;

  logic en = 0, out_ready = 1;
  logic [15:0] mu = 16'd1536, sd_gain = 16'd0;
  logic out_valid, word_push;
  logic signed [5:0] out_llr;
  logic [N_INFO-1:0] word_info;

  chan_source dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  // track words as they are sent
  logic [N_INFO-1:0] info_q [$];
  logic [N_VAR-1:0]  got;
  int idx = 0, pushes = 0, last_push = -1, cyc = 0, words_done = 0;
  logic signed [5:0] held; logic was_stalled = 0;
  real sum_x = 0, sum_x2 = 0; int nsamp = 0, ones = 0, ninfo = 0;
  bit stats_on = 0, spacing_on = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (was_stalled && out_valid) chk(out_llr == held, "sample changed while stalled");
    was_stalled = out_valid && !out_ready;
    held = out_llr;
    if (word_push) begin
      info_q.push_back(word_info);
      pushes++;
      if (spacing_on && last_push >= 0)
        chk(cyc - last_push == 16, $sformatf("push spacing %0d", cyc - last_push));
      last_push = cyc;
      ones += $countones(word_info); ninfo += 8;
    end
    if (out_valid && out_ready) begin
      logic [N_INFO-1:0] inf;
      logic b;
      inf = info_q[0];
      b = encode(inf)[idx];
      if (sd_gain == 0) begin
        chk(out_llr == (b ? 6'sd6 : -6'sd6), $sformatf("noiseless sample %0d", out_llr));
        got[idx] = (out_llr > 0);
      end
      if (stats_on) begin
        real x;
        x = b ? real'(out_llr) : -real'(out_llr);
        sum_x += x; sum_x2 += x * x; nsamp++;
      end
      idx++;
      if (idx == N_VAR) begin
        idx = 0;
        void'(info_q.pop_front());
        words_done++;
        if (sd_gain == 0) begin
          chk(calc_syndrome(got) == '0, "signs do not form a codeword");
          chk(info_of(got) == inf, "codeword does not carry word_info");
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // 1. noiseless, back to back
    @(negedge clk) en = 1; spacing_on = 1;
    wait (words_done == 40);
    spacing_on = 0;
    // 2. random stalls
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      out_ready = $urandom_range(0, 2) != 0;
      @(negedge clk);
    end
    out_ready = 1;
    // 3. noise statistics: start at a word boundary
    wait (idx == 0 && out_valid); @(negedge clk);
    while (idx != 0) @(negedge clk);
    sd_gain = 16'd10; mu = 16'd2048; stats_on = 1; ones = 0; ninfo = 0;
    repeat (8000) @(negedge clk);
    stats_on = 0;
    begin
      real m, sd, esd;
      m   = sum_x / nsamp;
      sd  = $sqrt(sum_x2 / nsamp - m * m);
      esd = $sqrt(4.0 * (65536.0 - 1.0) / 12.0) * 10.0 / 256.0;
      $display("noise: %0d samples, mean %0.3f (exp 8), sd %0.3f (exp %0.3f), info ones %0d of %0d",
               nsamp, m, sd, esd, ones, ninfo);
      chk(nsamp > 7000, "too few samples");
      chk(m > 7.7 && m < 8.3, "mean LLR");
      chk(sd > 0.95 * esd && sd < 1.05 * esd, "LLR standard deviation");
      chk(ones > 0.45 * ninfo && ones < 0.55 * ninfo, "information bits unbalanced");
    end
    // 4. en low
    sd_gain = 0; mu = 16'd1536;
    en = 0;
    repeat (20) @(negedge clk);
    chk(!out_valid, "still sending after en fell");
    begin
      int p;
      p = pushes;
      repeat (50) @(negedge clk);
      chk(pushes == p && !out_valid, "word pushed with en low");
    end
    chk(info_q.size() == 0, "pushed words not all sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

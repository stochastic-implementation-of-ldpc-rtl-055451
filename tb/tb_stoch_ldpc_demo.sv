// tb_stoch_ldpc_demo: end-to-end trials of the on-chip test set-up, with all
// parameters at their defaults (two lanes).
//
// The testbench follows every lane from outside: it records the information
// bits of each word the source loads and each result the decoder gives, and
// works out the word, bit-error, word-error, limit and cycle totals itself.
// After each trial these must equal the counters on the ports, clocks must
// equal the cycles busy was high, and seq_err must be low. Trials:
//   A  Eb/N0 = 0 dB, 41 words (odd, so the lanes get 21 and 20)
//   B  Eb/N0 = 7 dB, 64 words, bit error rate below 2%
//   C  Eb/N0 = 0 dB with a cycle limit of 70, 30 words: words hit the limit
// A and B also check the bit error rate against its expected range, and the
// samples of A are checked for mean and spread against the channel setting.
// Counted mechanisms, each of which must happen: trial start/end, counters
// cleared by a new trial, words in error, words stopped by the limit, source
// stalled by a busy decoder, and the two lanes decoding at the same time
// (trial shorter than the lanes' decoding times added up).
module tb_stoch_ldpc_demo;
  import ldpc_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #2 rst_n = 0;

  logic start = 0;
  logic [31:0] n_words = 0;
  logic [15:0] t_init = 16'd32, t_check = 16'd32, t_max = 16'd4000, mu = 0, sd_gain = 0;
  logic busy, done, seq_err;
  logic [31:0] words, bit_errs, word_errs, unconverged, clocks;
  logic [39:0] cycle_sum;

  stoch_ldpc_demo dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // independent tallies
  logic [N_INFO-1:0] sent_q [2][$];
  longint m_words, m_bit, m_werr, m_unc, m_cyc, m_busy;
  longint lane_words [2];
  int m_stall = 0;
  real sx = 0, sx2 = 0; int ns = 0;
  bit sample_stats = 0;

  for (genvar k = 0; k < 2; k++) begin : g_watch
    int idx = 0;
    logic [N_INFO-1:0] cur;
    always @(posedge clk) if (rst_n) begin
      if (dut.g_lane[k].u_src.out_valid && !dut.g_lane[k].u_src.out_ready) m_stall++;
      if (dut.g_lane[k].u_src.out_valid && dut.g_lane[k].u_src.out_ready) begin
        if (idx == 0) cur = sent_q[k][$];
        if (sample_stats) begin
          real x;
          x = real'(dut.g_lane[k].u_src.out_llr);
          if (!encode(cur)[idx]) x = -x;
          sx += x; sx2 += x * x; ns++;
        end
        idx = (idx + 1) % N_VAR;
      end
      if (dut.g_lane[k].u_src.word_push) sent_q[k].push_back(dut.g_lane[k].u_src.word_info);
      if (dut.g_lane[k].u_dec.out_valid) begin
        logic [N_INFO-1:0] w, d;
        w = sent_q[k].pop_front();
        d = w ^ dut.g_lane[k].u_dec.out_info;
        m_words++; lane_words[k]++;
        m_bit += $countones(d); m_werr += (d != 0);
        m_unc += !dut.g_lane[k].u_dec.out_converged;
        m_cyc += dut.g_lane[k].u_dec.out_cycles;
      end
    end
  end
  always @(posedge clk) if (busy) m_busy++;

  int mech_trial = 0, mech_cleared = 0, mech_err = 0, mech_limit = 0, mech_stall = 0, mech_parallel = 0;

  task automatic trial(string name, real ebn0_db, int n, int tm, real ber_lo, real ber_hi);
    real s2, ber;
    s2 = 1.0 / (2.0 * 0.5 * (10.0 ** (ebn0_db / 10.0)));
    mu      = 16'($rtoi(2.0 / s2 * 1024.0 + 0.5));
    sd_gain = 16'($rtoi(2.0 / $sqrt(s2) * 1024.0 / 147.8 + 0.5));
    t_max   = 16'(tm);
    n_words = 32'(n);
    m_words = 0; m_bit = 0; m_werr = 0; m_unc = 0; m_cyc = 0; m_busy = 0;
    lane_words = '{0, 0};
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    if (words == 0 && bit_errs == 0 && clocks == 0) mech_cleared++;
    fork
      wait (done);
      begin repeat (400000) @(posedge clk); end
    join_any
    disable fork;
    @(negedge clk);
    chk(done && !busy, {name, ": trial did not end"});
    mech_trial++;
    ber = real'(bit_errs) / (8.0 * real'(words));
    $display("%s: %0d words, %0d bit errors (BER %0.2e), %0d word errors, %0d at the limit, %0d clocks, %0d decoding cycles",
             name, words, bit_errs, ber, word_errs, unconverged, clocks, cycle_sum);
    $display("%s: lanes decoded %0d and %0d words; %0.1f clocks per information bit",
             name, lane_words[0], lane_words[1], real'(clocks) / (8.0 * real'(words)));
    chk(words == 32'(n) && longint'(words) == m_words, {name, ": word count"});
    chk(longint'(bit_errs) == m_bit, {name, ": bit errors"});
    chk(longint'(word_errs) == m_werr, {name, ": word errors"});
    chk(longint'(unconverged) == m_unc, {name, ": limit count"});
    chk(longint'(cycle_sum) == m_cyc, {name, ": cycle sum"});
    chk(longint'(clocks) == m_busy, {name, ": trial length"});
    chk(!seq_err, {name, ": words and results out of step"});
    chk(lane_words[0] == longint'((n + 1) / 2) && lane_words[1] == longint'(n / 2), {name, ": word split"});
    chk(ber >= ber_lo && ber <= ber_hi, {name, ": bit error rate out of range"});
    if (word_errs > 0) mech_err++;
    if (unconverged > 0) mech_limit++;
    if (m_stall > 0) mech_stall++;
    // two lanes in parallel: the trial is shorter than their decoding added up
    if (longint'(clocks) < (m_cyc + 2 * m_words) * 3 / 4) mech_parallel++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (2) @(negedge clk);
    sample_stats = 1;
    trial("A 0 dB", 0.0, 41, 4000, 0.02, 0.25);
    sample_stats = 0;
    begin
      real m, sd;
      m  = sx / ns;
      sd = $sqrt(sx2 / ns - m * m);
      $display("A samples: %0d, mean %0.2f LSB (exp 8), spread %0.2f LSB (exp 8, less clipping)", ns, m, sd);
      chk(m > 7.0 && m < 9.0, "channel mean");
      chk(sd > 6.5 && sd < 8.5, "channel spread");
    end
    trial("B 7 dB", 7.0, 64, 4000, 0.0, 0.02);
    t_init = 16'd32; t_check = 16'd32;
    trial("C 0 dB limit 70", 0.0, 30, 70, 0.0, 0.3);
    $display("mechanisms: trials %0d, cleared %0d, word errors %0d, limit %0d, stall %0d, parallel %0d",
             mech_trial, mech_cleared, mech_err, mech_limit, mech_stall, mech_parallel);
    chk(mech_trial == 3, "not every trial ended");
    chk(mech_cleared >= 2, "counters not cleared by a new trial");
    chk(mech_err > 0, "no word in error");
    chk(mech_limit > 0, "no word stopped by the limit");
    chk(mech_stall > 0, "source never stalled");
    chk(mech_parallel == 3, "lanes did not work in parallel");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

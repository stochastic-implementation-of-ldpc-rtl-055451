// tb_err_monitor: checks the error monitor against a queue model.
//
// Random words are pushed and random results come back, in order, with the
// queue never over- or under-running: each result carries the oldest sent
// word with a random error mask (none in half of the results), a random
// converged flag and a random cycle count. After every clock all five
// counters are compared with the model. Then a result with the queue empty
// must raise seq_err, and clr must zero everything again.
module tb_err_monitor;
  import ldpc_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #2 rst_n = 0;

  logic clr = 0, sent_push = 0, dec_valid = 0, dec_converged = 0;
  logic [N_INFO-1:0] sent_info = '0, dec_info = '0;
  logic [15:0] dec_cycles = '0;
  logic [31:0] words, bit_errs, word_errs, unconverged;
  logic [39:0] cycle_sum;
  logic seq_err;

  err_monitor dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  logic [N_INFO-1:0] q [$];
  longint m_words = 0, m_bit = 0, m_werr = 0, m_unc = 0, m_cyc = 0;

  task automatic compare();
    chk(words == 32'(m_words) && bit_errs == 32'(m_bit) && word_errs == 32'(m_werr) &&
        unconverged == 32'(m_unc) && cycle_sum == 40'(m_cyc) && !seq_err,
        $sformatf("counters %0d %0d %0d %0d %0d, model %0d %0d %0d %0d %0d", words, bit_errs,
                  word_errs, unconverged, cycle_sum, m_words, m_bit, m_werr, m_unc, m_cyc));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      logic [N_INFO-1:0] mask, w;
      int qs;
      qs = q.size();
      sent_push = 0; dec_valid = 0;
      // a result needs a queued word; a push needs room after this cycle's result
      if (qs > 0 && $urandom_range(0, 2) == 0) begin
        w = q.pop_front();
        mask = ($urandom_range(0, 1) == 0) ? '0 : N_INFO'($urandom);
        dec_valid = 1;
        dec_info = w ^ mask;
        dec_converged = $urandom_range(0, 3) != 0;
        dec_cycles = 16'($urandom);
        m_words++; m_bit += $countones(mask); m_werr += (mask != 0);
        m_unc += !dec_converged; m_cyc += dec_cycles;
      end
      if (q.size() < 4 && $urandom_range(0, 2) == 0) begin
        sent_push = 1;
        sent_info = N_INFO'($urandom);
        q.push_back(sent_info);
      end
      @(negedge clk);
      compare();
    end
    sent_push = 0; dec_valid = 0;
    // drain, then one result too many
    while (q.size() > 0) begin
      logic [N_INFO-1:0] w;
      w = q.pop_front();
      dec_valid = 1; dec_info = w; dec_converged = 1; dec_cycles = 16'd1;
      m_words++; m_cyc++;
      @(negedge clk);
      compare();
    end
    dec_valid = 1;
    @(negedge clk);
    dec_valid = 0;
    chk(seq_err, "result with nothing queued not flagged");
    clr = 1;
    @(negedge clk);
    clr = 0;
    @(negedge clk);
    chk(words == 0 && bit_errs == 0 && word_errs == 0 && unconverged == 0 &&
        cycle_sum == 0 && !seq_err, "clr did not zero the counters");
    $display("model totals: words %0d, bit errors %0d, word errors %0d, unconverged %0d",
             m_words, m_bit, m_werr, m_unc);
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

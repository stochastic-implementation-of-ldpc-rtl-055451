// tb_stoch_ldpc_decoder: end-to-end test of the stochastic LDPC decoder at its
// default parameters.
// Random information bytes are encoded into codewords of the (16,8) code
// (information bit i is code bit 2i+1, even bit 2j = bit(2j-1) ^ bit(2j+1)),
// sent as BPSK (+1 for a 1) through additive Gaussian noise, converted to
// quantized LLRs 2y/sigma^2 (2 fraction bits, saturated to 6 bits) and fed to
// the decoder one sample per cycle whenever it is ready. Phases:
//   A  noiseless (saturated LLRs), (T_INIT, T_CHECK) = (32, 32): every word
//      must come back exact and converged after exactly 64 cycles;
//   B  Eb/N0 = 7, 5, 3 dB with (32, 32) and (128, 128): every converged word
//      must satisfy all checks, the cycle count must be at least
//      T_INIT + T_CHECK, and at 7 dB the bit error rate must stay below 1%;
//   C  Eb/N0 = 0 dB with a cycle limit of 80: words that do not converge must
//      come back flagged, after exactly 80 cycles.
// Throughout, with the input always offered, consecutive results must be
// out_cycles + 2 clocks apart (load cycle plus return to idle), which shows
// the next word was loaded during decoding. Mechanisms counted, each of which
// must occur: INIT phase run, decode past T_CHECK until the checks hold, limit
// reached, input stalled by a full buffer, samples loaded during a decode.
module tb_stoch_ldpc_decoder;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 1;
  logic in_valid = 0, in_ready;
  logic signed [5:0] in_llr = '0;
  logic [15:0] t_init = 16'd32, t_check = 16'd32, t_max = 16'd4000;
  logic out_valid, out_converged;
  logic [15:0] out_bits, out_cycles;
  logic [7:0] out_info;

  int checks = 0, failures = 0;
  int m_init = 0, m_extra = 0, m_limit = 0, m_stall = 0, m_overlap = 0;
  logic [15:0] sent_q [$];
  int bit_err, words, conv_words, cyc_sum;
  longint last_out_t;
  longint now_cyc = 0;

  stoch_ldpc_decoder dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a falling edge applies the asynchronous reset
  always @(posedge clk) now_cyc++;

  function automatic logic [15:0] encode(logic [7:0] u);
    logic [15:0] c = '0;
    for (int i = 0; i < 8; i++) c[2*i+1] = u[i];
    for (int j = 0; j < 8; j++) c[2*j] = c[(2*j+15) % 16] ^ c[2*j+1];
    return c;
  endfunction

  function automatic logic [7:0] syn(logic [15:0] c);
    logic [7:0] s;
    for (int j = 0; j < 8; j++) s[j] = c[(2*j+15) % 16] ^ c[2*j] ^ c[2*j+1];
    return s;
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967296.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * 3.14159265358979 * u2);
  endfunction

  // sample stalls and overlap of loading with decoding
  always @(posedge clk)
    if (rst_n) begin
      if (in_valid && !in_ready) m_stall++;
      if (in_valid && in_ready && dut.u_ctrl.busy) m_overlap++;
    end

  task automatic run_phase(int ti, int tc, int tm, real ebn0_db, bit noiseless, int nwords);
    real sigma2, sigma;
    int gap_bad = 0;
    sigma2 = 1.0 / (2.0 * 0.5 * (10.0 ** (ebn0_db / 10.0)));
    sigma  = $sqrt(sigma2);
    t_init = 16'(ti); t_check = 16'(tc); t_max = 16'(tm);
    bit_err = 0; words = 0; conv_words = 0; cyc_sum = 0; last_out_t = -1;
    fork
      begin : driver
        for (int w = 0; w < nwords; w++) begin
          logic [15:0] cw;
          cw = encode(8'($urandom));
          sent_q.push_back(cw);
          for (int v = 0; v < 16; v++) begin
            real y, l;
            int q;
            y = (cw[v] ? 1.0 : -1.0) + (noiseless ? 0.0 : sigma * gauss());
            l = 2.0 * y / sigma2 * 4.0;
            q = noiseless ? (cw[v] ? 31 : -32) : int'($floor(l + 0.5));
            if (q > 31) q = 31;
            if (q < -32) q = -32;
            @(negedge clk);
            in_valid = 1; in_llr = 6'(q);
            @(posedge clk);
            while (!in_ready) @(posedge clk);
          end
          @(negedge clk); in_valid = 0;
        end
      end
      begin : monitor
        while (words < nwords) begin
          @(posedge clk); #1;
          if (out_valid) begin
            logic [15:0] cw;
            int lim;
            cw = sent_q.pop_front();
            words++;
            cyc_sum += int'(out_cycles);
            bit_err += $countones(cw ^ out_bits);
            lim = (tm > ti + tc) ? tm : ti + tc;
            checks++;
            if (out_info !== {out_bits[15], out_bits[13], out_bits[11], out_bits[9],
                              out_bits[7], out_bits[5], out_bits[3], out_bits[1]}) failures++;
            checks++;
            if (int'(out_cycles) < ti + tc) begin failures++; $display("cycles %0d below %0d", out_cycles, ti + tc); end
            if (out_converged) begin
              conv_words++;
              checks++;
              if (syn(out_bits) != '0) begin failures++; $display("converged word %h fails the checks", out_bits); end
              if (int'(out_cycles) > ti + tc) m_extra++;
            end else begin
              m_limit++;
              checks++;
              if (int'(out_cycles) != lim) begin failures++; $display("limit word after %0d cycles, exp %0d", out_cycles, lim); end
            end
            if (noiseless) begin
              checks += 2;
              if (out_bits !== cw || !out_converged) begin failures++; $display("noiseless word %h decoded %h", cw, out_bits); end
              if (int'(out_cycles) != ti + tc) begin failures++; $display("noiseless word took %0d cycles", out_cycles); end
            end
            // back-to-back results: the decoder never waited for input
            if (last_out_t >= 0 && words > 2 && words < nwords) begin
              checks++;
              if (now_cyc - last_out_t != longint'(out_cycles) + 2) begin
                gap_bad++;
                failures++;
                if (gap_bad < 5) $display("result spacing %0d, cycles %0d", now_cyc - last_out_t, out_cycles);
              end
            end
            last_out_t = now_cyc;
          end
        end
      end
    join
    if (ti > 0) m_init++;
    $display("(T_INIT,T_CHECK)=(%0d,%0d) limit %0d Eb/N0 %4.1f dB%s: %0d words, %0d converged, BER %e, mean %0.1f cycles/word",
             ti, tc, tm, ebn0_db, noiseless ? " noiseless" : "", words, conv_words,
             real'(bit_err) / (16.0 * words), real'(cyc_sum) / words);
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (2) @(posedge clk);
    run_phase(32, 32, 4000, 99.0, 1'b1, 40);
    run_phase(32, 32, 4000, 7.0, 1'b0, 300);
    checks++;
    if (bit_err * 100 > 16 * words) begin failures++; $display("BER too high at 7 dB"); end
    run_phase(32, 32, 4000, 5.0, 1'b0, 200);
    run_phase(32, 32, 4000, 3.0, 1'b0, 200);
    run_phase(128, 128, 4000, 7.0, 1'b0, 100);
    run_phase(32, 32, 80, 0.0, 1'b0, 100);
    checks += 5;
    if (m_init == 0)    begin failures++; $display("INIT phase never ran"); end
    if (m_extra == 0)   begin failures++; $display("never decoded past T_CHECK"); end
    if (m_limit == 0)   begin failures++; $display("cycle limit never reached"); end
    if (m_stall == 0)   begin failures++; $display("input never stalled"); end
    if (m_overlap == 0) begin failures++; $display("no sample loaded during a decode"); end
    $display("mechanisms: init %0d, past T_CHECK %0d, limit %0d, stall cycles %0d, overlapped loads %0d",
             m_init, m_extra, m_limit, m_stall, m_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

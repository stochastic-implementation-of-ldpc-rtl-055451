// tb_ber_sweep: the decoder on the workloads of the published measurements.
// For each of the five (T_INIT, T_CHECK) settings (128,128), (64,64), (96,32),
// (32,96) and (32,32) and each Eb/N0 from 0 to 7 dB, 200 random codewords of
// the (16,8) code are sent as BPSK through Gaussian noise and decoded by the
// decoder at its default parameters with a limit of 4000 cycles. The test
// prints the mean decoding time in cycles per codeword and the bit error
// rate of every point. Checked: every converged word satisfies the parity
// checks, no word takes fewer than T_INIT + T_CHECK cycles, words at the
// limit take exactly 4000 cycles, results follow each other without idle
// time, and for every setting decoding is faster and more accurate at 7 dB
// than at 0 dB.
module tb_ber_sweep;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 1;
  logic in_valid = 0, in_ready;
  logic signed [5:0] in_llr = '0;
  logic [15:0] t_init = 16'd32, t_check = 16'd32, t_max = 16'd4000;
  logic out_valid, out_converged;
  logic [15:0] out_bits, out_cycles;
  logic [7:0] out_info;

  localparam int WORDS = 200;
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
  endtask

  initial begin
    repeat (30000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // results per configuration and Eb/N0 point
  real ber_tab [5][8];
  real cyc_tab [5][8];
  int  cfg_ti [5] = '{128, 64, 96, 32, 32};
  int  cfg_tc [5] = '{128, 64, 32, 96, 32};

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (2) @(posedge clk);
    for (int c = 0; c < 5; c++)
      for (int s = 0; s < 8; s++) begin
        run_phase(cfg_ti[c], cfg_tc[c], 4000, real'(s), 1'b0, WORDS);
        ber_tab[c][s] = real'(bit_err) / (16.0 * words);
        cyc_tab[c][s] = real'(cyc_sum) / words;
      end
    $display("mean decoding cycles per codeword (rows: T_INIT,T_CHECK; columns: Eb/N0 0..7 dB)");
    for (int c = 0; c < 5; c++) begin
      $write("(%0d,%0d)", cfg_ti[c], cfg_tc[c]);
      for (int s = 0; s < 8; s++) $write(" %7.1f", cyc_tab[c][s]);
      $write("\n");
    end
    $display("bit error rate");
    for (int c = 0; c < 5; c++) begin
      $write("(%0d,%0d)", cfg_ti[c], cfg_tc[c]);
      for (int s = 0; s < 8; s++) $write(" %8.2e", ber_tab[c][s]);
      $write("\n");
    end
    $display("codewords stopped by the cycle limit over the whole sweep: %0d of %0d", m_limit, 40 * WORDS);
    for (int c = 0; c < 5; c++) begin
      checks += 2;
      if (!(cyc_tab[c][7] < cyc_tab[c][0])) begin failures++; $display("config %0d: decoding not faster at 7 dB", c); end
      if (!(ber_tab[c][7] < ber_tab[c][0])) begin failures++; $display("config %0d: BER not lower at 7 dB", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// stoch_ldpc_demo: self-contained error-rate and throughput trial around the
// stochastic decoder, for one chip.
//
// N_COPY lanes run side by side. Each lane is a channel source (random
// codewords, Gaussian noise, LLR samples), a stoch_ldpc_decoder and an error
// monitor. A trial starts with a one-cycle start pulse while idle: the
// monitors are cleared and the lanes share out n_words codewords (lane k sends
// ceil((n_words - k) / N_COPY) of them). When every word has been decoded the
// trial ends: busy falls and done rises and stays high until the next start.
// The outputs are the lanes' counters added together, plus the trial length
// in clocks, so the bit error rate is bit_errs / (8 * words) and the
// throughput is 8 * words / clocks information bits per clock.
//
// Interface: t_init, t_check, t_max, mu and sd_gain are sampled continuously
// and must be held steady during a trial (see chan_source for mu and sd_gain).
// seq_err reports a lane whose results got out of step with its words; it
// never happens in a working design.
//
// Following the published set-up: sample source, decoder and result checking
// on the same chip, trials of a chosen number of words for each (T_INIT,
// T_CHECK) and noise level, and two copies of apparatus and decoder working
// in parallel to double the testing rate. The buttons, LEDs and seven-segment
// displays of that set-up are left out: the counters are brought out as ports
// instead. Word sharing, counter widths and the lane seeds are this design's
// own. All decoders use the same noise-generator seeds; they decode different
// words, so their streams never line up in a way that matters.
module stoch_ldpc_demo
  import ldpc_pkg::*;
#(
  parameter int N_COPY = 2,
  parameter int CW     = 32,
  parameter int TW     = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [CW-1:0] n_words,
  input  logic [TW-1:0] t_init,
  input  logic [TW-1:0] t_check,
  input  logic [TW-1:0] t_max,
  input  logic [15:0]   mu,
  input  logic [15:0]   sd_gain,
  output logic          busy,
  output logic          done,
  output logic [CW-1:0] words,
  output logic [CW-1:0] bit_errs,
  output logic [CW-1:0] word_errs,
  output logic [CW-1:0] unconverged,
  output logic [CW+7:0] cycle_sum,
  output logic [CW-1:0] clocks,
  output logic          seq_err
);
  localparam int LLR_W = 6;

  logic clr;
  assign clr = start && !busy;

  logic [CW-1:0] l_words [N_COPY], l_bit [N_COPY], l_werr [N_COPY], l_unc [N_COPY];
  logic [CW+7:0] l_cyc [N_COPY];
  logic [N_COPY-1:0] l_seq;

  for (genvar k = 0; k < N_COPY; k++) begin : g_lane
    logic                    s_valid, s_ready, push;
    logic signed [LLR_W-1:0] s_llr;
    logic [N_INFO-1:0]       push_info;
    logic                    d_valid, d_conv;
    logic [N_VAR-1:0]        d_bits;
    logic [N_INFO-1:0]       d_info;
    logic [TW-1:0]           d_cycles;
    logic [CW-1:0]           quota, sent;

    // words for this lane: ceil((n_words - k) / N_COPY)
    assign quota = (n_words > CW'(k)) ? (n_words - CW'(k) + CW'(N_COPY - 1)) / CW'(N_COPY) : '0;

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)    sent <= '0;
      else if (clr)  sent <= '0;
      else if (push) sent <= sent + CW'(1);

    chan_source #(
      .LLR_W(LLR_W),
      .SEED(89'h0a5_a5a5_1234_0f0f_7777 ^ (89'(k + 1) << 47))
    ) u_src (
      .clk, .rst_n,
      .en        (busy && !clr && sent < quota),
      .mu, .sd_gain,
      .out_valid (s_valid),
      .out_ready (s_ready),
      .out_llr   (s_llr),
      .word_push (push),
      .word_info (push_info)
    );

    stoch_ldpc_decoder #(.LLR_W(LLR_W), .TW(TW)) u_dec (
      .clk, .rst_n,
      .in_valid      (s_valid),
      .in_ready      (s_ready),
      .in_llr        (s_llr),
      .t_init, .t_check, .t_max,
      .out_valid     (d_valid),
      .out_bits      (d_bits),
      .out_info      (d_info),
      .out_converged (d_conv),
      .out_cycles    (d_cycles)
    );

    err_monitor #(.CW(CW), .TW(TW)) u_mon (
      .clk, .rst_n, .clr,
      .sent_push     (push),
      .sent_info     (push_info),
      .dec_valid     (d_valid),
      .dec_info      (d_info),
      .dec_converged (d_conv),
      .dec_cycles    (d_cycles),
      .words         (l_words[k]),
      .bit_errs      (l_bit[k]),
      .word_errs     (l_werr[k]),
      .unconverged   (l_unc[k]),
      .cycle_sum     (l_cyc[k]),
      .seq_err       (l_seq[k])
    );
  end

  always_comb begin
    words = '0; bit_errs = '0; word_errs = '0; unconverged = '0; cycle_sum = '0;
    for (int k = 0; k < N_COPY; k++) begin
      words       += l_words[k];
      bit_errs    += l_bit[k];
      word_errs   += l_werr[k];
      unconverged += l_unc[k];
      cycle_sum   += l_cyc[k];
    end
  end
  assign seq_err = |l_seq;

  // Trial control. busy rises with the clearing cycle; the word counts are
  // compared from the cycle after, when the monitors have been cleared.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      clocks <= '0;
    end else if (clr) begin
      busy   <= 1'b1;
      done   <= 1'b0;
      clocks <= '0;
    end else if (busy) begin
      clocks <= clocks + CW'(1);
      if (words >= n_words) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
endmodule

// chan_source: random codewords sent through a simulated Gaussian channel,
// delivered as quantized LLR samples for the decoder's input port.
//
// Each word starts as 8 random information bits, encoded into a 16-bit
// codeword of the ring code (ldpc_pkg::encode). Its bits are sent one sample
// per accepted cycle, bit 0 first, as BPSK over an additive Gaussian noise
// channel, already scaled to a log-likelihood ratio:
//
//   llr = (bit ? +mu : -mu) + (S - 510) * sd_gain     (units of 2^-8 LSB)
//
// where S is the sum of four uniform 8-bit random numbers (Irwin-Hall
// approximation of a Gaussian: mean 510, standard deviation 147.8). The result
// is rounded to the nearest LSB and saturated to LLR_W bits. For BPSK with
// noise variance s2 the LLR has mean 2/s2 and standard deviation 2/sqrt(s2),
// so the caller sets mu = 2/s2 * 2^(LLR_FRAC+8) and
// sd_gain = 2/sqrt(s2) * 2^(LLR_FRAC+8) / 147.8. The Irwin-Hall noise is
// bounded at about 3.4 standard deviations, which is enough below the highest
// signal-to-noise ratios where raw errors need larger excursions.
//
// The random bits come from one 89-cell LHCA (cells 0..31 noise, 32..39
// information bits); it advances whenever a sample is taken or no word is
// active, so a stalled sample stays unchanged.
//
// Interface: out_valid/out_ready handshake, one sample per cycle with both
// high. A new word is loaded when en is high and no word is active, or in the
// same cycle as the last sample of the previous word is taken, so words follow
// back to back. word_push pulses in the loading cycle with the new word's
// information bits on word_info.
//
// Generating channel samples on the same chip as the decoder follows the
// published demonstration set-up; the noise model, the LLR scaling inputs and
// the use of an LHCA here are this design's own choices.
module chan_source
  import ldpc_pkg::*;
#(
  parameter int                   LLR_W = 6,
  parameter logic [LHCA_N2-1:0]   SEED  = 89'h0a5_a5a5_1234_0f0f_7777
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic [15:0]             mu,
  input  logic [15:0]             sd_gain,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic signed [LLR_W-1:0] out_llr,
  output logic                    word_push,
  output logic [N_INFO-1:0]       word_info
);
  localparam int LMAX = 2 ** (LLR_W - 1) - 1;

  logic [LHCA_N2-1:0] r;
  logic               active;
  logic [N_VAR-1:0]   cw;
  logic [3:0]         idx;
  logic               take;

  assign take      = out_valid && out_ready;
  assign out_valid = active;
  assign word_push = en && (!active || (take && idx == 4'(N_VAR - 1)));
  assign word_info = r[39:32];

  lhca #(.N(LHCA_N2), .RULE(LHCA_R2), .SEED(SEED)) u_rng (
    .clk, .rst_n, .en(!active || out_ready), .q(r)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      active <= 1'b0;
      cw     <= '0;
      idx    <= '0;
    end else if (!active || (take && idx == 4'(N_VAR - 1))) begin
      active <= en;
      if (en) begin
        cw  <= encode(word_info);
        idx <= '0;
      end
    end else if (take) begin
      idx <= idx + 4'd1;
    end

  // Gaussian-shaped sample and its LLR.
  logic        [9:0]  s_sum;
  logic signed [10:0] s_ctr;
  logic signed [28:0] val;
  logic signed [20:0] q;

  always_comb begin
    s_sum = 10'(r[7:0]) + 10'(r[15:8]) + 10'(r[23:16]) + 10'(r[31:24]);
    s_ctr = signed'({1'b0, s_sum}) - 11'sd510;
    val   = 29'(s_ctr) * signed'({1'b0, sd_gain});
    val   = cw[idx] ? val + 29'(mu) : val - 29'(mu);
    q     = 21'((val + 29'sd128) >>> 8);
    if (q > 21'(LMAX))        out_llr = LLR_W'(LMAX);
    else if (q < -21'(LMAX + 1)) out_llr = LLR_W'(-(LMAX + 1));
    else                      out_llr = LLR_W'(q);
  end
endmodule

// llr_to_prob: signal level to probability conversion.
//
// A small lookup table turns the quantized log-likelihood ratio of one
// received bit into the M-bit code d of the probability that the bit is a 1.
// The LLR is a signed fixed-point number with LLR_FRAC fraction bits;
// positive values favour a 1. For BPSK over a Gaussian channel the LLR of a
// sample y is 2y/sigma^2; that scaling is left to the sample source.
// The code drives a d2s_conv, whose stream has P(1) = (2d+1)/2^(M+1), so the
// table holds the code whose level is nearest the logistic function:
//   d = min(2^M - 1, floor(2^M / (1 + exp(-L))))
// The table is computed at elaboration from that formula. A LUT from the
// log-likelihood domain to a 4-bit probability follows the published design;
// the input format and rounding are this design's choice.
//
// Purely combinational.
module llr_to_prob #(
  parameter int LLR_W    = 6,
  parameter int LLR_FRAC = 2,
  parameter int M        = 4
) (
  input  logic signed [LLR_W-1:0] llr,
  output logic        [M-1:0]     d
);
  localparam int ENTRIES = 2 ** LLR_W;
  typedef logic [M-1:0] table_t [ENTRIES];

  // exp(x) by halving the argument, a Taylor series, and squaring back.
  function automatic real exp_r(real x);
    real t, term, sum;
    t    = x / 64.0;
    term = 1.0;
    sum  = 1.0;
    for (int k = 1; k < 12; k++) begin
      term = term * t / real'(k);
      sum  = sum + term;
    end
    for (int k = 0; k < 6; k++) sum = sum * sum;
    return sum;
  endfunction

  function automatic table_t build_table();
    table_t tbl;
    for (int i = 0; i < ENTRIES; i++) begin
      logic signed [LLR_W-1:0] q;
      real l, p;
      int  c;
      q = LLR_W'(i);
      l = real'(q) / real'(2 ** LLR_FRAC);
      p = 1.0 / (1.0 + exp_r(-l));
      c = int'($floor(p * real'(2 ** M)));
      if (c > 2 ** M - 1) c = 2 ** M - 1;
      tbl[i] = M'(c);
    end
    return tbl;
  endfunction

  localparam table_t LUT = build_table();

  assign d = LUT[$unsigned(llr)];
endmodule

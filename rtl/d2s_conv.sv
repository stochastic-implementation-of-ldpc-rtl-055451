// d2s_conv: digital value to stochastic stream converter.
//
// A chain of M 2:1 multiplexers, each selected by one random bit, turns the
// M-bit value d into a Bernoulli stream. Stage k (k = 0 .. M-1) chooses between
// the bit d[k] and the output of the stage before; the first stage chooses
// between d[0] and the extra random bit n[M]. Select bits run the other way:
// stage k is selected by n[M-1-k], so the last stage (d[M-1], the MSB) is
// selected by n[0]. With fair, independent noise bits
//   P(s = 1) = sum_k d[k] / 2^(M-k) + 1/2^(M+1) = (2d + 1) / 2^(M+1),
// i.e. 1/32 .. 31/32 for M = 4. The extra random bit in place of a constant
// centres the levels so neither 0 nor 1 is reachable. The mux chain and the
// random extra bit follow the published circuit; that a select of 1 picks the
// data bit is this design's choice (both choices give the same probability).
//
// Purely combinational: s follows d and n in the same cycle.
module d2s_conv #(
  parameter int M = 4
) (
  input  logic [M-1:0] d,
  input  logic [M:0]   n,
  output logic         s
);
  always_comb begin
    s = n[M];
    for (int k = 0; k < M; k++)
      s = n[M-1-k] ? d[k] : s;
  end
endmodule

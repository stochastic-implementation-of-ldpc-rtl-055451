// lhca: linear hybrid cellular automaton, a pseudo-random bit source.
//
// N one-bit cells with null boundaries. A rule-90 cell takes the XOR of its
// two neighbours; a rule-150 cell also XORs in its own value. RULE bit i = 1
// makes cell i a rule-150 cell:
//   q[i] <= q[i-1] ^ q[i+1] ^ (RULE[i] & q[i])      (q[-1] = q[N] = 0)
// Unlike an LFSR, whose bits are shifted copies of each other, neighbouring
// cells of an LHCA are only weakly correlated, which matters when many bits
// of one cycle feed different stochastic converters. Using LHCAs follows the
// published decoder; lengths, rule vectors and seed are this design's choice.
// With a rule vector whose characteristic polynomial is primitive the state
// cycles through all 2^N - 1 non-zero values.
//
// Timing: the state advances on every clock edge with en high; reset loads
// SEED, which must be non-zero.
module lhca #(
  parameter int         N    = 31,
  parameter logic [N-1:0] RULE = 31'h16d7b4b2,
  parameter logic [N-1:0] SEED = N'(1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [N-1:0] q
);
  logic [N+1:0] ext;   // state with a zero cell on each side
  logic [N-1:0] nxt;

  assign ext = {1'b0, q, 1'b0};
  for (genvar i = 0; i < N; i++) begin : g_cell
    assign nxt[i] = ext[i] ^ ext[i+2] ^ (RULE[i] & q[i]);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  q <= SEED;
    else if (en) q <= nxt;

  initial assert (SEED != '0) else $error("lhca: SEED must be non-zero");
endmodule

// stoch_eq_gate: equality stochastic gate.
//
// The soft equality Pc = PaPb / (PaPb + (1-Pa)(1-Pb)) is built from a J-K
// flip-flop: J = a AND b (both inputs agree on 1) sets the output, K = NOT a
// AND NOT b (both agree on 0) clears it, and when the inputs disagree the
// flip-flop holds its last value. The hold is what performs the division: the
// output is one with exactly the probability that the last agreeing pair was
// a pair of ones. This is the published circuit.
//
// Timing: one register; c changes on the clock edge after the agreeing pair.
// Reset and the synchronous clear (clr) set the flip-flop to 0 (own choice).
module stoch_eq_gate (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic a,
  input  logic b,
  output logic c
);
  logic j, k;
  assign j = a & b;
  assign k = ~a & ~b;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   c <= 1'b0;
    else if (clr) c <= 1'b0;
    else if (j)   c <= 1'b1;
    else if (k)   c <= 1'b0;
endmodule

// stoch_xor_gate: parity-check stochastic gate.
//
// With probabilities carried as Bernoulli bit streams (P = fraction of ones),
// the soft XOR Pc = Pa(1-Pb) + (1-Pa)Pb of two independent streams is a plain
// XOR gate. As in the published circuit, a D flip-flop follows the gate to
// keep every edge of the factor graph to one register per hop.
//
// Timing: c is the XOR of the a and b bits of the previous cycle.
// Reset and the synchronous clear (clr) force the register to 0; they are this
// design's choice.
module stoch_xor_gate (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic a,
  input  logic b,
  output logic c
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   c <= 1'b0;
    else if (clr) c <= 1'b0;
    else          c <= a ^ b;
endmodule

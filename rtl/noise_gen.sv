// noise_gen: random-bit source of the stochastic decoder.
//
// Every input converter and every supernode needs fresh random bits each
// cycle, 176 in all for the (16,8) decoder. Three LHCAs of different lengths
// (31, 61 and 89 cells) and characteristic polynomials run side by side
// and their cells are concatenated; noise[NBITS-1:0] is the low part of that
// vector, so each bit goes to exactly one consumer. Using several LHCAs of
// different lengths follows the published decoder; lengths, rules and seeds
// are this design's choice (see ldpc_pkg).
//
// Timing: a new vector on every clock edge with en high.
module noise_gen
  import ldpc_pkg::*;
#(
  parameter int NBITS = NOISE_ALL
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [NBITS-1:0] noise
);
  logic [LHCA_N0-1:0] q0;
  logic [LHCA_N1-1:0] q1;
  logic [LHCA_N2-1:0] q2;
  logic [LHCA_TOTAL-1:0] all_bits;

  lhca #(.N(LHCA_N0), .RULE(LHCA_R0), .SEED(LHCA_N0'('h2545f491)))
    u_ca0 (.clk, .rst_n, .en, .q(q0));
  lhca #(.N(LHCA_N1), .RULE(LHCA_R1), .SEED(LHCA_N1'('h0b4e_6c2d_9a17_3f01)))
    u_ca1 (.clk, .rst_n, .en, .q(q1));
  lhca #(.N(LHCA_N2), .RULE(LHCA_R2), .SEED(LHCA_N2'('h1d3_9c6e_a571_0f2b_48d3_6e95)))
    u_ca2 (.clk, .rst_n, .en, .q(q2));

  assign all_bits = {q2, q1, q0};
  assign noise    = all_bits[NBITS-1:0];

  initial assert (NBITS <= LHCA_TOTAL) else $error("noise_gen: NBITS exceeds the LHCA cells");
endmodule

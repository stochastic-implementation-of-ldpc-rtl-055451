// ldpc_pkg: constants and small functions shared by the stochastic LDPC decoder.
//
// The code is the rate-1/2, length-16 code whose factor graph has 16 equality
// (variable) nodes and 8 degree-3 parity-check nodes arranged in a ring: check
// node j joins variable nodes 2j-1 (mod 16), 2j and 2j+1. Edge e = 3*j + k
// (k = 0,1,2) joins check j to variable (2j - 1 + k) mod 16. Odd-numbered
// variables therefore have two edges and even-numbered ones a single edge; the
// odd-numbered bits can be chosen freely (information bits) and each even bit
// 2j is the XOR of bits 2j-1 and 2j+1.
//
// The graph and the 4-bit input / 3-bit supernode widths follow the published
// design; the LHCA rule vectors and the noise-bit budget are this design's own.
package ldpc_pkg;

  localparam int N_VAR    = 16;  // equality nodes (code length)
  localparam int N_CHK    = 8;   // parity-check nodes
  localparam int CHK_DEG  = 3;   // edges per check node
  localparam int N_EDGE   = N_CHK * CHK_DEG;  // 24
  localparam int N_INFO   = N_VAR - N_CHK;    // 8

  localparam int D_W  = 4;       // input probability code width (m)
  localparam int SN_W = 3;       // supernode counter width

  // Noise bits: one (m+1)-bit vector per input converter and one
  // (W+1)-bit vector per supernode (one supernode on each edge, in front of
  // the equality node).
  localparam int NOISE_IN  = N_VAR * (D_W + 1);         // 80
  localparam int NOISE_SN  = N_EDGE * (SN_W + 1);       // 96
  localparam int NOISE_ALL = NOISE_IN + NOISE_SN;       // 176

  // Variable node joined by edge e.
  function automatic int edge_var(int e);
    return (2 * (e / CHK_DEG) - 1 + (e % CHK_DEG) + N_VAR) % N_VAR;
  endfunction

  // Check node joined by edge e.
  function automatic int edge_chk(int e);
    return e / CHK_DEG;
  endfunction

  // Number of edges on variable node v.
  function automatic int var_deg(int v);
    int d = 0;
    for (int e = 0; e < N_EDGE; e++) if (edge_var(e) == v) d++;
    return d;
  endfunction

  // The i-th edge (in increasing edge order) on variable node v.
  function automatic int var_edge(int v, int i);
    int d = 0;
    for (int e = 0; e < N_EDGE; e++)
      if (edge_var(e) == v) begin
        if (d == i) return e;
        d++;
      end
    return 0;
  endfunction

  // Syndrome of a hard-decision word: bit j is the parity of check j.
  function automatic logic [N_CHK-1:0] calc_syndrome(logic [N_VAR-1:0] bits);
    logic [N_CHK-1:0] s = '0;
    for (int e = 0; e < N_EDGE; e++) s[edge_chk(e)] ^= bits[edge_var(e)];
    return s;
  endfunction

  // Information bits sit on the odd-numbered variable nodes.
  function automatic logic [N_INFO-1:0] info_of(logic [N_VAR-1:0] bits);
    logic [N_INFO-1:0] u;
    for (int i = 0; i < N_INFO; i++) u[i] = bits[2*i+1];
    return u;
  endfunction

  // Codeword of an information word: odd bits carry it, each even bit 2j is
  // the parity of its two odd neighbours 2j-1 (mod 16) and 2j+1.
  function automatic logic [N_VAR-1:0] encode(logic [N_INFO-1:0] u);
    logic [N_VAR-1:0] c;
    for (int i = 0; i < N_INFO; i++) c[2*i+1] = u[i];
    for (int j = 0; j < N_CHK; j++) c[2*j] = c[(2*j+N_VAR-1) % N_VAR] ^ c[2*j+1];
    return c;
  endfunction

  // LHCA generators (rule 90/150, null boundary). RULE bit i = 1 makes cell i
  // a rule-150 cell. Each length is a Mersenne-prime exponent and each rule
  // vector gives an irreducible, hence primitive, characteristic polynomial, so
  // every generator runs through all 2^N - 1 non-zero states.
  localparam int LHCA_N0 = 31;
  localparam int LHCA_N1 = 61;
  localparam int LHCA_N2 = 89;
  localparam logic [LHCA_N0-1:0] LHCA_R0 = 31'h16d7b4b2;
  localparam logic [LHCA_N1-1:0] LHCA_R1 = 61'h199cb198e3f866ae;
  localparam logic [LHCA_N2-1:0] LHCA_R2 = 89'h81d008a1762d90dde8064;
  localparam int LHCA_TOTAL = LHCA_N0 + LHCA_N1 + LHCA_N2;  // 181

endpackage

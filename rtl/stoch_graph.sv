// stoch_graph: the (16,8) LDPC factor graph as stochastic logic.
//
// Every node of the code's factor graph is its own piece of hardware and every
// edge is two wires, one per direction, each carrying one bit per clock:
//   - 16 equality nodes (var_node): even-numbered ones have one check edge,
//     odd-numbered ones two;
//   - 8 parity-check nodes (check_node) of degree 3; check j joins equality
//     nodes 2j-1 (mod 16), 2j and 2j+1;
//   - a supernode on each of the 24 edges in the check-to-equality
//     direction, which re-randomizes the stream before it reaches the J-K
//     equality gates.
// The graph, the node circuits and the presence of supernodes between the
// nodes follow the published decoder. Placing them only in front of the
// equality nodes is this design's reading: it is the J-K gates that lock up
// on correlated inputs, and in simulation supernodes in both directions
// roughly doubled the decoding time and raised the error rate.
//
// Interface: ch[v] is the channel stream of bit v, dec[v] its decision stream.
// noise holds (SN_W+1) random bits per supernode; edge e's supernode uses
// slice e.
// clr clears every node and supernode.
module stoch_graph
  import ldpc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  input  logic [N_VAR-1:0]    ch,
  input  logic [NOISE_SN-1:0] noise,
  output logic [N_VAR-1:0]    dec
);
  localparam int NW = SN_W + 1;

  logic [N_EDGE-1:0] v2c;            // equality -> check
  logic [N_EDGE-1:0] c2v_raw, c2v;   // check -> equality, before/after supernode

  for (genvar e = 0; e < N_EDGE; e++) begin : g_edge
    supernode #(.W(SN_W)) u_sn (
      .clk, .rst_n, .clr,
      .in_s(c2v_raw[e]), .n(noise[e*NW +: NW]), .out_s(c2v[e])
    );
  end

  for (genvar v = 0; v < N_VAR; v++) begin : g_var
    localparam int VD = var_deg(v);
    logic [VD-1:0] in_m, out_m;
    for (genvar i = 0; i < VD; i++) begin : g_port
      assign in_m[i]                = c2v[var_edge(v, i)];
      assign v2c[var_edge(v, i)]     = out_m[i];
    end
    var_node #(.DEG(VD)) u_var (
      .clk, .rst_n, .clr,
      .ch(ch[v]), .in_msg(in_m), .out_msg(out_m), .dec(dec[v])
    );
  end

  for (genvar j = 0; j < N_CHK; j++) begin : g_chk
    check_node #(.DEG(CHK_DEG)) u_chk (
      .clk, .rst_n, .clr,
      .in_msg (v2c[j*CHK_DEG +: CHK_DEG]),
      .out_msg(c2v_raw[j*CHK_DEG +: CHK_DEG])
    );
  end
endmodule

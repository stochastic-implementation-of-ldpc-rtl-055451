// check_node: stochastic parity-check node of the factor graph.
//
// Each edge output is the extrinsic parity message: the XOR of the streams on
// all the other edges, registered. A degree-3 node is three copies of the
// parity-check stochastic gate (XOR plus D flip-flop), one per edge, which is
// how the published decoder builds it. For other degrees (not used by the
// (16,8) code) the XOR of the remaining inputs feeds a single flip-flop.
//
// Interface: in_msg[e] arrives from the equality node on edge e; out_msg[e]
// goes back along the same edge. Timing: one cycle from input to output.
module check_node #(
  parameter int DEG = 3
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clr,
  input  logic [DEG-1:0] in_msg,
  output logic [DEG-1:0] out_msg
);
  logic [DEG-1:0] others;  // XOR of all inputs except edge e, minus one gate

  for (genvar e = 0; e < DEG; e++) begin : g_edge
    // XOR of the inputs other than e and the first remaining one; that first
    // one and the result are the two gate inputs.
    localparam int FIRST = (e == 0) ? 1 : 0;
    always_comb begin
      others[e] = 1'b0;
      for (int i = 0; i < DEG; i++)
        if (i != e && i != FIRST) others[e] ^= in_msg[i];
    end
    stoch_xor_gate u_gate (
      .clk, .rst_n, .clr,
      .a(in_msg[FIRST]), .b(others[e]), .c(out_msg[e])
    );
  end
endmodule

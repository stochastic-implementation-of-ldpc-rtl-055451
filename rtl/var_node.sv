// var_node: stochastic equality (variable) node of the factor graph.
//
// The node sees the channel stream ch and one stream per check-node edge.
// Every output is the soft equality of a set of input streams, built as a
// chain of 2-input J-K equality gates (a node of any degree decomposes into
// degree-3 nodes):
//   out_msg[e] - extrinsic message on edge e: ch and every in_msg except e.
//                With a single edge this is the channel stream itself.
//   dec        - full belief of the bit: ch and all in_msg, fed to the
//                up/down counter that makes the hard decision.
// The gates and the decomposition follow the published decoder; which stream
// feeds the output counter is this design's choice.
//
// Timing: a chain of k gates delays its stream by k cycles.
module var_node #(
  parameter int DEG = 2
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clr,
  input  logic           ch,
  input  logic [DEG-1:0] in_msg,
  output logic [DEG-1:0] out_msg,
  output logic           dec
);
  // Output o < DEG is edge o; output o == DEG is the decision stream.
  for (genvar o = 0; o <= DEG; o++) begin : g_out
    localparam int NI = (o == DEG) ? DEG + 1 : DEG;  // streams combined
    logic [NI-1:0] xin;   // the streams combined by this output
    logic [NI-1:0] acc;   // acc[s]: equality of xin[0..s]

    always_comb begin
      int idx;
      xin    = '0;
      xin[0] = ch;
      idx    = 1;
      for (int i = 0; i < DEG; i++)
        if (i != o) begin
          xin[idx] = in_msg[i];
          idx++;
        end
    end

    assign acc[0] = xin[0];
    for (genvar s = 1; s < NI; s++) begin : g_chain
      stoch_eq_gate u_eq (
        .clk, .rst_n, .clr,
        .a(acc[s-1]), .b(xin[s]), .c(acc[s])
      );
    end

    if (o == DEG) begin : g_dec
      assign dec = acc[NI-1];
    end else begin : g_msg
      assign out_msg[o] = acc[NI-1];
    end
  end
endmodule

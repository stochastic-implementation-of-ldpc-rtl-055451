// updown_counter: stochastic stream to hard decision.
//
// While en is high the counter goes up by one for every 1 in the stream and
// down by one for every 0; its sign gives the decision: non-negative means the
// stream carries mostly ones, so the bit is decoded as 1 (bit_o = NOT sign).
// The up/down counting and the sign rule follow the published decoder. The
// width CW and the saturation at both ends (so the sign cannot wrap) are this
// design's choice.
//
// Timing: bit_o reflects the counts up to the previous clock edge. clr sets
// the count to 0.
module updown_counter #(
  parameter int CW = 6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic en,
  input  logic s,
  output logic bit_o
);
  localparam logic signed [CW-1:0] CMAX = {1'b0, {(CW-1){1'b1}}};
  localparam logic signed [CW-1:0] CMIN = {1'b1, {(CW-1){1'b0}}};

  logic signed [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   cnt <= '0;
    else if (clr) cnt <= '0;
    else if (en) begin
      if (s && cnt != CMAX)       cnt <= cnt + CW'(1);
      else if (!s && cnt != CMIN) cnt <= cnt - CW'(1);
    end

  assign bit_o = ~cnt[CW-1];
endmodule

// supernode: regenerates a stochastic stream to break bit-to-bit correlation.
//
// The J-K equality gates lock up when their input streams are correlated. A
// supernode measures the probability carried by its input stream and re-emits
// it as a fresh stream built from new random bits: a W-bit counter tallies the
// ones of the input over a window of 2^W cycles, and at the end of each window
// the tally is copied to a hold register that drives a digital-to-stochastic
// converter for the whole next window. This counter-plus-converter structure
// and W = 3 follow the published decoder. Own choices: a window holding 2^W
// ones saturates at 2^W - 1; the hold register starts at 2^(W-1) after reset
// or clr; the window timing is local to each supernode.
//
// Interface: in_s is the stream in, n the W+1 random bits of this cycle,
// out_s the regenerated stream (combinational from the hold register and n).
// Timing: a change of the input probability shows at the output between one
// and two windows later.
module supernode #(
  parameter int W = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         in_s,
  input  logic [W:0]   n,
  output logic         out_s
);
  localparam logic [W-1:0] MAXV = '1;
  localparam logic [W-1:0] MIDV = W'(1 << (W - 1));

  logic [W-1:0] win;    // position in the window
  logic [W-1:0] ones;   // ones counted so far in this window
  logic [W-1:0] held;   // tally of the last complete window
  logic [W-1:0] next_ones;

  assign next_ones = (in_s && ones != MAXV) ? ones + W'(1) : ones;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      win  <= '0;
      ones <= '0;
      held <= MIDV;
    end else if (clr) begin
      win  <= '0;
      ones <= '0;
      held <= MIDV;
    end else begin
      win <= win + W'(1);
      if (win == MAXV) begin
        held <= next_ones;
        ones <= '0;
      end else begin
        ones <= next_ones;
      end
    end

  d2s_conv #(.M(W)) u_conv (.d(held), .n(n), .s(out_s));
endmodule

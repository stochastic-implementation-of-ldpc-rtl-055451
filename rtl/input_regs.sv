// input_regs: codeword buffer between the LUT and the stochastic converters.
//
// Probability codes arrive one per accepted cycle (in_valid & in_ready), in
// bit order 0 .. N-1. They fill a load buffer; when N codes are in, full goes
// high and the buffer waits. A take pulse from the controller copies the
// buffer to the output register word, which stays fixed while that codeword
// is decoded, and empties the buffer so the next codeword can load during the
// decoding. The published block diagram only names these registers; the
// serial load, handshake and double buffering are this design's choice.
//
// Timing: in_ready is low only while the buffer is full; take is honoured only
// when full is high, and word updates on the same clock edge.
module input_regs #(
  parameter int N = 16,
  parameter int M = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [M-1:0]   in_d,
  output logic           full,
  input  logic           take,
  output logic [N*M-1:0] word
);
  localparam int IW = $clog2(N + 1);

  logic [N*M-1:0] buf_q;
  logic [IW-1:0]  fill;

  assign full     = (fill == IW'(N));
  assign in_ready = !full;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      buf_q <= '0;
      fill  <= '0;
      word  <= '0;
    end else begin
      if (take && full) begin
        word <= buf_q;
        fill <= '0;
      end else if (in_valid && in_ready) begin
        buf_q[fill*M +: M] <= in_d;
        fill <= fill + IW'(1);
      end
    end
endmodule

// stoch_ldpc_decoder: stochastic decoder for a rate-1/2, length-16 LDPC code.
//
// Messages of the sum-product algorithm are carried as Bernoulli bit streams:
// a probability is the fraction of ones in a stream, so the parity-check
// function becomes an XOR gate and the equality function a J-K flip-flop, and
// the whole factor graph fits in a few hundred flip-flops with one wire per
// edge and direction. The data path, in the order of the published block
// diagram:
//   llr_to_prob   quantized LLR of each received bit -> 4-bit probability
//   input_regs    collects the 16 codes of a codeword (double buffered)
//   d2s_conv x16  4-bit codes -> channel streams, from LHCA random bits
//   stoch_graph   16 equality nodes, 8 check nodes, 24 supernodes
//   updown_counter x16   decision streams -> hard decisions
//   parity_check  stops decoding once the decisions form a codeword
//   decode_ctrl   LOAD, INIT (t_init cycles, counters frozen), CHECK
//                 (t_check cycles counting), then RUN until the parity
//                 check passes or t_max cycles have passed.
// Own choices (see the sub-modules): the LLR input format, the serial sample
// interface, the run-time phase lengths and limit, the counter width, and the
// systematic positions: information bit i is code bit 2i+1.
//
// Interface: samples are accepted one per cycle on in_valid & in_ready, bit 0
// of a codeword first. For each codeword, out_valid pulses once with the
// decoded word out_bits, its information bits out_info, out_converged (the
// word satisfies every check) and out_cycles (decoding cycles, at least
// t_init + t_check). A codeword occupies the decoder for out_cycles + 2
// clock cycles (the load cycle and the cycle that returns to idle); the next
// one loads meanwhile.
module stoch_ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int LLR_W    = 6,
  parameter int LLR_FRAC = 2,
  parameter int CNT_W    = 6,
  parameter int TW       = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [LLR_W-1:0] in_llr,
  input  logic [TW-1:0]           t_init,
  input  logic [TW-1:0]           t_check,
  input  logic [TW-1:0]           t_max,
  output logic                    out_valid,
  output logic [N_VAR-1:0]        out_bits,
  output logic [N_INFO-1:0]       out_info,
  output logic                    out_converged,
  output logic [TW-1:0]           out_cycles
);
  logic [D_W-1:0]       in_d;
  logic                 buf_full, take, clr, cnt_en, done, converged, busy;
  logic [N_VAR*D_W-1:0] word;
  logic [NOISE_ALL-1:0] noise;
  logic [N_VAR-1:0]     ch, dec_s, hard;
  logic                 parity_ok;
  logic [N_CHK-1:0]     syndrome;   // which checks fail (for debug)
  logic [TW-1:0]        cycles;

  llr_to_prob #(.LLR_W(LLR_W), .LLR_FRAC(LLR_FRAC), .M(D_W)) u_lut (
    .llr(in_llr), .d(in_d)
  );

  input_regs #(.N(N_VAR), .M(D_W)) u_regs (
    .clk, .rst_n, .in_valid, .in_ready, .in_d,
    .full(buf_full), .take, .word
  );

  noise_gen #(.NBITS(NOISE_ALL)) u_noise (
    .clk, .rst_n, .en(1'b1), .noise
  );

  for (genvar v = 0; v < N_VAR; v++) begin : g_in
    d2s_conv #(.M(D_W)) u_d2s (
      .d(word[v*D_W +: D_W]),
      .n(noise[v*(D_W+1) +: D_W+1]),
      .s(ch[v])
    );
  end

  stoch_graph u_graph (
    .clk, .rst_n, .clr, .ch,
    .noise(noise[NOISE_ALL-1:NOISE_IN]),
    .dec(dec_s)
  );

  for (genvar v = 0; v < N_VAR; v++) begin : g_out
    updown_counter #(.CW(CNT_W)) u_cnt (
      .clk, .rst_n, .clr, .en(cnt_en), .s(dec_s[v]), .bit_o(hard[v])
    );
  end

  parity_check u_pc (.bits(hard), .syndrome(syndrome), .ok(parity_ok));

  decode_ctrl #(.TW(TW)) u_ctrl (
    .clk, .rst_n, .start(buf_full), .t_init, .t_check, .t_max,
    .parity_ok, .busy, .take, .clr, .cnt_en, .done, .converged, .cycles
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_valid     <= 1'b0;
      out_bits      <= '0;
      out_converged <= 1'b0;
      out_cycles    <= '0;
    end else begin
      out_valid <= done;
      if (done) begin
        out_bits      <= hard;
        out_converged <= converged;
        out_cycles    <= cycles;
      end
    end

  assign out_info = info_of(out_bits);
endmodule

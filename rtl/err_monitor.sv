// err_monitor: compares a decoder's results with the words that were sent and
// keeps the error and timing statistics of a trial.
//
// The information bits of every word sent are queued in a small FIFO
// (sent_push/sent_info). Each decoder result (dec_valid) takes the oldest
// queued word and updates the counters:
//   words       - results seen
//   bit_errs    - information bits that differ from the sent word
//   word_errs   - results with at least one wrong information bit
//   unconverged - results that stopped at the cycle limit
//   cycle_sum   - sum of the reported decoding cycles
// seq_err is set, and stays set until clr, if a result arrives with the queue
// empty or a word is pushed into a full queue; either means the words and
// results are out of step.
//
// Timing: counters update on the clock edge after dec_valid; a push and a
// result in the same cycle are both honoured. clr empties the queue and zeros
// every counter (it takes priority over a push or result in that cycle).
//
// Counting bit errors, frames and decoding time follows the published
// demonstration set-up; the FIFO, the counter widths and seq_err are this
// design's own choices. DEPTH = 4 covers the words a decoder can hold: one
// being decoded, one buffered and one being sent.
module err_monitor
  import ldpc_pkg::*;
#(
  parameter int DEPTH = 4,
  parameter int CW    = 32,
  parameter int TW    = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              sent_push,
  input  logic [N_INFO-1:0] sent_info,
  input  logic              dec_valid,
  input  logic [N_INFO-1:0] dec_info,
  input  logic              dec_converged,
  input  logic [TW-1:0]     dec_cycles,
  output logic [CW-1:0]     words,
  output logic [CW-1:0]     bit_errs,
  output logic [CW-1:0]     word_errs,
  output logic [CW-1:0]     unconverged,
  output logic [CW+7:0]     cycle_sum,
  output logic              seq_err
);
  localparam int AW = $clog2(DEPTH);

  logic [N_INFO-1:0] fifo [DEPTH];
  logic [AW-1:0]     wp, rp;
  logic [AW:0]       cnt;
  logic              do_pop, do_push;
  logic [N_INFO-1:0] diff;

  assign do_pop  = dec_valid && cnt != '0;
  assign do_push = sent_push && (cnt != (AW+1)'(DEPTH) || do_pop);
  assign diff    = fifo[rp] ^ dec_info;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wp <= '0; rp <= '0; cnt <= '0;
      words <= '0; bit_errs <= '0; word_errs <= '0; unconverged <= '0;
      cycle_sum <= '0; seq_err <= 1'b0;
    end else if (clr) begin
      wp <= '0; rp <= '0; cnt <= '0;
      words <= '0; bit_errs <= '0; word_errs <= '0; unconverged <= '0;
      cycle_sum <= '0; seq_err <= 1'b0;
    end else begin
      if (do_push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + AW'(1);
      if (do_pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + AW'(1);
      cnt <= cnt + (AW+1)'(do_push) - (AW+1)'(do_pop);
      if ((dec_valid && !do_pop) || (sent_push && !do_push)) seq_err <= 1'b1;
      if (dec_valid) begin
        words       <= words + CW'(1);
        cycle_sum   <= cycle_sum + (CW+8)'(dec_cycles);
        unconverged <= unconverged + CW'(!dec_converged);
        if (do_pop) begin
          bit_errs  <= bit_errs + CW'($countones(diff));
          word_errs <= word_errs + CW'(diff != '0);
        end
      end
    end

  always_ff @(posedge clk)
    if (do_push) fifo[wp] <= sent_info;
endmodule

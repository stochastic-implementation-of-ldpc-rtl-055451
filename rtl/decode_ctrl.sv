// decode_ctrl: phase controller of the stochastic decoder.
//
// A codeword is decoded in phases:
//   LOAD  (the start cycle) - the buffered codeword is taken from the input
//          registers and the graph, supernodes and up/down counters are
//          cleared (clr).
//   INIT  - the graph runs for t_init cycles; the up/down counters are frozen
//          so the start-up transient of the streams is not counted.
//   CHECK - the graph runs for t_check cycles with the counters counting.
//   RUN   - the parity of the hard decisions is tested every cycle; if all
//          checks hold the result is ready, otherwise the counters count one
//          more cycle. The cycle count is therefore data dependent.
// The INIT / CHECK phases and the stop on a valid codeword follow the
// published decoder. Own choices: t_init, t_check and the cycle limit t_max
// are run-time inputs; at the limit the result is given up with
// converged = 0; a phase of length 0 is skipped.
//
// Interface: start requests a decode (the input buffer is full); take and clr
// pulse in the start cycle. done pulses for one cycle with converged and
// cycles (graph cycles from the end of LOAD to the decision, t_init + t_check
// at least). The parity_ok input must reflect the counters of that cycle.
module decode_ctrl #(
  parameter int TW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [TW-1:0] t_init,
  input  logic [TW-1:0] t_check,
  input  logic [TW-1:0] t_max,
  input  logic          parity_ok,
  output logic          busy,
  output logic          take,
  output logic          clr,
  output logic          cnt_en,
  output logic          done,
  output logic          converged,
  output logic [TW-1:0] cycles
);
  typedef enum logic [1:0] {S_IDLE, S_INIT, S_CHECK, S_RUN} state_t;

  state_t        state;
  logic [TW-1:0] pc;   // cycles spent in the current phase

  assign busy      = (state != S_IDLE);
  assign take      = (state == S_IDLE) && start;
  assign clr       = take;
  assign cnt_en    = (state == S_CHECK) ||
                     (state == S_RUN && !parity_ok && cycles < t_max);
  assign done      = (state == S_RUN) && (parity_ok || cycles >= t_max);
  assign converged = (state == S_RUN) && parity_ok;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state  <= S_IDLE;
      pc     <= '0;
      cycles <= '0;
    end else begin
      unique case (state)
        S_IDLE:
          if (start) begin
            pc     <= '0;
            cycles <= '0;
            if (t_init != '0)       state <= S_INIT;
            else if (t_check != '0) state <= S_CHECK;
            else                    state <= S_RUN;
          end
        S_INIT: begin
          cycles <= cycles + TW'(1);
          if (pc + TW'(1) >= t_init) begin
            pc    <= '0;
            state <= (t_check != '0) ? S_CHECK : S_RUN;
          end else pc <= pc + TW'(1);
        end
        S_CHECK: begin
          cycles <= cycles + TW'(1);
          if (pc + TW'(1) >= t_check) begin
            pc    <= '0;
            state <= S_RUN;
          end else pc <= pc + TW'(1);
        end
        S_RUN:
          if (done) state  <= S_IDLE;
          else      cycles <= cycles + TW'(1);
        default: state <= S_IDLE;
      endcase
    end

  // The counters count exactly in CHECK and in RUN cycles that do not end.
  assert property (@(posedge clk) disable iff (!rst_n) done |-> !cnt_en);
  assert property (@(posedge clk) disable iff (!rst_n) take |-> !busy);
endmodule

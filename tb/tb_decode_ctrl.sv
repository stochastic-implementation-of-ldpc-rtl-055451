// tb_decode_ctrl: checks the phase controller.
// For random phase lengths t_init, t_check, a limit t_max, and a parity
// model that reports success once the counters have counted K cycles, the
// expected outcome is worked out by formula:
//   the decision is taken at c = max(t_init + t_check, min(t_init + K, t_max))
//   graph cycles after the load cycle, converged = (c - t_init >= K),
// done comes c + 1 clocks after take, and cnt_en is high in exactly
// c - t_init of those clocks, never in the first t_init. Both the converged
// and the limit outcome, and zero-length phases, must occur.
module tb_decode_ctrl;
  localparam int TW = 16;
  logic clk = 0, rst_n = 1, start = 0, parity_ok;
  logic [TW-1:0] t_init, t_check, t_max, cycles;
  logic busy, take, clr, cnt_en, done, converged;
  int checks = 0, failures = 0;
  int counted = 0, kk = 0;
  int n_conv = 0, n_limit = 0, n_zero = 0;

  decode_ctrl #(.TW(TW)) dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a falling edge applies the asynchronous reset

  assign parity_ok = (counted >= kk);

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    t_init = '0; t_check = '0; t_max = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < 300; r++) begin
      int ti, tc, tm, c_exp, clk_n, en_n, en_early;
      logic conv_exp;
      ti = ($urandom_range(9) == 0) ? 0 : $urandom_range(1, 40);
      tc = ($urandom_range(9) == 0) ? 0 : $urandom_range(1, 40);
      tm = $urandom_range(0, 150);
      @(negedge clk);
      t_init = TW'(ti); t_check = TW'(tc); t_max = TW'(tm);
      counted = 0;
      kk = 1000000;                        // parity fails until the load
      start = 1;
      #1;
      checks++; if (take !== 1'b1 || clr !== 1'b1) failures++;
      @(posedge clk); #1;
      start = 0;
      kk = $urandom_range(1, 120);
      c_exp = ti + tc;
      if (ti + kk < tm) begin if (ti + kk > c_exp) c_exp = ti + kk; end
      else if (tm > c_exp) c_exp = tm;
      conv_exp = (c_exp - ti >= kk);
      clk_n = 0; en_n = 0; en_early = 0;
      while (!done && clk_n < 2000) begin
        clk_n++;
        if (cnt_en) begin en_n++; if (clk_n <= ti) en_early++; end
        checks++; if (busy !== 1'b1 || take !== 1'b0) failures++;
        @(posedge clk); #1;
        counted = en_n;   // the counters now hold en_n counts
        #1;
      end
      clk_n++;
      checks += 4;
      if (clk_n != c_exp + 1) begin failures++; $display("run %0d done at %0d exp %0d (ti=%0d tc=%0d tm=%0d K=%0d)", r, clk_n, c_exp + 1, ti, tc, tm, kk); end
      if (int'(cycles) != c_exp) begin failures++; $display("run %0d cycles %0d exp %0d", r, cycles, c_exp); end
      if (converged !== conv_exp) begin failures++; $display("run %0d converged %b exp %b", r, converged, conv_exp); end
      if (en_n != c_exp - ti || en_early != 0) begin failures++; $display("run %0d counted %0d exp %0d early %0d", r, en_n, c_exp - ti, en_early); end
      if (conv_exp) n_conv++; else n_limit++;
      if (ti == 0 || tc == 0) n_zero++;
      @(posedge clk); #1;
      checks++; if (busy !== 1'b0) failures++;
    end
    checks += 3;
    if (n_conv == 0) failures++;
    if (n_limit == 0) failures++;
    if (n_zero == 0) failures++;
    $display("converged %0d, limit %0d, zero-length phase %0d", n_conv, n_limit, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_llr_to_prob: checks the LLR-to-probability table exhaustively.
// For every 6-bit LLR code (2 fraction bits) the expected probability code is
// min(15, floor(16 / (1 + exp(-L)))) computed here with the simulator's
// $exp. Codes must also rise monotonically with the LLR and be symmetric:
// d(L) + d(-L) = 15 wherever L and -L are both representable and no level
// boundary is hit.
module tb_llr_to_prob;
  localparam int LLR_W = 6, LLR_FRAC = 2, M = 4;
  logic signed [LLR_W-1:0] llr;
  logic [M-1:0] d;
  int checks = 0, failures = 0;

  llr_to_prob #(.LLR_W(LLR_W), .LLR_FRAC(LLR_FRAC), .M(M)) dut (.llr, .d);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev = -1;
    for (int v = -(2 ** (LLR_W - 1)); v < 2 ** (LLR_W - 1); v++) begin
      real l, p;
      int e;
      llr = LLR_W'(v);
      #1;
      l = real'(v) / real'(2 ** LLR_FRAC);
      p = 1.0 / (1.0 + $exp(-l));
      e = int'($floor(p * 16.0));
      if (e > 15) e = 15;
      checks++;
      if (int'(d) != e) begin failures++; $display("llr=%0d d=%0d exp=%0d", v, d, e); end
      checks++;
      if (int'(d) < prev) begin failures++; $display("not monotonic at %0d", v); end
      prev = int'(d);
    end
    // spot values: LLR 0 -> p = 0.5 -> code 8; large positive -> 15; large negative -> 0
    llr = 0; #1; checks++; if (d != 4'd8) failures++;
    llr = 6'sd31; #1; checks++; if (d != 4'd15) failures++;
    llr = -6'sd32; #1; checks++; if (d != 4'd0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

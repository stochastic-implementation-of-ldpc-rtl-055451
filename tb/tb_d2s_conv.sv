// tb_d2s_conv: checks the digital-to-stochastic converter exhaustively.
// For every input value d the output is evaluated for all 2^(M+1) noise
// vectors; with fair noise bits the number of ones must be exactly 2d + 1,
// i.e. P(1) = (2d + 1) / 2^(M+1). The bit chosen for each noise vector is also
// compared with the priority rule of the mux chain: the lowest-numbered noise
// bit that is set selects its data bit (n[0] -> d[M-1], n[1] -> d[M-2], ...),
// and n[M] is the output when none is set.
module tb_d2s_conv;
  localparam int M = 4;
  logic [M-1:0] d;
  logic [M:0]   n;
  logic         s, e;
  int checks = 0, failures = 0;

  d2s_conv #(.M(M)) dut (.d, .n, .s);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int dv = 0; dv < 2 ** M; dv++) begin
      int ones;
      ones = 0;
      d = M'(dv);
      for (int nv = 0; nv < 2 ** (M + 1); nv++) begin
        int k;
        n = (M + 1)'(nv);
        #1;
        ones += s;
        k = 0;
        while (k < M && !n[k]) k++;
        e = (k < M) ? d[M-1-k] : n[M];
        checks++;
        if (s !== e) begin failures++; if (failures < 10) $display("d=%0d n=%b s=%b exp=%b", dv, n, s, e); end
      end
      checks++;
      if (ones != 2 * dv + 1) begin failures++; $display("d=%0d ones=%0d", dv, ones); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

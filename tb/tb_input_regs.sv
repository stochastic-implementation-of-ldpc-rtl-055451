// tb_input_regs: checks the codeword buffer.
// Random codes are offered with random gaps. After 16 accepted codes full must
// rise and in_ready fall; offered codes must then be refused. A take pulse
// must copy the codes, in arrival order, to word, and the buffer must accept
// the next codeword while word holds the previous one.
module tb_input_regs;
  localparam int N = 16, M = 4;
  logic clk = 0, rst_n = 1, in_valid = 0, take = 0;
  logic in_ready, full;
  logic [M-1:0] in_d = '0;
  logic [N*M-1:0] word, expw, held;
  int checks = 0, failures = 0;

  input_regs #(.N(N), .M(M)) dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a falling edge applies the asynchronous reset

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int w = 0; w < 20; w++) begin
      int got;
      got = 0;
      held = word;
      while (got < N) begin
        @(negedge clk);
        in_valid = ($urandom_range(3) != 0);
        in_d = M'($urandom);
        checks++; if (in_ready !== 1'b1 || full !== 1'b0) failures++;
        if (in_valid) begin expw[got*M +: M] = in_d; got++; end
        @(posedge clk); #1;
        checks++; if (word !== held) failures++;   // previous word untouched
      end
      in_valid = 0;
      checks++; if (full !== 1'b1 || in_ready !== 1'b0) begin failures++; $display("not full after %0d", N); end
      // refused while full
      repeat ($urandom_range(3)) begin
        @(negedge clk); in_valid = 1; in_d = M'($urandom);
        @(posedge clk); #1; checks++; if (full !== 1'b1) failures++;
      end
      @(negedge clk); in_valid = 0; take = 1;
      @(posedge clk); #1; take = 0;
      checks++;
      if (word !== expw) begin failures++; $display("word %h exp %h", word, expw); end
      checks++; if (full !== 1'b0 || in_ready !== 1'b1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

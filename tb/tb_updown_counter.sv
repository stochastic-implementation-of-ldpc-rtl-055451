// tb_updown_counter: checks the stream-to-decision counter.
// A 4-bit counter is driven by random streams of changing density, with en
// toggling, against a saturating reference count in the range -8 .. 7; the
// decision must be 1 exactly when the reference count is non-negative. Both
// saturation limits must be reached. clr must return the count to 0.
module tb_updown_counter;
  localparam int CW = 4;
  logic clk = 0, rst_n = 1, clr = 0, en = 0, s = 0, bit_o;
  int checks = 0, failures = 0, r = 0, hit_max = 0, hit_min = 0;

  updown_counter #(.CW(CW)) dut (.*);
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
    for (int t = 0; t < 20000; t++) begin
      int dens;
      @(negedge clk);
      dens = ((t / 500) % 2) ? 80 : 20;
      s  = ($urandom_range(99) < dens);
      en = ($urandom_range(9) != 0);
      if (en) begin
        if (s && r < 7) r++;
        else if (!s && r > -8) r--;
      end
      if (r == 7) hit_max++;
      if (r == -8) hit_min++;
      @(posedge clk); #1;
      checks++;
      if (bit_o !== (r >= 0)) begin failures++; if (failures < 10) $display("t=%0d bit=%b ref=%0d", t, bit_o, r); end
    end
    checks++; if (hit_max == 0 || hit_min == 0) failures++;
    // drive negative, then clear
    @(negedge clk); en = 1; s = 0; repeat (10) @(posedge clk);
    #1; checks++; if (bit_o !== 1'b0) failures++;
    @(negedge clk); clr = 1; @(posedge clk); #1;
    checks++; if (bit_o !== 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

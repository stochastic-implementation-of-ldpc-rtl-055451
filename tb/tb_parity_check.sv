// tb_parity_check: checks the parity equations of the (16,8) code.
// All 256 codewords are built from their information bits (bit 2i+1) with the
// even bits 2j = bit(2j-1) ^ bit(2j+1) (indices mod 16); each must pass. For
// each codeword and each single-bit error the syndrome must flag exactly the
// checks joined to that bit: even bit 2j -> check j, odd bit 2j+1 -> checks j
// and j+1 (mod 8). Random double errors on one codeword must be flagged too
// unless the two bits share all their checks (which cannot happen here).
module tb_parity_check;
  logic [15:0] bits;
  logic [7:0]  syndrome;
  logic        ok;
  int checks = 0, failures = 0;

  parity_check dut (.bits, .syndrome, .ok);

  function automatic logic [15:0] encode(logic [7:0] u);
    logic [15:0] c = '0;
    for (int i = 0; i < 8; i++) c[2*i+1] = u[i];
    for (int j = 0; j < 8; j++) c[2*j] = c[(2*j+15) % 16] ^ c[2*j+1];
    return c;
  endfunction

  function automatic logic [7:0] checks_of(int v);
    logic [7:0] m = '0;
    if (v % 2 == 0) m[v/2] = 1'b1;
    else begin m[(v-1)/2] = 1'b1; m[((v+1)/2) % 8] = 1'b1; end
    return m;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int u = 0; u < 256; u++) begin
      logic [15:0] c;
      c = encode(8'(u));
      bits = c; #1;
      checks++;
      if (ok !== 1'b1 || syndrome !== 8'h00) begin failures++; $display("codeword %h rejected", c); end
      for (int v = 0; v < 16; v++) begin
        bits = c ^ (16'h1 << v); #1;
        checks++;
        if (ok !== 1'b0 || syndrome !== checks_of(v)) begin
          failures++; if (failures < 10) $display("err bit %0d syn=%b exp=%b", v, syndrome, checks_of(v));
        end
      end
      begin
        int a, b;
        a = $urandom_range(15); b = (a + 1 + $urandom_range(14)) % 16;
        bits = c ^ (16'h1 << a) ^ (16'h1 << b); #1;
        checks++;
        if (syndrome !== (checks_of(a) ^ checks_of(b))) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// parity_check: verifies the parity equations of the (16,8) code.
//
// syndrome[j] is the XOR of the three bits joined by check node j (bits
// 2j-1 mod 16, 2j and 2j+1); ok is high when every check holds, i.e. the
// hard decisions form a codeword. The decoder stops as soon as ok is seen
// after the checking phase, as in the published decoder.
//
// Purely combinational.
module parity_check
  import ldpc_pkg::*;
(
  input  logic [N_VAR-1:0] bits,
  output logic [N_CHK-1:0] syndrome,
  output logic             ok
);
  assign syndrome = calc_syndrome(bits);
  assign ok = (syndrome == '0);
endmodule

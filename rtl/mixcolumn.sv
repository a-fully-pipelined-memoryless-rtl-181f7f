// mixcolumn: AES MixColumns of one 32-bit column, done in F2. Output row r is
// {02}*s[r] + {03}*s[r+1] + s[r+2] + s[r+3] (indices mod 4), where the
// multiplications by {02} and {03} are the F2 bit matrices MUL2_F2 and
// MUL3_F2 and + is XOR. Row 0 is bits [31:24]. The result is registered:
// one cycle from d to q, the third cycle of a round.
module mixcolumn
  import aes_f2_pkg::*;
(
  input  logic  clk,
  input  word_t d,
  output word_t q
);
  always_ff @(posedge clk) q <= mix_column_f2(d);
endmodule

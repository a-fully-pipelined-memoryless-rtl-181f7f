// keyadd: AddRoundKey for one 32-bit column of the state, the XOR of the
// column with the matching column of the round key, registered. One cycle
// from a/k to q, the last cycle of a round.
module keyadd (
  input  logic        clk,
  input  logic [31:0] a,
  input  logic [31:0] k,
  output logic [31:0] q
);
  always_ff @(posedge clk) q <= a ^ k;
endmodule

// subkey: one step of the AES-128 key expansion in F2, rk[i] from rk[i-1].
// With p[0..3] the columns of keyin (p[0] = bits [127:96]):
//   t    = RotWord(SubWord(p[3])) XOR {rcon, 00, 00, 00}
//   w[0] = p[0] ^ t,  w[1] = p[1] ^ w[0],  w[2] = p[2] ^ w[1],  w[3] = p[3] ^ w[2]
// SubWord uses four two-stage sboxes (cycles 1-2). RotWord is only wiring:
// the sbox of byte 23:16 feeds the top byte. rcon touches only the top byte
// (bits 31:24 of t); the other three bytes of the round constant are zero.
// The XOR chain is computed and registered in cycle 3. Latency three
// cycles, a new key every cycle. keyin and rcon are delayed two cycles to
// meet the sbox outputs.
module subkey
  import aes_f2_pkg::*;
(
  input  logic   clk,
  input  block_t keyin,
  input  byte_t  rcon,
  output block_t keyout
);
  byte_t  sub [4];
  block_t key_d1, key_d2;
  byte_t  rcon_d1, rcon_d2;
  word_t  t, w0, w1, w2, w3;

  for (genvar i = 0; i < 4; i++) begin : g_sbox
    sbox u_sbox (.clk(clk), .d(keyin[31-8*i -: 8]), .q(sub[i]));
  end

  always_ff @(posedge clk) begin
    key_d1  <= keyin;
    key_d2  <= key_d1;
    rcon_d1 <= rcon;
    rcon_d2 <= rcon_d1;
  end

  always_comb begin
    t  = {sub[1] ^ rcon_d2, sub[2], sub[3], sub[0]};
    w0 = key_d2[127:96] ^ t;
    w1 = key_d2[95:64]  ^ w0;
    w2 = key_d2[63:32]  ^ w1;
    w3 = key_d2[31:0]   ^ w2;
  end

  always_ff @(posedge clk) keyout <= {w0, w1, w2, w3};
endmodule

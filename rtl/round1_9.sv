// round1_9: one full AES round in F2, used for rounds 1 to 9.
//   ShiftRows : wiring in front of the sboxes.
//   cycles 1-2: 16 sboxes (SubBytes), four per column.
//   cycle 3   : mixcolumn on each of the four columns.
//   cycle 4   : keyadd of each column with the new round key.
// In parallel, subkey derives this round's key from keyin and rcon in three
// cycles, so its output meets the MixColumns result at keyadd; reg128 then
// delays the key one more cycle to leave the round together with the data.
// control1_10 carries the valid flag (load -> done) with the same four
// cycles. A new block enters every cycle.
module round1_9
  import aes_f2_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  block_t datain,
  input  block_t keyin,
  input  byte_t  rcon,
  output block_t dataout,
  output block_t keyout,
  output logic   done
);
  block_t shifted, subbed, mixed, rkey;

  assign shifted = shift_rows(datain);

  for (genvar k = 0; k < 16; k++) begin : g_sbox
    sbox u_sbox (.clk(clk), .d(shifted[8*k +: 8]), .q(subbed[8*k +: 8]));
  end

  for (genvar c = 0; c < 4; c++) begin : g_col
    mixcolumn u_mixcolumn (.clk(clk), .d(subbed[127-32*c -: 32]), .q(mixed[127-32*c -: 32]));
    keyadd    u_keyadd    (.clk(clk), .a(mixed[127-32*c -: 32]), .k(rkey[127-32*c -: 32]),
                           .q(dataout[127-32*c -: 32]));
  end

  subkey      u_subkey   (.clk(clk), .keyin(keyin), .rcon(rcon), .keyout(rkey));
  reg128 #(.W(128)) u_reg128 (.clk(clk), .d(rkey), .q(keyout));
  control1_10 #(.DEPTH(4)) u_control (.clk(clk), .rst_n(rst_n), .load(load), .done(done));
endmodule

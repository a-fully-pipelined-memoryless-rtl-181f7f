// round10: the last AES round, which has no MixColumns.
//   ShiftRows : wiring in front of the sboxes.
//   cycles 1-2: 16 sboxes (SubBytes).
//   cycle 3   : reg128, which waits for the three-cycle subkey.
//   cycle 4   : keyadd10, the final AddRoundKey plus the way back from F2
//               to F1; its output edata is the ciphertext.
// subkey uses the constant rcon[10] in F2, {8f}. control1_10 passes the
// valid flag with the same four cycles.
module round10
  import aes_f2_pkg::*;
#(
  parameter byte_t RCON = 8'h8f
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  block_t datain,
  input  block_t keyin,
  output block_t edata,
  output logic   done
);
  block_t shifted, subbed, subbed_r, rkey;

  assign shifted = shift_rows(datain);

  for (genvar k = 0; k < 16; k++) begin : g_sbox
    sbox u_sbox (.clk(clk), .d(shifted[8*k +: 8]), .q(subbed[8*k +: 8]));
  end

  reg128 #(.W(128)) u_reg128 (.clk(clk), .d(subbed), .q(subbed_r));
  subkey   u_subkey   (.clk(clk), .keyin(keyin), .rcon(RCON), .keyout(rkey));
  keyadd10 u_keyadd10 (.clk(clk), .a(subbed_r), .k(rkey), .q(edata));
  control1_10 #(.DEPTH(4)) u_control (.clk(clk), .rst_n(rst_n), .load(load), .done(done));
endmodule

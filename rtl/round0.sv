// round0: the input block of the encryptor. Plaintext and key are captured
// in inputreg when load is high (cycle 1), mapped from F1 to F2 by phi
// (cycle 2), then the state gets the initial AddRoundKey in keyadd128 while
// the mapped key, which is round key 0, passes reg128 (cycle 3). control0
// delays load by the same three cycles into done. Structure and latency
// are the published ones.
module round0
  import aes_f2_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  block_t datain,
  input  block_t keyin,
  output block_t dataout,
  output block_t keyout,
  output logic   done
);
  block_t data_r, key_r, data_f2, key_f2;

  inputreg  #(.W(128)) u_inreg_data (.clk(clk), .load(load), .d(datain), .q(data_r));
  inputreg  #(.W(128)) u_inreg_key  (.clk(clk), .load(load), .d(keyin),  .q(key_r));
  phi       #(.W(128)) u_phi_data   (.clk(clk), .d(data_r), .q(data_f2));
  phi       #(.W(128)) u_phi_key    (.clk(clk), .d(key_r),  .q(key_f2));
  keyadd128            u_keyadd128  (.clk(clk), .a(data_f2), .b(key_f2), .q(dataout));
  reg128    #(.W(128)) u_reg128     (.clk(clk), .d(key_f2), .q(keyout));
  control0  #(.DEPTH(3)) u_control0 (.clk(clk), .rst_n(rst_n), .load(load), .done(done));
endmodule

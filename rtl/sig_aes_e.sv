// sig_aes_e: fully pipelined AES-128 encryptor without memories.
//
// Eleven stages in a chain: round0 (load, F1->F2 mapping, initial
// AddRoundKey, 3 cycles), nine round1_9 blocks (one AES round each, 4
// cycles) and round10 (last round and F2->F1 mapping, 4 cycles). Every
// round computes its own round key from the previous one, so a new
// plaintext/key pair can be given in every cycle: throughput is one 128-bit
// block per clock. The ciphertext of the pair presented with load = 1
// appears on edata, with done = 1, 43 cycles later. While load is low the
// input registers hold their last value and done stays low for those slots.
//
// Interface: clk, rst_n (active-low asynchronous, clears only the done
// pipeline), load, datain[127:0], keyin[127:0] -> edata[127:0], done.
// Bytes are in FIPS-197 order (first byte in bits 127:120).
module sig_aes_e
  import aes_f2_pkg::*;
#(
  parameter int LATENCY = 43  // documentation of the pipeline depth; fixed by the structure
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  block_t datain,
  input  block_t keyin,
  output block_t edata,
  output logic   done
);
  block_t data_s [0:9];
  block_t key_s  [0:9];
  logic   vld_s  [0:9];

  round0 u_round0 (
    .clk(clk), .rst_n(rst_n), .load(load), .datain(datain), .keyin(keyin),
    .dataout(data_s[0]), .keyout(key_s[0]), .done(vld_s[0])
  );

  for (genvar i = 1; i <= 9; i++) begin : g_round
    round1_9 u_round (
      .clk(clk), .rst_n(rst_n), .load(vld_s[i-1]), .datain(data_s[i-1]), .keyin(key_s[i-1]),
      .rcon(RCON_F2[i]), .dataout(data_s[i]), .keyout(key_s[i]), .done(vld_s[i])
    );
  end

  round10 #(.RCON(RCON_F2[10])) u_round10 (
    .clk(clk), .rst_n(rst_n), .load(vld_s[9]), .datain(data_s[9]), .keyin(key_s[9]),
    .edata(edata), .done(done)
  );

  initial assert (LATENCY == 3 + 9*4 + 4)
    else $error("sig_aes_e: LATENCY must match the pipeline depth 43");
endmodule

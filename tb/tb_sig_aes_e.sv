// tb_sig_aes_e: end-to-end test of the encryptor at its default size.
//
// Encrypts the FIPS-197 example vectors, then a long stream of random
// plaintext/key pairs: first back to back (a new pair, with a new key, in
// every cycle), then with random idle cycles between loads and runs that
// reuse one key. Every ciphertext is compared with a textbook AES-128 model;
// each done pulse must come exactly 43 cycles after its load, in order, and
// no done may appear without a load. The sustained rate is checked as one
// ciphertext per cycle over the back-to-back burst. Counts how often each
// mechanism was exercised: back-to-back loads, idle cycles (input registers
// holding), key changes between consecutive blocks, key reuse.
module tb_sig_aes_e;
  import aes_ref_pkg::*;
  localparam int LAT = 43;
  localparam int N_BURST = 120;
  localparam int N_MIXED = 200;

  typedef struct { block_t ct; longint t_load; } exp_t;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, done;
  block_t datain = '0, keyin = '0, edata;
  exp_t sb [$];
  longint cyc = 0;
  int checks = 0, failures = 0;
  int n_b2b = 0, n_idle = 0, n_keychg = 0, n_keyreuse = 0, n_done = 0;
  int burst_first = -1, burst_last = -1, burst_cnt = 0;
  bit prev_load = 1'b0, in_burst = 1'b0;
  block_t prev_key = '0;

  sig_aes_e dut (.clk(clk), .rst_n(rst_n), .load(load), .datain(datain), .keyin(keyin),
                 .edata(edata), .done(done));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output side: checked at every falling edge
  always @(negedge clk) if (rst_n) begin
    if (done) begin
      n_done++;
      if (sb.size() == 0) begin
        failures++; $display("cycle %0d: done without a load", cyc);
      end else begin
        exp_t e;
        e = sb.pop_front();
        checks++;
        if (edata !== e.ct) begin
          failures++; $display("cycle %0d: edata %h expected %h", cyc, edata, e.ct);
        end
        checks++;
        if (cyc - e.t_load != longint'(LAT)) begin
          failures++; $display("cycle %0d: latency %0d expected %0d", cyc, cyc - e.t_load, LAT);
        end
        if (in_burst) begin
          if (burst_first < 0) burst_first = int'(cyc);
          burst_last = int'(cyc);
          burst_cnt++;
        end
      end
    end
  end

  task automatic put(input bit ld, input block_t pt, input block_t key);
    @(negedge clk);
    load = ld; datain = pt; keyin = key;
    if (ld) begin
      sb.push_back('{aes128_enc(pt, key), cyc});
      if (prev_load) n_b2b++;
      if (key != prev_key) n_keychg++; else n_keyreuse++;
      prev_key = key;
    end else n_idle++;
    prev_load = ld;
  endtask

  initial begin
    block_t key;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (aes128_enc(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f)
        !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin
      failures++; $display("reference model wrong");
    end
    // FIPS-197 examples
    put(1, 128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f);
    put(1, 128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c);
    put(0, rand_block(), rand_block());
    repeat (LAT + 2) put(0, rand_block(), rand_block());
    // back-to-back burst, new key every block
    in_burst = 1'b1;
    for (int i = 0; i < N_BURST; i++) put(1, rand_block(), rand_block());
    repeat (LAT + 2) put(0, rand_block(), rand_block());
    in_burst = 1'b0;
    checks++;
    if (burst_cnt != N_BURST || burst_last - burst_first != N_BURST - 1) begin
      failures++; $display("burst: %0d blocks over %0d cycles", burst_cnt, burst_last - burst_first + 1);
    end
    // mixed traffic: idle cycles and runs with a shared key
    key = rand_block();
    for (int i = 0; i < N_MIXED; i++) begin
      if ($urandom_range(0, 3) == 0) key = rand_block();
      put($urandom_range(0, 2) != 0, rand_block(), key);
    end
    repeat (LAT + 2) put(0, rand_block(), rand_block());
    checks++;
    if (sb.size() != 0) begin failures++; $display("%0d blocks never came out", sb.size()); end
    $display("done=%0d back_to_back=%0d idle=%0d key_change=%0d key_reuse=%0d",
             n_done, n_b2b, n_idle, n_keychg, n_keyreuse);
    checks += 4;
    if (n_b2b == 0)      begin failures++; $display("back-to-back loads never happened"); end
    if (n_idle == 0)     begin failures++; $display("idle cycles never happened"); end
    if (n_keychg == 0)   begin failures++; $display("key change never happened"); end
    if (n_keyreuse == 0) begin failures++; $display("key reuse never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_round1_9: a random state, key and round index every cycle, mapped to
// the composite field. Four cycles later dataout must be the mapped result
// of SubBytes, ShiftRows, MixColumns and AddRoundKey with the next round
// key, keyout that next round key, and done the delayed load. Includes the
// FIPS-197 appendix B round-1 input (state 193de3be..., key 2b7e1516...).
module tb_round1_9;
  import aes_ref_pkg::*;
  localparam int L = 4;
  typedef struct { logic v; block_t d; block_t k; } exp_t;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, done;
  block_t datain = '0, keyin = '0, dataout, keyout;
  byte_t rcon = '0;
  exp_t hist [$];
  int checks = 0, failures = 0;

  round1_9 dut (.clk(clk), .rst_n(rst_n), .load(load), .datain(datain), .keyin(keyin), .rcon(rcon),
                .dataout(dataout), .keyout(keyout), .done(done));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < 150 + L; i++) begin
      exp_t e;
      block_t s, k, nk;
      int r;
      @(negedge clk);
      if (hist.size() == L) begin
        e = hist.pop_front();
        checks++;
        if (done !== e.v || dataout !== e.d || keyout !== e.k) begin
          failures++;
          $display("step %0d: done=%b data %h key %h expected %b %h %h", i, done, dataout, keyout, e.v, e.d, e.k);
        end
      end
      if (i == 0) begin
        s = 128'h193de3bea0f4e22b9ac68d2ae9f84808; k = 128'h2b7e151628aed2a6abf7158809cf4f3c; r = 1;
      end else begin
        s = rand_block(); k = rand_block(); r = $urandom_range(1, 9);
      end
      load = $urandom_range(0, 1) == 1;
      datain = phi_blk(s); keyin = phi_blk(k); rcon = phi_ref(rcon1(r));
      nk = next_key1(k, rcon1(r));
      e = '{load, phi_blk(mix_columns1(shift_rows1(sub_bytes1(s))) ^ nk), phi_blk(nk)};
      if (i == 0 && phi_inv_blk(e.d) !== 128'ha49c7ff2689f352b6b5bea43026a5049) begin
        failures++; $display("reference round 1 wrong");
      end
      hist.push_back(e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

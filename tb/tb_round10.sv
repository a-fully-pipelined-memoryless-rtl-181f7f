// tb_round10: a random state and round-9 key every cycle, mapped to the
// composite field. Four cycles later edata must be, in the standard field,
// SubBytes and ShiftRows of the state XOR the round-10 key (rcon {36}), and
// done the delayed load. Includes the FIPS-197 appendix B last round
// (state eb59 8b1b..., ciphertext 3925841d...).
module tb_round10;
  import aes_ref_pkg::*;
  localparam int L = 4;
  typedef struct { logic v; block_t d; } exp_t;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, done;
  block_t datain = '0, keyin = '0, edata;
  exp_t hist [$];
  int checks = 0, failures = 0;

  round10 dut (.clk(clk), .rst_n(rst_n), .load(load), .datain(datain), .keyin(keyin),
               .edata(edata), .done(done));

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
      block_t s, k;
      @(negedge clk);
      if (hist.size() == L) begin
        e = hist.pop_front();
        checks++;
        if (done !== e.v || edata !== e.d) begin
          failures++; $display("step %0d: done=%b edata %h expected %b %h", i, done, edata, e.v, e.d);
        end
      end
      if (i == 0) begin
        // FIPS-197 appendix B: start of round 10 and round key 9
        s = 128'heb40f21e592e38848ba113e71bc342d2; k = 128'hac7766f319fadc2128d12941575c006e;
      end else begin
        s = rand_block(); k = rand_block();
      end
      load = $urandom_range(0, 1) == 1;
      datain = phi_blk(s); keyin = phi_blk(k);
      e = '{load, shift_rows1(sub_bytes1(s)) ^ next_key1(k, 8'h36)};
      if (i == 0 && e.d !== 128'h3925841d02dc09fbdc118597196a0b32) begin
        failures++; $display("reference round 10 wrong: %h", e.d);
      end
      hist.push_back(e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

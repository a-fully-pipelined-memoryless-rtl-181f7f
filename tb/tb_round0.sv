// tb_round0: random plaintext/key pairs with a random load pattern. For
// every load, three cycles later done must be high, keyout must be the key
// mapped to the composite field and dataout the mapped plaintext XOR key.
// In cycles without load, done must be low and the outputs must still show
// the last loaded pair (the input registers hold).
module tb_round0;
  import aes_ref_pkg::*;
  localparam int L = 3;
  typedef struct { logic v; block_t d; block_t k; } exp_t;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, done;
  block_t datain = '0, keyin = '0, dataout, keyout;
  exp_t hist [$];
  exp_t last;
  int checks = 0, failures = 0, loads = 0, holds = 0;

  round0 dut (.clk(clk), .rst_n(rst_n), .load(load), .datain(datain), .keyin(keyin),
              .dataout(dataout), .keyout(keyout), .done(done));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    last = '{1'b0, '0, '0};
    @(negedge clk); @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < 300 + L; i++) begin
      exp_t e;
      @(negedge clk);
      if (hist.size() == L) begin
        e = hist.pop_front();
        checks++;
        if (done !== e.v) begin failures++; $display("step %0d: done=%b expected %b", i, done, e.v); end
        if (e.v || i > 20) begin
          checks++;
          if (dataout !== e.d || keyout !== e.k) begin
            failures++; $display("step %0d: data %h key %h expected %h %h", i, dataout, keyout, e.d, e.k);
          end
        end
      end
      load = (i == 0) || ($urandom_range(0, 3) != 0);
      datain = rand_block(); keyin = rand_block();
      if (load) begin
        last = '{1'b1, phi_blk(datain ^ keyin), phi_blk(keyin)};
        loads++;
        hist.push_back(last);
      end else begin
        holds++;
        hist.push_back('{1'b0, last.d, last.k});
      end
    end
    if (loads == 0 || holds == 0) failures++;
    $display("loads=%0d holds=%0d", loads, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

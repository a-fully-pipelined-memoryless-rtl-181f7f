// tb_control0: random load pattern; done must repeat load exactly 3 cycles later.
// The reset is asserted in the middle of the run and done must then stay
// low until loads issued after the reset arrive.
module tb_control0;
  localparam int L = 3;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, done;
  logic hist [$];
  int checks = 0, failures = 0;

  control0 dut (.clk(clk), .rst_n(rst_n), .load(load), .done(done));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      if (hist.size() == L) begin
        checks++;
        if (done !== hist[0]) begin failures++; $display("time %0t: done=%b expected %b", $time, done, hist[0]); end
        void'(hist.pop_front());
      end
      load = $urandom_range(0, 1) == 1;
      hist.push_back(load);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (done !== 1'b0) begin failures++; $display("done high after reset"); end
    run(200);
    // reset in flight: everything still in the chain is dropped
    @(negedge clk); load = 1'b1; rst_n = 1'b0;
    @(negedge clk); rst_n = 1'b1; load = 1'b0;
    hist.delete();
    for (int i = 0; i < L; i++) hist.push_back(1'b0);
    run(200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_reg128: q must equal the d of the previous clock cycle, for random data,
// and must not change when d changes between clock edges.
module tb_reg128;
  logic clk = 1'b0;
  logic [127:0] d = '0, q, prev;
  int checks = 0, failures = 0;

  reg128 dut (.clk(clk), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      if (i > 0) begin
        checks++;
        if (q !== prev) begin failures++; $display("cycle %0d: q=%h expected %h", i, q, prev); end
      end
      d = {$urandom, $urandom, $urandom, $urandom};
      // q must not follow d before the next rising edge
      #1;
      if (i > 0) begin
        checks++;
        if (q !== prev) begin failures++; $display("cycle %0d: q changed between edges", i); end
      end
      prev = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

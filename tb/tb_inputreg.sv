// tb_inputreg: random data and random load strobes; q must take d one cycle
// after a cycle with load high and keep its value otherwise.
module tb_inputreg;
  localparam int W = 128;
  logic clk = 1'b0, load = 1'b0;
  logic [W-1:0] d = '0, q, model;
  int checks = 0, failures = 0, holds = 0, loads = 0;
  bit model_valid = 1'b0;

  inputreg dut (.clk(clk), .load(load), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      if (model_valid) begin
        checks++;
        if (q !== model) begin
          failures++;
          $display("cycle %0d: q=%h expected %h", i, q, model);
        end
      end
      load = ($urandom_range(0, 2) != 0);
      d    = {$urandom, $urandom, $urandom, $urandom};
      @(posedge clk);
      if (load) begin model = d; model_valid = 1'b1; loads++; end
      else holds++;
    end
    if (holds == 0 || loads == 0) failures++;
    $display("loads=%0d holds=%0d", loads, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

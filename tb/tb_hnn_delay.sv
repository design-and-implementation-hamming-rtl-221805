// tb_hnn_delay: self-checking testbench for the feedback delay.
//
// Checks that reset gives q = 0, that q takes d one clock after a cycle
// with en = 1, holds with en = 0, and that an asynchronous reset in the
// middle of a clock period clears q at once. 200 random cycles are
// compared with a one-line reference model.
module tb_hnn_delay;
  logic clk = 1'b0, rst_n, en, d, q;
  logic model;
  int checks = 0, failures = 0;

  hnn_delay dut (.clk, .rst_n, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%b exp=%b at %0t", what, q, exp, $time);
    end
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b1; d = 1'b1;
    repeat (2) @(posedge clk);
    #1 check(1'b0, "reset value");
    rst_n = 1'b1;
    model = 1'b0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      en = 1'($urandom_range(0, 1));
      d  = 1'($urandom_range(0, 1));
      @(posedge clk);
      if (en) model = d;
      #1 check(model, "random step");
    end
    // asynchronous reset between edges
    @(negedge clk); en = 1'b1; d = 1'b1;
    @(posedge clk); #1 check(1'b1, "load one");
    #2 rst_n = 1'b0;
    #1 check(1'b0, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

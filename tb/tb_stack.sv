// tb_stack: pushes more values than the stack holds and pops them back,
// checking last-in first-out order and that the pushes beyond the depth
// overwrote the oldest entries (the 17th push replaces the 1st, and so on).
module tb_stack;
  timeunit 1ps;
  timeprecision 1ps;
  localparam int DEPTH = 16;
  logic clk = 1'b0, rst_n = 1'b1, push = 1'b0, pop = 1'b0;
  initial #1 rst_n = 1'b0;   // falling edge: the asynchronous resets take effect
  logic [12:0] din, tos;
  int checks = 0, failures = 0;

  stack dut (.clk, .rst_n, .push, .pop, .din, .tos);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_push(input logic [12:0] v);
    @(negedge clk); push = 1'b1; din = v;
    @(negedge clk); push = 1'b0;
  endtask

  task automatic do_pop();
    @(negedge clk); pop = 1'b1;
    @(negedge clk); pop = 1'b0;
  endtask

  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Simple LIFO.
    do_push(13'h0123); do_push(13'h1ABC);
    checks++; if (tos != 13'h1ABC) begin failures++; $display("FAIL tos %h", tos); end
    do_pop();
    checks++; if (tos != 13'h0123) begin failures++; $display("FAIL tos %h", tos); end
    do_pop();
    // Overflow: 20 pushes into 16 levels.
    for (int i = 1; i <= 20; i++) do_push(13'(i * 7));
    // The 16 most recent survive, in LIFO order: pushes 20 down to 5.
    for (int i = 20; i >= 5; i--) begin
      checks++;
      if (tos != 13'(i * 7)) begin failures++; $display("FAIL pop %0d got %h", i, tos); end
      do_pop();
    end
    // One more pop wraps to what push 20 wrote (the oldest were overwritten).
    checks++;
    if (tos != 13'(20 * 7)) begin failures++; $display("FAIL wrap got %h", tos); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_clock_divider: checks that the output starts low in reset, toggles on
// every rising input edge (half frequency, 50 % duty cycle) and that each
// output rising edge follows an input rising edge.
module tb_clock_divider;
  timeunit 1ps;
  timeprecision 1ps;
  logic clk_in = 1'b0, rst_n = 1'b1, clk_out;
  int checks = 0, failures = 0;

  clock_divider dut (.clk_in, .rst_n, .clk_out);

  always #10 clk_in = ~clk_in;

  initial begin
    #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset takes effect
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int in_rise = 0, out_rise = 0, bad_align = 0;
  time t_in;
  always @(posedge clk_in) begin in_rise++; t_in = $time; end
  always @(posedge clk_out) begin out_rise++; if ($time != t_in) bad_align++; end

  initial begin
    #35;
    checks++; if (clk_out !== 1'b0) failures++;
    rst_n = 1'b1;
    in_rise = 0; out_rise = 0;
    for (int i = 0; i < 100; i++) begin : per_period
      bit prev;
      @(negedge clk_in); prev = clk_out;
      @(negedge clk_in);
      checks++; if (clk_out == prev) failures++;   // toggled once per input period
    end
    checks++; if (2 * out_rise < in_rise - 1 || 2 * out_rise > in_rise + 1) begin failures++; $display("FAIL: %0d / %0d", out_rise, in_rise); end
    checks++; if (bad_align != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

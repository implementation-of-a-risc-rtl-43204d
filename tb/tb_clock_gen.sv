// tb_clock_gen: drives a 48 MHz clock and checks the two outputs: clk24 at
// half and clk12 at a quarter of the input rate, both with 50 % duty cycle,
// both low during reset, and every clk12 rising edge coinciding with a clk24
// rising edge (two memory clock edges per core cycle).
module tb_clock_gen;
  timeunit 1ps;
  timeprecision 1ps;
  logic clk48 = 1'b0, rst_n = 1'b1, clk24, clk12;
  int checks = 0, failures = 0;

  clock_gen dut (.clk48, .rst_n, .clk24, .clk12);

  // 48 MHz: period 20.833 ns (simulated as 20833 ps).
  always #10416 clk48 = ~clk48;

  initial begin
    #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset takes effect
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n48 = 0, n24 = 0, n12 = 0, bad_align = 0;
  time t24, h24, h12, r24, r12;
  always @(posedge clk48) n48++;
  always @(posedge clk24) begin n24++; t24 = $time; end
  always @(posedge clk12) begin n12++; if ($time != t24) bad_align++; end

  initial begin
    #50000;
    checks++; if (clk24 !== 1'b0 || clk12 !== 1'b0) failures++;
    rst_n = 1'b1;
    repeat (8) @(posedge clk48);
    n48 = 0; n24 = 0; n12 = 0;
    repeat (4000) @(posedge clk48);
    #1;
    checks++; if (n24 != 2000) begin failures++; $display("FAIL: clk24 %0d", n24); end
    checks++; if (n12 != 1000) begin failures++; $display("FAIL: clk12 %0d", n12); end
    checks++; if (bad_align != 0) begin failures++; $display("FAIL: %0d misaligned clk12 edges", bad_align); end
    // Duty cycle: high time equals half the period.
    @(posedge clk24) r24 = $time; @(negedge clk24) h24 = $time - r24;
    @(posedge clk24) r24 = $time - r24;
    checks++; if (2 * h24 != r24) begin failures++; $display("FAIL: clk24 high %0t period %0t", h24, r24); end
    @(posedge clk12) r12 = $time; @(negedge clk12) h12 = $time - r12;
    @(posedge clk12) r12 = $time - r12;
    checks++; if (2 * h12 != r12 || r12 != 2 * r24) begin failures++; $display("FAIL: clk12 high %0t period %0t", h12, r12); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_baud_gen: checks the oversampling tick: one-clock pulses every 26 clocks
// at 24 MHz (16 x 57600 baud = 921.6 kHz; 24 MHz / 26 = 923.1 kHz, 0.16 %
// fast), and a parameter override giving a divisor of 10.
module tb_baud_gen;
  timeunit 1ps;
  timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b1, tick, tick10;
  initial #1 rst_n = 1'b0;   // falling edge: the asynchronous resets take effect
  int checks = 0, failures = 0;

  baud_gen dut (.clk, .rst_n, .tick);
  baud_gen #(.CLK_HZ(1_600_000), .BAUD(10_000), .OVERSAMPLE(16)) dut10 (.clk, .rst_n, .tick(tick10));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0, last = -1, last10 = -1;
  int bad = 0, bad10 = 0, n = 0, n10 = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (tick) begin
      if (last >= 0 && cyc - last != 26) bad++;
      last = cyc; n++;
    end
    if (tick10) begin
      if (last10 >= 0 && cyc - last10 != 10) bad10++;
      last10 = cyc; n10++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (26 * 200) @(posedge clk);
    #1;
    checks++; if (n < 199 || n > 201) begin failures++; $display("FAIL: %0d ticks", n); end
    checks++; if (bad != 0) begin failures++; $display("FAIL: %0d wrong intervals", bad); end
    checks++; if (n10 < 519 || n10 > 521) failures++;
    checks++; if (bad10 != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

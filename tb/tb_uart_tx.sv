// tb_uart_tx: sends random bytes through the transmitter (real baud-rate
// generator, 24 MHz) and decodes the line in the testbench by sampling the
// middle of each bit; checks start bit, data, stop bit and the bit time
// (16 ticks of 26 clocks), that busy covers the whole frame, that a request
// while busy is ignored, and that the line idles high.
module tb_uart_tx;
  timeunit 1ps;
  timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b1, tick, start = 1'b0, tx, busy;
  logic [7:0] data = '0;
  int checks = 0, failures = 0;

  baud_gen u_baud (.clk, .rst_n, .tick);
  uart_tx dut (.clk, .rst_n, .tick, .start, .data, .tx, .busy);

  always #20833 clk = ~clk;
  initial #1 rst_n = 1'b0;

  localparam int BIT_CLK = 16 * 26;

  logic [7:0] got [$];
  int bad_frame = 0;
  int start_len = 0;
  int n_bitchk = 0;
  // Line decoder, in clock cycles.
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge tx);
      // Middle of the start bit, then the middle of each data bit.
      repeat (BIT_CLK / 2) @(posedge clk);
      if (tx !== 1'b0) bad_frame++;
      for (int i = 0; i < 8; i++) begin
        repeat (BIT_CLK) @(posedge clk);
        b[i] = tx;
      end
      repeat (BIT_CLK) @(posedge clk);
      if (tx !== 1'b1) bad_frame++;   // stop bit
      got.push_back(b);
    end
  end

  // Bit-time check: the start bit of a frame whose bit 0 is 1 lasts BIT_CLK.
  time t_fall;
  always @(negedge tx) t_fall = $time;
  always @(posedge tx) if (busy && dut.bits_left == 4'd9) begin
    start_len = int'(($time - t_fall + 20833) / 41666);
    n_bitchk++;
    if (start_len < BIT_CLK - 1 || start_len > BIT_CLK + 1) bad_frame++;
  end

  task automatic send(input logic [7:0] b);
    @(negedge clk); while (busy) @(negedge clk);
    data = b; start = 1'b1;
    @(negedge clk); start = 1'b0;
  endtask

  initial begin
    #20ms;   // 20 ms
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] sent [$];
    #100000 rst_n = 1'b1;
    repeat (50) @(posedge clk);
    checks++; if (tx !== 1'b1 || busy) failures++;
    for (int n = 0; n < 20; n++) begin
      logic [7:0] b;
      b = (n == 0) ? 8'h00 : (n == 1) ? 8'hFF : 8'($urandom);
      sent.push_back(b);
      send(b);
      if (n == 5) begin
        // Request while busy: must be ignored.
        repeat (100) @(negedge clk);
        checks++; if (!busy) failures++;
        data = 8'hEE; start = 1'b1;
        @(negedge clk); start = 1'b0;
      end
    end
    @(negedge clk); while (busy) @(negedge clk);
    repeat (2 * BIT_CLK) @(posedge clk);
    checks++; if (got.size() != sent.size()) begin failures++; $display("FAIL: %0d of %0d", got.size(), sent.size()); end
    for (int i = 0; i < sent.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] != sent[i]) begin failures++; $display("FAIL: byte %0d %02h != %02h", i, got[i], sent[i]); end
    end
    checks++; if (bad_frame != 0) begin failures++; $display("FAIL: %0d bad frames", bad_frame); end
    checks++; if (tx !== 1'b1) failures++;
    checks++; if (n_bitchk < 5) begin failures++; $display("FAIL: bit time measured only %0d times", n_bitchk); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_uart_rx: drives 8N1 frames into the receiver (with the real baud-rate
// generator at 24 MHz) at the nominal 57600 baud and at 3 % fast and slow
// rates, and checks every received byte; also checks that a frame with a low
// stop bit gives frame_err and no byte, and that a short low glitch on the
// idle line is not taken as a start bit.
module tb_uart_rx;
  timeunit 1ps;
  timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b1, tick, rx = 1'b1;
  logic [7:0] data;
  logic valid, frame_err;
  int checks = 0, failures = 0;

  baud_gen u_baud (.clk, .rst_n, .tick);
  uart_rx dut (.clk, .rst_n, .tick, .rx, .data, .valid, .frame_err);

  // 24 MHz clock, times in ps.
  always #20833 clk = ~clk;
  initial #1 rst_n = 1'b0;

  localparam longint BIT_PS = 17_361_111;   // 1 / 57600 s

  logic [7:0] got [$];
  int n_ferr = 0;
  always @(posedge clk) begin
    if (valid) got.push_back(data);
    if (frame_err) n_ferr++;
  end

  task automatic send(input logic [7:0] b, input longint bit_ps, input bit stop = 1'b1);
    rx = 1'b0; #(bit_ps);
    for (int i = 0; i < 8; i++) begin rx = b[i]; #(bit_ps); end
    rx = stop; #(bit_ps);
    rx = 1'b1; #(bit_ps);
  endtask

  initial begin
    #30ms;   // 30 ms
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] sent [$];
    longint rate;
    #100000 rst_n = 1'b1;
    #1000000;
    for (int n = 0; n < 60; n++) begin
      logic [7:0] b;
      b = (n == 0) ? 8'h00 : (n == 1) ? 8'hFF : 8'($urandom);
      rate = (n < 20) ? BIT_PS : (n < 40) ? BIT_PS * 103 / 100 : BIT_PS * 97 / 100;
      sent.push_back(b);
      send(b, rate);
    end
    #(BIT_PS);
    checks++;
    if (got.size() != sent.size()) begin
      failures++; $display("FAIL: received %0d of %0d bytes", got.size(), sent.size());
    end
    for (int i = 0; i < sent.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] != sent[i]) begin failures++; $display("FAIL: byte %0d %02h != %02h", i, got[i], sent[i]); end
    end
    checks++; if (n_ferr != 0) failures++;
    // Frame error.
    got.delete();
    send(8'h5A, BIT_PS, 1'b0);
    #(3 * BIT_PS);
    checks++; if (n_ferr != 1 || got.size() != 0) begin failures++; $display("FAIL: frame error not flagged"); end
    // Glitch of a quarter bit.
    rx = 1'b0; #(BIT_PS / 4); rx = 1'b1;
    #(12 * BIT_PS);
    checks++; if (got.size() != 0 || n_ferr != 1) begin failures++; $display("FAIL: glitch accepted"); end
    // Still works afterwards.
    send(8'hC3, BIT_PS);
    checks++; if (got.size() != 1 || got[0] != 8'hC3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// uart_tx: asynchronous serial transmitter (8 data bits, no parity, 1 stop
// bit).
//
// A start request with the byte loads a 10-bit frame, start bit (0), the eight
// data bits least significant first, stop bit (1), into a shift register. The
// frame is shifted out one bit per OVERSAMPLE baud ticks; busy is high from
// the request until the stop bit has been sent. Requests while busy are
// ignored. The line idles high. Reset is asynchronous and active low.
//
// Follows the document: start bit, data shifted out serially, stop bit, timed
// by the baud-rate generator.
module uart_tx #(
  parameter int unsigned OVERSAMPLE = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,
  input  logic       start,
  input  logic [7:0] data,
  output logic       tx,
  output logic       busy
);

  localparam int unsigned TW = $clog2(OVERSAMPLE);

  logic [9:0]    frame;
  logic [3:0]    bits_left;
  logic [TW-1:0] tcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame     <= '1;
      bits_left <= '0;
      tcnt      <= '0;
      busy      <= 1'b0;
    end else if (!busy) begin
      if (start) begin
        frame     <= {1'b1, data, 1'b0};
        bits_left <= 4'd10;
        tcnt      <= '0;
        busy      <= 1'b1;
      end
    end else if (tick) begin
      tcnt <= tcnt + 1'b1;
      if (tcnt == TW'(OVERSAMPLE - 1)) begin
        frame     <= {1'b1, frame[9:1]};
        bits_left <= bits_left - 1'b1;
        if (bits_left == 4'd1) busy <= 1'b0;
      end
    end
  end

  assign tx = busy ? frame[0] : 1'b1;

endmodule

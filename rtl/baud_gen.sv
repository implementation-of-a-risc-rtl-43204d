// baud_gen: baud-rate tick generator for the serial program loader.
//
// Divides the system clock down to OVERSAMPLE times the baud rate and emits a
// one-clock-wide enable pulse (tick) at that rate; the receiver and the
// transmitter count these ticks to time their bits. With the defaults, 24 MHz
// and 16 x 57600 baud, the divisor is round(24e6 / 921600) = 26, giving ticks
// at 923 kHz (0.16 % fast, well inside the tolerance of an asynchronous serial
// link). Reset is asynchronous and active low.
//
// Follows the document: 24 MHz input, 57600 baud, 16x oversampling. Own
// choice: an enable pulse instead of a separate derived clock.
module baud_gen #(
  parameter int unsigned CLK_HZ     = 24_000_000,
  parameter int unsigned BAUD       = 57_600,
  parameter int unsigned OVERSAMPLE = 16
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);

  localparam int unsigned DIV = (CLK_HZ + (BAUD * OVERSAMPLE) / 2) / (BAUD * OVERSAMPLE);
  localparam int unsigned CW  = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end

endmodule

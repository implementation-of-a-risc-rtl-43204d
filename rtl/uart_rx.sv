// uart_rx: asynchronous serial receiver (8 data bits, no parity, 1 stop bit).
//
// The rx line is synchronised by two flip-flops and examined on every baud tick
// (16 ticks per bit). A falling edge from the idle level starts a frame; the
// start bit is checked again at its middle (tick 8) to reject glitches. Each
// data bit is then sampled once at its middle, at the mid count of its 16
// ticks, and shifted into a shift register, least significant bit first. The
// byte is delivered (valid high for one clock, data stable until the next
// byte) only when the stop bit sampled at its middle is high; otherwise the
// frame is dropped and frame_err pulses.
//
// Follows the document: 16x oversampling, mid-count sampling into a shift
// register, data valid only after a valid stop bit. The document calls the
// start bit "logic high"; at the logic side of an RS-232 line driver the start
// bit is low and the idle level high, which is what this receiver expects.
module uart_rx #(
  parameter int unsigned OVERSAMPLE = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,       // OVERSAMPLE x baud enable
  input  logic       rx,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);

  localparam int unsigned TW  = $clog2(OVERSAMPLE);
  localparam logic [TW-1:0] MID = TW'(OVERSAMPLE / 2 - 1);

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rx_state_e;

  rx_state_e     st;
  logic [1:0]    sync;
  logic          rxs;
  logic [TW-1:0] tcnt;
  logic [2:0]    bcnt;
  logic [7:0]    shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= 2'b11;
    else        sync <= {sync[0], rx};
  end
  assign rxs = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= R_IDLE;
      tcnt      <= '0;
      bcnt      <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      valid     <= 1'b0;
      frame_err <= 1'b0;
      if (tick) begin
        unique case (st)
          R_IDLE: begin
            tcnt <= '0;
            if (!rxs) st <= R_START;
          end
          R_START: begin
            tcnt <= tcnt + 1'b1;
            if (tcnt == MID) begin
              if (rxs) st <= R_IDLE;           // glitch, not a start bit
              else begin
                st   <= R_DATA;
                tcnt <= '0;
                bcnt <= '0;
              end
            end
          end
          R_DATA: begin
            tcnt <= tcnt + 1'b1;
            if (tcnt == TW'(OVERSAMPLE - 1)) begin  // middle of the next bit
              shreg <= {rxs, shreg[7:1]};
              bcnt  <= bcnt + 1'b1;
              if (bcnt == 3'd7) st <= R_STOP;
            end
          end
          R_STOP: begin
            tcnt <= tcnt + 1'b1;
            if (tcnt == TW'(OVERSAMPLE - 1)) begin
              st <= R_IDLE;
              if (rxs) begin
                data  <= shreg;
                valid <= 1'b1;
              end else begin
                frame_err <= 1'b1;
              end
            end
          end
        endcase
      end
    end
  end

endmodule

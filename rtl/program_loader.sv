// program_loader: serial program load unit.
//
// Receives a program from a PC over an RS-232 link (57600 baud, 8N1) and
// writes it byte by byte into the byte-wide port A of the program memory. It
// contains the baud-rate generator, the receiver, the transmitter and the
// program-memory interface, a small command interpreter:
//
//   55h                       link check; answered with AAh
//   57h ('W') AH AL N d1..dN  write N bytes (N = 0 means 256) from byte
//                             address {AH[2:0], AL} upward; answered with
//                             4Bh ('K') after the last byte
//   52h ('R') AH AL N         read N bytes from byte address {AH[2:0], AL};
//                             answered with the N bytes
//
// Other command bytes are ignored. Words are stored low byte first (byte
// address 2n is bits 7:0 of instruction word n). While a command is in
// progress, hold is high; the top level keeps the microcontroller in reset
// during that time, so the loader and the processor never use the program
// memory at the same time.
//
// Timing: everything runs on the 24 MHz clock; memory writes take one clock,
// a read returns its byte one clock after the request. Reset is asynchronous
// and active low.
//
// Follows the document: the four sub-blocks, 57600 baud from 24 MHz, byte-wide
// writes into the program memory, an answer path over TX used for link set-up
// and read-back. The command bytes and framing are this design's own; the
// document does not give the loader's protocol.
module program_loader #(
  parameter int unsigned CLK_HZ = 24_000_000,
  parameter int unsigned BAUD   = 57_600,
  parameter int unsigned AW     = 11           // byte address width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rx,
  output logic          tx,
  // program memory port A
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [7:0]    mem_wdata,
  input  logic [7:0]    mem_rdata,
  // status
  output logic          hold,
  output logic          frame_err
);

  localparam logic [7:0] CMD_PING  = 8'h55;
  localparam logic [7:0] CMD_WRITE = 8'h57;
  localparam logic [7:0] CMD_READ  = 8'h52;
  localparam logic [7:0] RSP_PING  = 8'hAA;
  localparam logic [7:0] RSP_ACK   = 8'h4B;

  typedef enum logic [3:0] {
    L_IDLE, L_ADDR_H, L_ADDR_L, L_COUNT, L_WDATA, L_RD_REQ, L_RD_WAIT,
    L_SEND, L_SEND_WAIT
  } ld_state_e;

  logic       tick, rx_valid, tx_start, tx_busy;
  logic [7:0] rx_data, tx_data;

  baud_gen #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .OVERSAMPLE(16)) u_baud (
    .clk, .rst_n, .tick
  );

  uart_rx #(.OVERSAMPLE(16)) u_rx (
    .clk, .rst_n, .tick, .rx, .data(rx_data), .valid(rx_valid), .frame_err
  );

  uart_tx #(.OVERSAMPLE(16)) u_tx (
    .clk, .rst_n, .tick, .start(tx_start), .data(tx_data), .tx, .busy(tx_busy)
  );

  ld_state_e     st;
  logic          is_write;     // current command is a write
  logic          last_rsp;     // byte being sent ends the command
  logic [7:0]    addr_h;
  logic [AW-1:0] addr;
  logic [8:0]    count;        // bytes left, 1..256

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= L_IDLE;
      is_write  <= 1'b0;
      last_rsp  <= 1'b0;
      addr_h    <= '0;
      addr      <= '0;
      count     <= '0;
      tx_start  <= 1'b0;
      tx_data   <= '0;
      mem_en    <= 1'b0;
      mem_we    <= 1'b0;
      mem_wdata <= '0;
    end else begin
      tx_start <= 1'b0;
      mem_en   <= 1'b0;
      mem_we   <= 1'b0;
      unique case (st)
        L_IDLE: if (rx_valid) begin
          unique case (rx_data)
            CMD_PING:  begin tx_data <= RSP_PING; last_rsp <= 1'b1; st <= L_SEND; end
            CMD_WRITE: begin is_write <= 1'b1; st <= L_ADDR_H; end
            CMD_READ:  begin is_write <= 1'b0; st <= L_ADDR_H; end
            default: ;
          endcase
        end
        L_ADDR_H: if (rx_valid) begin addr_h <= rx_data; st <= L_ADDR_L; end
        L_ADDR_L: if (rx_valid) begin
          addr <= AW'({addr_h, rx_data});
          st   <= L_COUNT;
        end
        L_COUNT: if (rx_valid) begin
          count <= (rx_data == 8'h00) ? 9'd256 : {1'b0, rx_data};
          st    <= is_write ? L_WDATA : L_RD_REQ;
        end
        L_WDATA: if (rx_valid) begin
          mem_en    <= 1'b1;
          mem_we    <= 1'b1;
          mem_wdata <= rx_data;
          // mem_addr follows addr, which advances after this write
          count     <= count - 1'b1;
          if (count == 9'd1) begin
            tx_data  <= RSP_ACK;
            last_rsp <= 1'b1;
            st       <= L_SEND;
          end
        end
        L_RD_REQ: begin
          mem_en <= 1'b1;
          st     <= L_RD_WAIT;
        end
        L_RD_WAIT: st <= L_SEND_WAIT;   // data registered by the memory
        L_SEND_WAIT: begin
          tx_data  <= mem_rdata;
          last_rsp <= (count == 9'd1);
          count    <= count - 1'b1;
          addr     <= addr + 1'b1;
          st       <= L_SEND;
        end
        L_SEND: if (!tx_busy && !tx_start) begin
          tx_start <= 1'b1;
          st       <= L_IDLE;
          if (!last_rsp) st <= L_RD_REQ;
        end
        default: st <= L_IDLE;
      endcase
      // Advance the write address one clock after each write.
      if (mem_we) addr <= addr + 1'b1;
    end
  end

  assign mem_addr = addr;
  assign hold     = (st != L_IDLE) || tx_start || tx_busy;

endmodule

// riscmcu_top: FPGA top level of the PIC16-compatible microcontroller.
//
// Five units: the clock generator (48 MHz in; 24 MHz for the loader and both
// memories, 12 MHz for the core), the serial program loader, the 16 kbit
// dual-port program memory, the 512-byte dual-port data memory and the
// microcontroller core. A PC sends a program over the serial line; the loader
// writes it into the program memory's byte port while the core is held in
// reset, and when the command is finished the core starts from address 0,
// fetching 14-bit instructions from the memory's word port (the low ten PC
// bits address its 1024 words). The data memory's second port is brought out
// as a debug port for inspecting or presetting RAM.
//
// Memory timing: both memories are synchronous and run on clk24, so each one
// sees two rising edges per core cycle; the core holds its program and data
// addresses for the whole cycle and samples the memory outputs at the end of
// the state that needs them.
//
// Ports: CLOCK (clk48) and active-low asynchronous RESET (rst_n); serial_rx
// and serial_tx of the loader; ports A (5 bits) to D (8 bits), each split into
// pin input, output value and output enable for an external tri-state pad
// (output enable = TRIS bit clear, so after reset every pin is an input);
// the PORTB<0> pin input is also the external interrupt; the data-memory
// debug port (dbg_*, clocked by clk24); loading, high while the loader holds
// the core; load_error, a pulse for each serial frame with a bad stop bit.
//
// Follows the document: the units and the clocks feeding them, the port
// widths, memory sizes and port widths, and PORTB<0> as the interrupt pin.
// Own choices: the split pins, holding the core in reset while a loader
// command runs, and a registered core reset (cleared asynchronously by RESET,
// released on a clk24 edge).
module riscmcu_top
  import pic_pkg::*;
(
  input  logic       clk48,
  input  logic       rst_n,
  input  logic       serial_rx,
  output logic       serial_tx,
  input  logic [4:0] porta_in,
  output logic [4:0] porta_out,
  output logic [4:0] porta_oe,
  input  logic [7:0] portb_in,
  output logic [7:0] portb_out,
  output logic [7:0] portb_oe,
  input  logic [7:0] portc_in,
  output logic [7:0] portc_out,
  output logic [7:0] portc_oe,
  input  logic [7:0] portd_in,
  output logic [7:0] portd_out,
  output logic [7:0] portd_oe,
  input  logic       dbg_en,
  input  logic       dbg_we,
  input  logic [8:0] dbg_addr,
  input  logic [7:0] dbg_din,
  output logic [7:0] dbg_dout,
  output logic       loading,
  output logic       load_error   // serial frame error (one clk24 pulse)
);

  logic clk24, clk12;

  clock_gen u_clk (.clk48, .rst_n, .clk24, .clk12);

  // ---------------------------------------------------------------------------
  // Program loader and program memory
  // ---------------------------------------------------------------------------
  logic        ld_en, ld_we, ld_hold;
  logic [10:0] ld_addr;
  logic [7:0]  ld_wdata, ld_rdata;
  logic [PCW-1:0] prog_addr;
  logic [15:0] prog_data;

  program_loader u_loader (
    .clk(clk24), .rst_n, .rx(serial_rx), .tx(serial_tx),
    .mem_en(ld_en), .mem_we(ld_we), .mem_addr(ld_addr), .mem_wdata(ld_wdata),
    .mem_rdata(ld_rdata), .hold(ld_hold), .frame_err(load_error)
  );

  program_memory u_pmem (
    .clk(clk24),
    .ena(ld_en), .wea(ld_we), .addra(ld_addr), .dia(ld_wdata),
    .doa(ld_rdata),
    .enb(1'b1), .web(1'b0), .addrb(prog_addr[9:0]), .dib(16'h0000),
    .dob(prog_data)
  );

  // Core reset: asserted by RESET or while the loader is busy.
  logic mcu_rst_n;
  always_ff @(posedge clk24 or negedge rst_n) begin
    if (!rst_n) mcu_rst_n <= 1'b0;
    else        mcu_rst_n <= !ld_hold;
  end
  assign loading = ld_hold;

  // ---------------------------------------------------------------------------
  // Data memory
  // ---------------------------------------------------------------------------
  logic [RAW-1:0] ram_addr;
  logic [7:0]     ram_wdata, ram_rdata;
  logic           ram_we;

  data_memory u_dmem (
    .clk(clk24),
    .ena(1'b1), .wea(ram_we), .rsta(1'b0), .addra(ram_addr),
    .dia(ram_wdata), .doa(ram_rdata),
    .enb(dbg_en), .web(dbg_we), .rstb(1'b0), .addrb(dbg_addr),
    .dib(dbg_din), .dob(dbg_dout)
  );

  // ---------------------------------------------------------------------------
  // Microcontroller core
  // ---------------------------------------------------------------------------
  riscmcu u_mcu (
    .clk(clk12), .rst_n(mcu_rst_n), .int_in(portb_in[0]),
    .prog_addr, .prog_data,
    .ram_addr, .ram_wdata, .ram_rdata, .ram_we,
    .porta_in, .porta_out, .porta_oe,
    .portb_in, .portb_out, .portb_oe,
    .portc_in, .portc_out, .portc_oe,
    .portd_in, .portd_out, .portd_oe
  );

endmodule

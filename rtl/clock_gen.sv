// clock_gen: clock generator unit.
//
// Takes the 48 MHz board clock and produces the two clocks of the design:
// clk24, half the input rate, for the program loader and the two memories, and
// clk12, a quarter of the input rate, for the microcontroller core, whose long
// combinational paths need the slower clock. Because clk12 is made from clk24
// by a flip-flop, every rising edge of clk12 coincides with (follows) a rising
// edge of clk24, so the memories see two clock edges per core cycle.
//
// On the FPGA the 24 MHz clock is the CLKDV (divide-by-2) output of a
// delay-locked loop fed through a global input buffer, with CLK0 fed back to
// remove clock-distribution skew; the 12 MHz clock comes from a toggle
// flip-flop (clock_divider). A delay-locked loop has no behaviour that RTL can
// express apart from its division, so here clk24 comes from a second toggle
// flip-flop; on an FPGA that flip-flop can be replaced by the vendor's DLL
// primitive and global buffers without changing anything else. Reset is
// asynchronous and active low and starts both outputs low.
//
// Follows the document: 48 MHz in, 24 MHz to the loader and memories, 12 MHz
// to the core through a divide-by-two circuit. Own choice: a flip-flop in
// place of the DLL's divider.
module clock_gen (
  input  logic clk48,
  input  logic rst_n,
  output logic clk24,
  output logic clk12
);

  clock_divider u_div2 (.clk_in(clk48), .rst_n, .clk_out(clk24));
  clock_divider u_div4 (.clk_in(clk24), .rst_n, .clk_out(clk12));

endmodule

// stack: hardware return-address stack.
//
// A circular buffer of DEPTH words of WIDTH bits with a hidden pointer that is
// neither readable nor writable by software. push writes din at the pointer
// and advances it; pop moves the pointer back; tos always shows the most recent
// entry. Because the pointer simply wraps, the (DEPTH+1)-th push overwrites the
// oldest entry, the next push the second oldest, and so on, as in the PIC16
// family. Both operations take effect at the rising clock edge; push and pop
// are never requested together. Reset (asynchronous, active low) clears the
// pointer only.
//
// Follows the document: 13-bit entries, a depth of 16 words (the PIC16 has 8;
// the depth is a parameter), overwrite-on-overflow.
module stack #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 13
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic             pop,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] tos
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    sp;      // next free slot

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp <= '0;
    end else if (push) begin
      sp <= (sp == PW'(DEPTH - 1)) ? '0 : sp + 1'b1;
    end else if (pop) begin
      sp <= (sp == '0) ? PW'(DEPTH - 1) : sp - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[sp] <= din;
  end

  assign tos = mem[(sp == '0) ? PW'(DEPTH - 1) : sp - 1'b1];

  // The state machine never pushes and pops in the same cycle.
  assert property (@(posedge clk) disable iff (!rst_n) !(push && pop));

endmodule

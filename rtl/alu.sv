// alu: combinational arithmetic logic unit of the microcontroller.
//
// Operand A and operand B are prepared by the state machine in state S1; the
// ALU result is valid during state S2. The operation groups are rotate left or
// right through carry, swap nibbles, one's complement (of A), AND, OR, XOR,
// add, 4-bit multiply and pass-through (result = A). Subtraction, increment and
// decrement all use the adder: the state machine supplies B = ~W with carry-in
// 1 for subtraction, B = 01 for increment and B = FF for decrement. C is the
// adder's carry out of bit 7 (a "no borrow" flag in subtraction), DC the carry
// out of bit 3, Z is set when the 8-bit result is zero. The destination
// detector turns the decoded destination into write strobes for W and for
// the register file.
//
// Follows the document: the operation groups, the use of the adder for
// SUB/INC/DEC, flags from the zero check, the destination detector. Own choice:
// subtraction adds ~W plus a carry-in of 1 instead of a precomputed two's
// complement, which gives the same result and also the correct carry when W is
// zero.
module alu
  import pic_pkg::*;
(
  input  alu_op_e    op,
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       cin,       // adder carry-in (1 for subtraction)
  input  logic       c_status,  // STATUS.C, rotated in by RLF/RRF
  input  dest_e      dest,
  output logic [7:0] y,
  output logic       c_out,
  output logic       dc_out,
  output logic       z_out,
  output logic       to_w,      // result goes to W
  output logic       to_f       // result goes to the file register
);

  logic [8:0] sum;
  logic [7:0] prod;

  mult4 u_mult (.a(a[3:0]), .b(b[3:0]), .p(prod));

  always_comb begin
    sum     = {1'b0, a} + {1'b0, b} + {8'h00, cin};
    c_out   = c_status;
    dc_out  = 1'b0;
    unique case (op)
      ALU_RLF:  begin y = {a[6:0], c_status}; c_out = a[7]; end
      ALU_RRF:  begin y = {c_status, a[7:1]}; c_out = a[0]; end
      ALU_SWAP: y = {a[3:0], a[7:4]};
      ALU_COMP: y = ~a;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      // carry into bit 4 (the digit carry) is recovered from the sum bit
      ALU_ADD:  begin y = sum[7:0]; c_out = sum[8]; dc_out = a[4] ^ b[4] ^ sum[4]; end
      ALU_MULT: y = prod;
      default:  y = a;
    endcase
    z_out = (y == 8'h00);
    to_w  = (dest == DST_W);
    to_f  = (dest == DST_F);
  end

endmodule

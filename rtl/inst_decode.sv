// inst_decode: instruction register and instruction decoder.
//
// The 14-bit instruction fetched from program memory is compared against every
// opcode pattern of the instruction set at once (one comparator per
// instruction). The word and the result of the comparison, a decoded_t record
// naming the instruction together with its ALU group, destination and affected
// flags, are captured in registers at the same clock edge, so the rest of the
// core reads a ready decoded instruction for the whole instruction cycle.
//
// Interface: load captures instr_in (at the end of state S2); load with flush
// captures a NOP instead, which turns the next cycle into an idle cycle after a
// branch, skip or interrupt. Reset (asynchronous, active low) loads NOP, so the
// first cycle after reset is idle.
//
// Follows the document: one registered flag per instruction, reset to NOP,
// MULT as 11 1011 xxxx xxxx. Own choices: the flags are held as one enum plus
// a few attribute bits rather than 35 separate bits; unlisted 00 0000 0xxx xxxx
// words decode as NOP; SWAPF uses the d bit (00 1110 dfff ffff).
module inst_decode
  import pic_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,       // capture a new instruction
  input  logic          flush,      // with load: capture NOP instead
  input  logic [IW-1:0] instr_in,
  output logic [IW-1:0] ir,
  output decoded_t      dec
);

  // Combinational decode of one instruction word.
  function automatic decoded_t decode(input logic [IW-1:0] w);
    decoded_t r;
    logic d;
    d = w[7];
    r = '{instr: I_NOP, alu_op: ALU_PASS, dest: DST_NONE, use_file: 1'b0,
          lit_op: 1'b0, aff_z: 1'b0, aff_c: 1'b0, aff_dc: 1'b0,
          is_skip: 1'b0, is_return: 1'b0};
    unique case (w[13:12])
      2'b00: begin
        r.use_file = 1'b1;
        r.dest     = d ? DST_F : DST_W;
        unique case (w[11:8])
          4'b0000: begin
            if (d) begin
              r.instr = I_MOVWF; r.dest = DST_F;
            end else begin
              r.use_file = 1'b0;
              r.dest     = DST_NONE;
              unique case (w[6:0])
                7'h08:   r.instr = I_RETURN;
                7'h09:   r.instr = I_RETFIE;
                7'h63:   r.instr = I_SLEEP;
                7'h64:   r.instr = I_CLRWDT;
                default: r.instr = I_NOP;
              endcase
              r.is_return = (r.instr == I_RETURN) || (r.instr == I_RETFIE);
            end
          end
          4'b0001: begin
            r.aff_z = 1'b1;
            if (d) begin
              r.instr = I_CLRF;  r.dest = DST_F;
            end else begin
              r.instr = I_CLRW;  r.dest = DST_W; r.use_file = 1'b0;
            end
          end
          4'b0010: begin r.instr = I_SUBWF;  r.alu_op = ALU_ADD;  r.aff_z = 1'b1; r.aff_c = 1'b1; r.aff_dc = 1'b1; end
          4'b0011: begin r.instr = I_DECF;   r.alu_op = ALU_ADD;  r.aff_z = 1'b1; end
          4'b0100: begin r.instr = I_IORWF;  r.alu_op = ALU_OR;   r.aff_z = 1'b1; end
          4'b0101: begin r.instr = I_ANDWF;  r.alu_op = ALU_AND;  r.aff_z = 1'b1; end
          4'b0110: begin r.instr = I_XORWF;  r.alu_op = ALU_XOR;  r.aff_z = 1'b1; end
          4'b0111: begin r.instr = I_ADDWF;  r.alu_op = ALU_ADD;  r.aff_z = 1'b1; r.aff_c = 1'b1; r.aff_dc = 1'b1; end
          4'b1000: begin r.instr = I_MOVF;   r.alu_op = ALU_PASS; r.aff_z = 1'b1; end
          4'b1001: begin r.instr = I_COMF;   r.alu_op = ALU_COMP; r.aff_z = 1'b1; end
          4'b1010: begin r.instr = I_INCF;   r.alu_op = ALU_ADD;  r.aff_z = 1'b1; end
          4'b1011: begin r.instr = I_DECFSZ; r.alu_op = ALU_ADD;  r.is_skip = 1'b1; end
          4'b1100: begin r.instr = I_RRF;    r.alu_op = ALU_RRF;  r.aff_c = 1'b1; end
          4'b1101: begin r.instr = I_RLF;    r.alu_op = ALU_RLF;  r.aff_c = 1'b1; end
          4'b1110: begin r.instr = I_SWAPF;  r.alu_op = ALU_SWAP; end
          4'b1111: begin r.instr = I_INCFSZ; r.alu_op = ALU_ADD;  r.is_skip = 1'b1; end
        endcase
      end
      2'b01: begin
        r.use_file = 1'b1;
        unique case (w[11:10])
          2'b00: begin r.instr = I_BCF;   r.alu_op = ALU_AND; r.dest = DST_F; end
          2'b01: begin r.instr = I_BSF;   r.alu_op = ALU_OR;  r.dest = DST_F; end
          2'b10: begin r.instr = I_BTFSC; r.alu_op = ALU_AND; r.is_skip = 1'b1; end
          2'b11: begin r.instr = I_BTFSS; r.alu_op = ALU_AND; r.is_skip = 1'b1; end
        endcase
      end
      2'b10: r.instr = w[11] ? I_GOTO : I_CALL;
      2'b11: begin
        r.lit_op = 1'b1;
        r.dest   = DST_W;
        casez (w[11:8])
          4'b00??: r.instr = I_MOVLW;
          4'b01??: begin r.instr = I_RETLW; r.is_return = 1'b1; end
          4'b1000: begin r.instr = I_IORLW; r.alu_op = ALU_OR;  r.aff_z = 1'b1; end
          4'b1001: begin r.instr = I_ANDLW; r.alu_op = ALU_AND; r.aff_z = 1'b1; end
          4'b1010: begin r.instr = I_XORLW; r.alu_op = ALU_XOR; r.aff_z = 1'b1; end
          4'b1011: begin r.instr = I_MULT;  r.alu_op = ALU_MULT; r.aff_z = 1'b1; r.lit_op = 1'b0; end
          4'b110?: begin r.instr = I_SUBLW; r.alu_op = ALU_ADD; r.aff_z = 1'b1; r.aff_c = 1'b1; r.aff_dc = 1'b1; end
          4'b111?: begin r.instr = I_ADDLW; r.alu_op = ALU_ADD; r.aff_z = 1'b1; r.aff_c = 1'b1; r.aff_dc = 1'b1; end
          default: r.instr = I_NOP;
        endcase
      end
    endcase
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir  <= '0;
      dec <= decode('0);
    end else if (load) begin
      ir  <= flush ? '0 : instr_in;
      dec <= decode(flush ? '0 : instr_in);
    end
  end

endmodule

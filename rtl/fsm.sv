// fsm: control state machine, program counter, return stack and interrupt
// entry of the microcontroller.
//
// Every instruction takes two clock cycles, S1 and S2. In S1 the core reads the
// addressed location and latches the ALU operands; a return instruction also
// pops the stack here. In S2 the ALU result is written back, the next
// instruction is fetched from program memory at the address in PC, and PC is
// loaded with the next-PC value. PC always holds the address of the
// instruction being fetched, one ahead of the instruction executing, so a
// CALL pushes PC itself as its return address.
//
// Next PC, in priority order: top of stack for RETURN/RETLW/RETFIE;
// {PCLATH<4:3>, k<10:0>} for CALL/GOTO; {PCLATH<4:0>, ALU result} when the
// instruction writes PCL; otherwise PC + 1. Whenever the PC is changed, or a
// skip condition holds (BTFSC/DECFSZ/INCFSZ with a zero ALU result, BTFSS with
// a non-zero one), the instruction just fetched is replaced by a NOP (flush),
// so that instruction costs a second, idle cycle.
//
// Interrupts are tested in S1: if irq is set the state machine goes to SINT
// instead of S2, so the instruction in the instruction register is not
// executed. SINT pushes its address (the saved "old PC"), loads PC with the
// vector 0004h, flushes the fetched word and signals int_ack, on which the core
// clears GIE. A SLEEP instruction goes from S2 to the SLEEP state, which holds
// PC and waits for wake (enabled interrupt flag set); it then resumes at S1
// with the instruction fetched during SLEEP's S2, which is either executed or,
// with GIE set, pre-empted by the interrupt.
//
// Timing: state, PC, stack and old PC change at the rising clock edge;
// asynchronous active-low reset puts PC at 0 and the machine in S1.
//
// Follows the document: the four states and their transitions (its Figure
// 4.19), the next-PC rules, pushing on CALL and interrupt, popping on returns,
// the old-PC register and vector 0004h. Own choices: a skipped or flushed
// slot is tracked so that an interrupt arriving in an idle cycle returns to the
// instruction being fetched, not to the discarded one.
module fsm
  import pic_pkg::*;
#(
  parameter int unsigned STACK_DEPTH = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  decoded_t       dec,         // decoded current instruction
  input  logic [10:0]    k11,         // IR<10:0>
  input  logic           alu_z,       // ALU result is zero
  input  logic           pcl_write,   // S2 writes the PCL register
  input  logic [7:0]     alu_y,       // ALU result
  input  logic [4:0]     pclath,
  input  logic           irq,         // GIE & PORTB0IE & PORTB0IF
  input  logic           wake,        // PORTB0IE & PORTB0IF
  output fsm_state_e     state,
  output logic [PCW-1:0] pc,
  output logic           ir_load,     // fetch: load the instruction register
  output logic           ir_flush,    // with ir_load: load a NOP instead
  output logic           int_ack,     // in SINT: clear GIE
  output logic           pushed,      // a push happened (for observation)
  output logic           popped       // a pop happened (for observation)
);

  fsm_state_e       state_n;
  logic [PCW-1:0]   pc_n;
  logic [PCW-1:0]   ret_addr;   // top of stack latched in S1
  logic [PCW-1:0]   old_pc;     // return address of a pre-empted instruction
  logic             bubble;     // instruction register holds a flushed NOP
  logic             push, pop, skip;
  logic [PCW-1:0]   push_val, tos;

  stack #(.DEPTH(STACK_DEPTH), .WIDTH(PCW)) u_stack (
    .clk, .rst_n, .push, .pop, .din(push_val), .tos
  );

  always_comb begin
    unique case (dec.instr)
      I_BTFSC, I_DECFSZ, I_INCFSZ: skip = alu_z;
      I_BTFSS:                     skip = !alu_z;
      default:                     skip = 1'b0;
    endcase
  end

  always_comb begin
    state_n  = state;
    pc_n     = pc;
    ir_load  = 1'b0;
    ir_flush = 1'b0;
    int_ack  = 1'b0;
    push     = 1'b0;
    pop      = 1'b0;
    push_val = pc;
    unique case (state)
      ST_S1: begin
        if (irq) begin
          state_n = ST_SINT;
        end else begin
          state_n = ST_S2;
          pop     = dec.is_return;
        end
      end
      ST_S2: begin
        ir_load = 1'b1;
        pc_n    = pc + 1'b1;
        if (dec.is_return) begin
          pc_n = ret_addr;  ir_flush = 1'b1;
        end else if (dec.instr == I_CALL || dec.instr == I_GOTO) begin
          pc_n = {pclath[4:3], k11};  ir_flush = 1'b1;
          push = (dec.instr == I_CALL);
        end else if (pcl_write) begin
          pc_n = {pclath, alu_y};  ir_flush = 1'b1;
        end else if (skip) begin
          ir_flush = 1'b1;
        end
        state_n = (dec.instr == I_SLEEP) ? ST_SLEEP : ST_S1;
      end
      ST_SINT: begin
        push     = 1'b1;
        push_val = old_pc;
        pc_n     = INT_VECTOR;
        ir_load  = 1'b1;
        ir_flush = 1'b1;
        int_ack  = 1'b1;
        state_n  = ST_S1;
      end
      ST_SLEEP: begin
        if (wake) state_n = ST_S1;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_S1;
      pc       <= '0;
      ret_addr <= '0;
      old_pc   <= '0;
      bubble   <= 1'b1;
    end else begin
      state <= state_n;
      pc    <= pc_n;
      if (ir_load) bubble <= ir_flush;
      if (state == ST_S1) begin
        if (pop) ret_addr <= tos;
        old_pc <= bubble ? pc : pc - 1'b1;
      end
    end
  end

  assign pushed = push;
  assign popped = pop;

  // A return address is taken from the stack only by a return instruction.
  assert property (@(posedge clk) disable iff (!rst_n)
                   pop |-> (state == ST_S1 && dec.is_return));

endmodule

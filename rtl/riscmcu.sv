// riscmcu: PIC16-compatible 8-bit RISC microcontroller unit.
//
// A Harvard-architecture core: 14-bit instructions arrive on their own bus
// from program memory, 8-bit data is read and written on a separate data-memory
// bus. Each instruction takes two clock cycles (state S1: read the addressed
// location and latch ALU operands A and B; state S2: execute, write back,
// fetch the next instruction), against four clock cycles in the PIC16 family.
// The instruction set is the 35-instruction PIC16 mid-range set plus MULT,
// which multiplies the two nibbles of W and writes the 8-bit product to W.
//
// Sub-blocks: inst_decode (instruction register and decoder), calc_ram_address
// (direct/indirect address, register-map decode, read multiplexer, bit mask),
// alu (with mult4), and fsm (state machine, PC, 16-level stack, interrupt
// entry). This module holds W, STATUS, FSR, PCLATH, INTCON, OPTION, the four
// TRIS registers and the four port output latches, prepares the operands, and
// does the write-back.
//
// Operand preparation in S1 (A / B):
//   literal instructions        A = k           B = W
//   CLRF, CLRW                  A = 0
//   MULT                        A = W<3:0>      B = W<7:4>
//   MOVWF                       A = W
//   other file instructions     A = f
//   INCF/INCFSZ  B = 01, DECF/DECFSZ  B = FF, SUBWF/SUBLW  B = ~W, carry-in 1
//   BCF  B = ~mask, BSF/BTFSC/BTFSS  B = mask, otherwise B = W
//
// I/O ports: PORTA is 5 bits, PORTB-D 8 bits. Each pin is split into pin input,
// output value and output enable (enable = TRIS bit clear); the tri-state pad
// itself sits outside. Reading a port returns the pin for input bits and the
// latch for output bits. TRIS registers reset to FF, so all pins are inputs.
//
// Interrupt: one source, a rising edge on int_in (the PORTB<0> pin in the
// top level), synchronised by two flip-flops, sets INTCON<1> (PORTB0IF).
// With INTCON<4> (PORTB0IE) set it wakes the core from SLEEP; with GIE
// (INTCON<7>) also set it interrupts: GIE is cleared, the address of the
// pre-empted instruction is pushed and execution continues at 0004h. RETFIE
// sets GIE again.
//
// Memory timing: the program address (PC) is held for a whole instruction cycle
// and the instruction must be valid by the end of S2; the data address is held
// through S1 and S2, read data must be valid by the end of S1, and ram_we is
// high during S2 with address and write data stable. An asynchronous memory,
// or a synchronous one clocked at twice the core clock (as in the top level),
// meets this.
//
// Reset: asynchronous, active low; PC = 0, instruction register = NOP, GIE = 0.
//
// Follows the document: the two-state execution, operand tables, destination
// rules, register map, stack depth, interrupt and sleep behaviour, and the MULT
// instruction. Own choices: the operand of MOVF and MOVWF (the operand table
// of the document does not list MOVF and lists MOVWF with a file operand; this
// design moves f and W respectively, as the instructions require), subtraction
// through ~W plus carry-in, STATUS and OPTION reset values, and the split pins.
module riscmcu
  import pic_pkg::*;
#(
  parameter int unsigned STACK_DEPTH = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           int_in,      // external interrupt pin
  // program memory
  output logic [PCW-1:0] prog_addr,
  input  logic [15:0]    prog_data,   // bits 13:0 used
  // data memory
  output logic [RAW-1:0] ram_addr,
  output logic [7:0]     ram_wdata,
  input  logic [7:0]     ram_rdata,
  output logic           ram_we,
  // I/O ports: pin input, output value, output enable
  input  logic [4:0]     porta_in,
  output logic [4:0]     porta_out,
  output logic [4:0]     porta_oe,
  input  logic [7:0]     portb_in,
  output logic [7:0]     portb_out,
  output logic [7:0]     portb_oe,
  input  logic [7:0]     portc_in,
  output logic [7:0]     portc_out,
  output logic [7:0]     portc_oe,
  input  logic [7:0]     portd_in,
  output logic [7:0]     portd_out,
  output logic [7:0]     portd_oe
);

  // Architectural registers.
  logic [7:0] w_reg, status, fsr, pclath, intcon, option;
  logic [4:0] trisa, lata;
  logic [7:0] trisb, trisc, trisd, latb, latc, latd;

  // Operand registers.
  logic [7:0] op_a, op_b;
  logic       op_cin;

  // Sub-block signals.
  logic [IW-1:0]  ir;
  decoded_t       dec;
  fsm_state_e     state;
  logic [PCW-1:0] pc;
  logic           ir_load, ir_flush, int_ack, pushed, popped;
  target_e        target;
  logic           indirect;
  logic [7:0]     rd_value, mask;
  logic [7:0]     alu_y;
  logic           alu_c, alu_dc, alu_z, to_w, to_f;
  logic           s2, wr_file, irq, wake;
  logic [2:0]     int_sync;
  logic           int_edge;

  // ---------------------------------------------------------------------------
  // Instruction fetch and decode
  // ---------------------------------------------------------------------------
  inst_decode u_decode (
    .clk, .rst_n, .load(ir_load), .flush(ir_flush),
    .instr_in(prog_data[IW-1:0]), .ir, .dec
  );

  assign prog_addr = pc;

  // ---------------------------------------------------------------------------
  // Data address and read multiplexer
  // ---------------------------------------------------------------------------
  logic [7:0] porta_rd, portb_rd, portc_rd, portd_rd;
  assign porta_rd = {3'b000, (trisa & porta_in) | (~trisa & lata)};
  assign portb_rd = (trisb & portb_in) | (~trisb & latb);
  assign portc_rd = (trisc & portc_in) | (~trisc & latc);
  assign portd_rd = (trisd & portd_in) | (~trisd & latd);

  calc_ram_address u_addr (
    .f(ir[6:0]), .b(ir[9:7]), .status, .fsr, .ram_rdata,
    .pcl(pc[7:0]), .porta_rd, .portb_rd, .portc_rd, .portd_rd,
    .trisa({3'b111, trisa}), .trisb, .trisc, .trisd,
    .pclath, .intcon, .option,
    .addr(ram_addr), .indirect, .target, .rd_value, .mask
  );

  // ---------------------------------------------------------------------------
  // ALU
  // ---------------------------------------------------------------------------
  alu u_alu (
    .op(dec.alu_op), .a(op_a), .b(op_b), .cin(op_cin), .c_status(status[ST_C]),
    .dest(dec.dest), .y(alu_y), .c_out(alu_c), .dc_out(alu_dc), .z_out(alu_z),
    .to_w, .to_f
  );

  // ---------------------------------------------------------------------------
  // State machine, PC, stack, interrupt entry
  // ---------------------------------------------------------------------------
  assign s2      = (state == ST_S2);
  assign wr_file = s2 && to_f;
  assign wake    = intcon[IC_INTE] && intcon[IC_INTF];
  assign irq     = wake && intcon[IC_GIE];

  fsm #(.STACK_DEPTH(STACK_DEPTH)) u_fsm (
    .clk, .rst_n, .dec, .k11(ir[10:0]), .alu_z,
    .pcl_write(wr_file && target == T_PCL), .alu_y, .pclath(pclath[4:0]),
    .irq, .wake, .state, .pc, .ir_load, .ir_flush, .int_ack, .pushed, .popped
  );

  // ---------------------------------------------------------------------------
  // Data memory write port
  // ---------------------------------------------------------------------------
  assign ram_wdata = alu_y;
  assign ram_we    = wr_file && (target == T_SRAM);

  // ---------------------------------------------------------------------------
  // S1: operand preparation
  // ---------------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_a   <= '0;
      op_b   <= '0;
      op_cin <= 1'b0;
    end else if (state == ST_S1) begin
      unique case (dec.instr)
        I_CLRF, I_CLRW: op_a <= 8'h00;
        I_MULT:         op_a <= {4'h0, w_reg[3:0]};
        I_MOVWF:        op_a <= w_reg;
        default:        op_a <= dec.lit_op   ? ir[7:0]  :
                                dec.use_file ? rd_value : w_reg;
      endcase
      unique case (dec.instr)
        I_DECF, I_DECFSZ:  op_b <= 8'hFF;
        I_INCF, I_INCFSZ:  op_b <= 8'h01;
        I_SUBWF, I_SUBLW:  op_b <= ~w_reg;
        I_BCF:             op_b <= ~mask;
        I_BSF, I_BTFSC, I_BTFSS: op_b <= mask;
        I_MULT:            op_b <= {4'h0, w_reg[7:4]};
        default:           op_b <= w_reg;
      endcase
      op_cin <= (dec.instr == I_SUBWF) || (dec.instr == I_SUBLW);
    end
  end

  // ---------------------------------------------------------------------------
  // Interrupt pin synchroniser and edge detector
  // ---------------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) int_sync <= '0;
    else        int_sync <= {int_sync[1:0], int_in};
  end
  assign int_edge = int_sync[1] && !int_sync[2];

  // ---------------------------------------------------------------------------
  // S2: write-back to W and the special registers
  // ---------------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_reg  <= '0;
      status <= '0;
      fsr    <= '0;
      pclath <= '0;
      intcon <= '0;
      option <= 8'hFF;
      trisa  <= 5'h1F;
      trisb  <= 8'hFF;
      trisc  <= 8'hFF;
      trisd  <= 8'hFF;
      lata   <= '0;
      latb   <= '0;
      latc   <= '0;
      latd   <= '0;
    end else begin
      if (s2 && to_w) w_reg <= alu_y;
      if (wr_file) begin
        unique case (target)
          T_STATUS: status <= alu_y;
          T_FSR:    fsr    <= alu_y;
          T_PCLATH: pclath <= {3'b000, alu_y[4:0]};
          T_INTCON: intcon <= alu_y;
          T_OPTION: option <= alu_y;
          T_TRISA:  trisa  <= alu_y[4:0];
          T_TRISB:  trisb  <= alu_y;
          T_TRISC:  trisc  <= alu_y;
          T_TRISD:  trisd  <= alu_y;
          T_PORTA:  lata   <= alu_y[4:0];
          T_PORTB:  latb   <= alu_y;
          T_PORTC:  latc   <= alu_y;
          T_PORTD:  latd   <= alu_y;
          default: ;
        endcase
      end
      // Flags written by the ALU take precedence over a write to STATUS.
      if (s2) begin
        if (dec.aff_z)  status[ST_Z]  <= alu_z;
        if (dec.aff_c)  status[ST_C]  <= alu_c;
        if (dec.aff_dc) status[ST_DC] <= alu_dc;
        if (dec.instr == I_RETFIE) intcon[IC_GIE] <= 1'b1;
      end
      if (int_ack) begin
        intcon[IC_GIE]  <= 1'b0;
        intcon[IC_INTF] <= 1'b1;
      end
      if (int_edge) intcon[IC_INTF] <= 1'b1;
    end
  end

  // Port pins.
  assign porta_out = lata;
  assign porta_oe  = ~trisa;
  assign portb_out = latb;
  assign portb_oe  = ~trisb;
  assign portc_out = latc;
  assign portc_oe  = ~trisc;
  assign portd_out = latd;
  assign portd_oe  = ~trisd;

  // The data memory is written only in S2.
  assert property (@(posedge clk) disable iff (!rst_n) ram_we |-> s2);

endmodule

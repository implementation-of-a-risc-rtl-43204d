// pic_pkg: types and constants shared by the PIC16-compatible microcontroller.
//
// Holds the decoded-instruction enumeration, the ALU operation codes, the
// special-function-register (SFR) addresses of the register map, STATUS and
// INTCON bit positions, and encoding functions that build 14-bit instruction
// words. The instruction encodings are those of the PIC16 mid-range family plus
// one added instruction, MULT (11 1011 xxxx xxxx), which multiplies the two
// nibbles of W. The encoding functions are used by testbenches to write
// programs and double as a readable reference for the opcode fields.
package pic_pkg;

  // Instruction word and address widths.
  localparam int unsigned IW  = 14;  // instruction width
  localparam int unsigned PCW = 13;  // program counter width
  localparam int unsigned RAW = 9;   // data address width: {bank[1:0], f[6:0]}

  // One tag per instruction. The decoder sets exactly one of them.
  typedef enum logic [5:0] {
    I_NOP, I_ADDWF, I_ANDWF, I_CLRF, I_CLRW, I_COMF, I_DECF, I_DECFSZ,
    I_INCF, I_INCFSZ, I_IORWF, I_MOVF, I_MOVWF, I_RLF, I_RRF, I_SUBWF,
    I_SWAPF, I_XORWF, I_BCF, I_BSF, I_BTFSC, I_BTFSS, I_ADDLW, I_ANDLW,
    I_CALL, I_CLRWDT, I_GOTO, I_IORLW, I_MOVLW, I_RETFIE, I_RETLW,
    I_RETURN, I_SLEEP, I_SUBLW, I_XORLW, I_MULT
  } instr_e;

  // ALU operation groups (the nine groups plus pass-through).
  typedef enum logic [3:0] {
    ALU_PASS, ALU_RLF, ALU_RRF, ALU_SWAP, ALU_COMP,
    ALU_AND, ALU_OR, ALU_XOR, ALU_ADD, ALU_MULT
  } alu_op_e;

  // Where an instruction's result goes.
  typedef enum logic [1:0] {
    DST_NONE, DST_W, DST_F
  } dest_e;

  // Control state machine states: S1 reads operands, S2 executes, writes back
  // and fetches; SINT enters an interrupt; SLEEP waits for a wake-up.
  typedef enum logic [1:0] {
    ST_S1, ST_S2, ST_SINT, ST_SLEEP
  } fsm_state_e;

  // Decoded instruction, registered together with the instruction word.
  typedef struct packed {
    instr_e  instr;
    alu_op_e alu_op;
    dest_e   dest;
    logic    use_file;   // instruction reads register file operand f
    logic    lit_op;     // operand A is the 8-bit literal
    logic    aff_z;      // Z flag affected
    logic    aff_c;      // C flag affected
    logic    aff_dc;     // DC flag affected
    logic    is_skip;    // conditional skip (BTFSC/BTFSS/DECFSZ/INCFSZ)
    logic    is_return;  // RETURN/RETLW/RETFIE
  } decoded_t;

  // Classes of data address (what a file address selects).
  typedef enum logic [4:0] {
    T_NONE, T_SRAM, T_PCL, T_STATUS, T_FSR, T_PORTA, T_PORTB, T_PORTC,
    T_PORTD, T_TRISA, T_TRISB, T_TRISC, T_TRISD, T_PCLATH, T_INTCON,
    T_OPTION
  } target_e;

  // SFR addresses (bank 0/1 view; banks 2/3 mirror them). Addresses of the
  // register area that the map does not list (01, 07-09, 87-89) are T_NONE:
  // they read as zero and ignore writes.
  localparam logic [7:0] A_INDF   = 8'h00;
  localparam logic [7:0] A_PCL    = 8'h02;
  localparam logic [7:0] A_STATUS = 8'h03;
  localparam logic [7:0] A_FSR    = 8'h04;
  localparam logic [7:0] A_PORTA  = 8'h05;
  localparam logic [7:0] A_PORTB  = 8'h06;
  localparam logic [7:0] A_PCLATH = 8'h0A;
  localparam logic [7:0] A_INTCON = 8'h0B;
  localparam logic [7:0] A_PORTC  = 8'h0C;
  localparam logic [7:0] A_PORTD  = 8'h0D;
  localparam logic [7:0] A_OPTION = 8'h81;
  localparam logic [7:0] A_TRISA  = 8'h85;
  localparam logic [7:0] A_TRISB  = 8'h86;
  localparam logic [7:0] A_TRISC  = 8'h8C;
  localparam logic [7:0] A_TRISD  = 8'h8D;

  // STATUS bits.
  localparam int unsigned ST_C   = 0;
  localparam int unsigned ST_DC  = 1;
  localparam int unsigned ST_Z   = 2;
  localparam int unsigned ST_RP0 = 5;
  localparam int unsigned ST_RP1 = 6;
  localparam int unsigned ST_IRP = 7;

  // INTCON bits.
  localparam int unsigned IC_INTF = 1;  // PORTB0IF
  localparam int unsigned IC_INTE = 4;  // PORTB0IE
  localparam int unsigned IC_GIE  = 7;

  // Interrupt vector.
  localparam logic [PCW-1:0] INT_VECTOR = 13'h0004;

  // ---------------------------------------------------------------------------
  // Instruction encoders: d = 1 stores to f, d = 0 stores to W.
  // ---------------------------------------------------------------------------
  function automatic logic [13:0] enc_byte(input logic [5:0] op, input logic d,
                                           input logic [6:0] f);
    return {op, d, f};
  endfunction

  function automatic logic [13:0] enc_bit(input logic [1:0] op, input logic [2:0] b,
                                          input logic [6:0] f);
    return {2'b01, op, b, f};
  endfunction

  function automatic logic [13:0] ADDWF (input logic [6:0] f, input logic d); return enc_byte(6'b000111, d, f); endfunction
  function automatic logic [13:0] ANDWF (input logic [6:0] f, input logic d); return enc_byte(6'b000101, d, f); endfunction
  function automatic logic [13:0] CLRF  (input logic [6:0] f);                return enc_byte(6'b000001, 1'b1, f); endfunction
  function automatic logic [13:0] CLRW  ();                                   return 14'b00_0001_0000_0000; endfunction
  function automatic logic [13:0] COMF  (input logic [6:0] f, input logic d); return enc_byte(6'b001001, d, f); endfunction
  function automatic logic [13:0] DECF  (input logic [6:0] f, input logic d); return enc_byte(6'b000011, d, f); endfunction
  function automatic logic [13:0] DECFSZ(input logic [6:0] f, input logic d); return enc_byte(6'b001011, d, f); endfunction
  function automatic logic [13:0] INCF  (input logic [6:0] f, input logic d); return enc_byte(6'b001010, d, f); endfunction
  function automatic logic [13:0] INCFSZ(input logic [6:0] f, input logic d); return enc_byte(6'b001111, d, f); endfunction
  function automatic logic [13:0] IORWF (input logic [6:0] f, input logic d); return enc_byte(6'b000100, d, f); endfunction
  function automatic logic [13:0] MOVF  (input logic [6:0] f, input logic d); return enc_byte(6'b001000, d, f); endfunction
  function automatic logic [13:0] MOVWF (input logic [6:0] f);                return enc_byte(6'b000000, 1'b1, f); endfunction
  function automatic logic [13:0] NOP   ();                                   return 14'h0000; endfunction
  function automatic logic [13:0] RLF   (input logic [6:0] f, input logic d); return enc_byte(6'b001101, d, f); endfunction
  function automatic logic [13:0] RRF   (input logic [6:0] f, input logic d); return enc_byte(6'b001100, d, f); endfunction
  function automatic logic [13:0] SUBWF (input logic [6:0] f, input logic d); return enc_byte(6'b000010, d, f); endfunction
  function automatic logic [13:0] SWAPF (input logic [6:0] f, input logic d); return enc_byte(6'b001110, d, f); endfunction
  function automatic logic [13:0] XORWF (input logic [6:0] f, input logic d); return enc_byte(6'b000110, d, f); endfunction
  function automatic logic [13:0] BCF   (input logic [6:0] f, input logic [2:0] b); return enc_bit(2'b00, b, f); endfunction
  function automatic logic [13:0] BSF   (input logic [6:0] f, input logic [2:0] b); return enc_bit(2'b01, b, f); endfunction
  function automatic logic [13:0] BTFSC (input logic [6:0] f, input logic [2:0] b); return enc_bit(2'b10, b, f); endfunction
  function automatic logic [13:0] BTFSS (input logic [6:0] f, input logic [2:0] b); return enc_bit(2'b11, b, f); endfunction
  function automatic logic [13:0] ADDLW (input logic [7:0] k);  return {6'b111110, k}; endfunction
  function automatic logic [13:0] ANDLW (input logic [7:0] k);  return {6'b111001, k}; endfunction
  function automatic logic [13:0] CALL  (input logic [10:0] k); return {3'b100, k}; endfunction
  function automatic logic [13:0] CLRWDT();                     return 14'h0064; endfunction
  function automatic logic [13:0] GOTO  (input logic [10:0] k); return {3'b101, k}; endfunction
  function automatic logic [13:0] IORLW (input logic [7:0] k);  return {6'b111000, k}; endfunction
  function automatic logic [13:0] MOVLW (input logic [7:0] k);  return {6'b110000, k}; endfunction
  function automatic logic [13:0] RETFIE();                     return 14'h0009; endfunction
  function automatic logic [13:0] RETLW (input logic [7:0] k);  return {6'b110100, k}; endfunction
  function automatic logic [13:0] RETURN();                     return 14'h0008; endfunction
  function automatic logic [13:0] SLEEP ();                     return 14'h0063; endfunction
  function automatic logic [13:0] SUBLW (input logic [7:0] k);  return {6'b111100, k}; endfunction
  function automatic logic [13:0] XORLW (input logic [7:0] k);  return {6'b111010, k}; endfunction
  function automatic logic [13:0] MULT  ();                     return 14'b11_1011_0000_0000; endfunction

endpackage

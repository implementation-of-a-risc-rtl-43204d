// tb_prog_pkg: the test program shared by the core and top-level testbenches.
//
// build() assembles, with the encoders of pic_pkg, a program that goes through
// every instruction group and every control mechanism of the core: MULT, the
// adder with its C/DC/Z flags (including subtraction of W = 0), rotates
// through carry, swap, complement, the logic operations, skips (BTFSS, BTFSC,
// DECFSZ, INCFSZ), GOTO, nested CALL/RETURN/RETLW, a computed GOTO through
// PCL (table lookup), indirect addressing through FSR/INDF, bank switching with
// RP0/RP1, TRIS and port writes and reads, an interrupt taken in a polling loop
// and a SLEEP woken by the interrupt pin. Results are stored in RAM; the
// expected values, worked out by hand from the instruction definitions, are in
// EXP_ADDR/EXP_VAL. At the end the program writes D0h to PORTC; on a failed
// in-program check it writes FAh to PORTC.
package tb_prog_pkg;
  import pic_pkg::*;

  localparam int unsigned ROM_WORDS = 1024;

  logic [13:0] prog [ROM_WORDS];

  // Special-register file addresses (7-bit f field).
  localparam logic [6:0] F_INDF = 7'h00, F_PCL = 7'h02, F_STATUS = 7'h03,
                         F_FSR = 7'h04, F_PORTA = 7'h05, F_PORTB = 7'h06,
                         F_PCLATH = 7'h0A, F_INTCON = 7'h0B, F_PORTC = 7'h0C,
                         F_PORTD = 7'h0D;
  localparam logic W = 1'b0, F = 1'b1;

  // Fixed addresses of the subroutines.
  localparam logic [10:0] A_ISR = 11'h004, A_MAIN = 11'h00A, A_TABLE = 11'h0F0,
                          A_SUB1 = 11'h200, A_SUB2 = 11'h210, A_FAIL = 11'h3F0;

  // Value the testbench drives on PORTD.
  localparam logic [7:0] PORTD_PIN = 8'h5A;

  // Expected RAM contents after the program has run (9-bit address, value).
  localparam int N_EXP = 26;
  localparam logic [8:0] EXP_ADDR [N_EXP] = '{
    9'h020, 9'h021, 9'h022, 9'h023, 9'h024, 9'h025, 9'h026, 9'h027, 9'h028,
    9'h029, 9'h02A, 9'h02B, 9'h02C, 9'h02D, 9'h02E, 9'h031, 9'h032, 9'h040,
    9'h041, 9'h033, 9'h0A0, 9'h120, 9'h034, 9'h035, 9'h036, 9'h037};
  localparam logic [7:0] EXP_VAL [N_EXP] = '{
    8'h41,  8'h02,  8'h03,  8'hF5,  8'h02,  8'h37,  8'h03,  8'h02,  8'h81,
    8'h37,  8'hC7,  8'hA5,  8'hFF,  8'hFE,  8'h03,  8'h00,  8'h00,  8'h99,
    8'h66,  8'hFF,  8'h11,  8'h22,  PORTD_PIN, 8'h41, 8'h30, 8'hEE};
  // Interrupt count kept by the service routine in RAM 30h.
  localparam logic [8:0] ISR_COUNT_ADDR = 9'h030;
  localparam logic [7:0] ISR_COUNT      = 8'h02;

  int unsigned pc;

  function automatic void emit(input logic [13:0] w);
    prog[pc] = w;
    pc++;
  endfunction

  function automatic void build();
    int unsigned loop1, loop2, wait_lp;
    for (int i = 0; i < ROM_WORDS; i++) prog[i] = NOP();
    // reset vector
    pc = 0;
    emit(GOTO(A_MAIN));
    // interrupt service routine
    pc = 32'(A_ISR);
    emit(INCF(7'h30, F));
    emit(BCF(F_INTCON, 3'd1));        // clear PORTB0IF
    emit(RETFIE());
    // main
    pc = 32'(A_MAIN);
    emit(CLRF(7'h30));
    emit(MOVLW(8'h5D));
    emit(MULT());                     // W = D * 5 = 41
    emit(MOVWF(7'h20));
    emit(MOVLW(8'h0F));
    emit(ADDLW(8'hF3));               // W = 02, C = 1, DC = 1, Z = 0
    emit(MOVWF(7'h21));
    emit(MOVF(F_STATUS, W));          // W = 03
    emit(MOVWF(7'h22));
    emit(MOVLW(8'h10));
    emit(SUBLW(8'h05));               // W = F5, C = 0 (borrow), DC = 1
    emit(MOVWF(7'h23));
    emit(MOVF(F_STATUS, W));          // W = 02
    emit(MOVWF(7'h24));
    emit(MOVLW(8'h37));
    emit(MOVWF(7'h25));
    emit(CLRW());
    emit(SUBWF(7'h25, F));            // 37 - 0 = 37, C = 1, DC = 1
    emit(MOVF(F_STATUS, W));          // W = 03
    emit(MOVWF(7'h26));
    emit(MOVLW(8'h81));
    emit(MOVWF(7'h27));
    emit(BCF(F_STATUS, 3'd0));        // C = 0
    emit(RLF(7'h27, F));              // 27h = 02, C = 1
    emit(RRF(7'h27, W));              // W = 81, C = 0
    emit(MOVWF(7'h28));
    emit(MOVLW(8'h73));
    emit(MOVWF(7'h29));
    emit(SWAPF(7'h29, F));            // 29h = 37
    emit(COMF(7'h29, W));             // W = C8
    emit(MOVWF(7'h2A));
    emit(MOVLW(8'h0F));
    emit(ANDWF(7'h2A, F));            // 08
    emit(MOVLW(8'h30));
    emit(IORWF(7'h2A, F));            // 38
    emit(MOVLW(8'hFF));
    emit(XORWF(7'h2A, F));            // C7
    emit(MOVLW(8'hAA));
    emit(ANDLW(8'h0F));               // 0A
    emit(IORLW(8'h50));               // 5A
    emit(XORLW(8'hFF));               // A5
    emit(MOVWF(7'h2B));
    emit(XORLW(8'hA5));               // W = 0, Z = 1
    emit(BTFSS(F_STATUS, 3'd2));      // skip if Z
    emit(GOTO(A_FAIL));
    emit(BTFSC(F_STATUS, 3'd2));      // Z set: no skip
    emit(MOVLW(8'hFF));
    emit(MOVWF(7'h2C));
    emit(INCF(7'h2C, F));             // 00, Z = 1
    emit(DECF(7'h2C, F));             // FF
    emit(DECF(7'h2C, W));             // W = FE
    emit(MOVWF(7'h2D));
    // DECFSZ loop: three passes
    emit(MOVLW(8'h03));
    emit(MOVWF(7'h31));
    emit(CLRF(7'h2E));
    loop1 = pc;
    emit(INCF(7'h2E, F));
    emit(DECFSZ(7'h31, F));
    emit(GOTO(11'(loop1)));
    // INCFSZ loop: two passes
    emit(MOVLW(8'hFE));
    emit(MOVWF(7'h32));
    loop2 = pc;
    emit(INCFSZ(7'h32, F));
    emit(GOTO(11'(loop2)));
    // indirect addressing
    emit(MOVLW(8'h40));
    emit(MOVWF(F_FSR));
    emit(MOVLW(8'h99));
    emit(MOVWF(F_INDF));              // [40] = 99
    emit(INCF(F_FSR, F));
    emit(MOVLW(8'h66));
    emit(MOVWF(F_INDF));              // [41] = 66
    emit(MOVF(F_INDF, W));            // W = 66
    emit(DECF(F_FSR, F));
    emit(ADDWF(F_INDF, W));           // W = FF
    emit(MOVWF(7'h33));
    // bank switching and TRISC
    emit(BSF(F_STATUS, 3'd5));        // bank 1
    emit(MOVLW(8'h11));
    emit(MOVWF(7'h20));               // [A0] = 11
    emit(CLRF(F_PORTC));              // TRISC = 00 (8Ch)
    emit(BCF(F_STATUS, 3'd5));
    emit(BSF(F_STATUS, 3'd6));        // bank 2
    emit(MOVLW(8'h22));
    emit(MOVWF(7'h20));               // [120] = 22
    emit(BCF(F_STATUS, 3'd6));        // bank 0
    // ports
    emit(MOVLW(8'hC3));
    emit(MOVWF(F_PORTC));
    emit(MOVF(F_PORTD, W));           // pins
    emit(MOVWF(7'h34));
    // nested subroutines
    emit(CALL(A_SUB1));               // returns W = 41
    emit(MOVWF(7'h35));
    // table lookup by computed GOTO
    emit(CLRF(F_PCLATH));
    emit(MOVLW(8'h02));
    emit(CALL(A_TABLE));              // W = 30
    emit(MOVWF(7'h36));
    // interrupt: enable PORTB0IE and GIE, wait for the service routine
    emit(MOVLW(8'h90));
    emit(MOVWF(F_INTCON));
    wait_lp = pc;
    emit(MOVF(7'h30, W));
    emit(BTFSC(F_STATUS, 3'd2));
    emit(GOTO(11'(wait_lp)));
    // sleep, woken (and interrupted) by the next edge
    emit(SLEEP());
    emit(MOVLW(8'hEE));
    emit(MOVWF(7'h37));
    emit(MOVLW(8'hD0));
    emit(MOVWF(F_PORTC));
    emit(GOTO(11'(pc)));              // done: loop here
    // subroutines
    pc = 32'(A_SUB1);
    emit(MOVLW(8'h01));
    emit(CALL(A_SUB2));
    emit(ADDLW(8'h01));
    emit(RETURN());
    pc = 32'(A_SUB2);
    emit(RETLW(8'h40));
    pc = 32'(A_TABLE);
    emit(ADDWF(F_PCL, F));
    emit(RETLW(8'h10));
    emit(RETLW(8'h20));
    emit(RETLW(8'h30));
    emit(RETLW(8'h40));
    pc = 32'(A_FAIL);
    emit(MOVLW(8'hFA));
    emit(MOVWF(F_PORTC));
    emit(GOTO(A_FAIL + 11'd2));
  endfunction

endpackage

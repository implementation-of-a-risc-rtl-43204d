// tb_inst_decode: loads every instruction of the set, encoded with the
// field layouts of the instruction table, and checks the decoded
// instruction, its ALU group, destination and affected flags; also checks
// reset to NOP, flush and hold.
module tb_inst_decode;
  timeunit 1ps;
  timeprecision 1ps;
  import pic_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1, load = 1'b0, flush = 1'b0;
  initial #1 rst_n = 1'b0;   // falling edge: the asynchronous resets take effect
  logic [13:0] instr_in, ir;
  decoded_t dec;
  int checks = 0, failures = 0;

  inst_decode dut (.clk, .rst_n, .load, .flush, .instr_in, .ir, .dec);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic t(input logic [13:0] w, input instr_e ei, input alu_op_e eop,
                   input dest_e ed, input logic [2:0] zcd);
    @(negedge clk); instr_in = w; load = 1'b1;
    @(negedge clk); load = 1'b0;
    checks++;
    if (ir != w || dec.instr != ei || dec.alu_op != eop || dec.dest != ed ||
        {dec.aff_z, dec.aff_c, dec.aff_dc} != zcd) begin
      failures++;
      $display("FAIL %04h: got %s %s %s zcd=%b", w, dec.instr.name(), dec.alu_op.name(),
               dec.dest.name(), {dec.aff_z, dec.aff_c, dec.aff_dc});
    end
  endtask

  initial begin
    instr_in = '0;
    @(negedge clk);
    checks++; if (ir != 14'h0 || dec.instr != I_NOP) failures++;
    rst_n = 1'b1;
    t(ADDWF(7'h21, 1), I_ADDWF, ALU_ADD, DST_F, 3'b111);
    t(ADDWF(7'h21, 0), I_ADDWF, ALU_ADD, DST_W, 3'b111);
    t(ANDWF(7'h10, 1), I_ANDWF, ALU_AND, DST_F, 3'b100);
    t(CLRF(7'h30),     I_CLRF,  ALU_PASS, DST_F, 3'b100);
    t(CLRW(),          I_CLRW,  ALU_PASS, DST_W, 3'b100);
    t(COMF(7'h30, 0),  I_COMF,  ALU_COMP, DST_W, 3'b100);
    t(DECF(7'h30, 1),  I_DECF,  ALU_ADD,  DST_F, 3'b100);
    t(DECFSZ(7'h30,1), I_DECFSZ, ALU_ADD, DST_F, 3'b000);
    t(INCF(7'h30, 0),  I_INCF,  ALU_ADD,  DST_W, 3'b100);
    t(INCFSZ(7'h30,1), I_INCFSZ, ALU_ADD, DST_F, 3'b000);
    t(IORWF(7'h30, 1), I_IORWF, ALU_OR,   DST_F, 3'b100);
    t(MOVF(7'h30, 0),  I_MOVF,  ALU_PASS, DST_W, 3'b100);
    t(MOVWF(7'h30),    I_MOVWF, ALU_PASS, DST_F, 3'b000);
    t(NOP(),           I_NOP,   ALU_PASS, DST_NONE, 3'b000);
    t(RLF(7'h30, 1),   I_RLF,   ALU_RLF,  DST_F, 3'b010);
    t(RRF(7'h30, 0),   I_RRF,   ALU_RRF,  DST_W, 3'b010);
    t(SUBWF(7'h30, 1), I_SUBWF, ALU_ADD,  DST_F, 3'b111);
    t(SWAPF(7'h30, 0), I_SWAPF, ALU_SWAP, DST_W, 3'b000);
    t(XORWF(7'h30, 1), I_XORWF, ALU_XOR,  DST_F, 3'b100);
    t(BCF(7'h03, 3'd5),   I_BCF,   ALU_AND, DST_F, 3'b000);
    t(BSF(7'h03, 3'd5),   I_BSF,   ALU_OR,  DST_F, 3'b000);
    t(BTFSC(7'h03, 3'd2), I_BTFSC, ALU_AND, DST_NONE, 3'b000);
    t(BTFSS(7'h03, 3'd2), I_BTFSS, ALU_AND, DST_NONE, 3'b000);
    t(ADDLW(8'h12),    I_ADDLW, ALU_ADD,  DST_W, 3'b111);
    t(14'h3F12,        I_ADDLW, ALU_ADD,  DST_W, 3'b111);  // 11 111x
    t(ANDLW(8'h12),    I_ANDLW, ALU_AND,  DST_W, 3'b100);
    t(CALL(11'h123),   I_CALL,  ALU_PASS, DST_NONE, 3'b000);
    t(CLRWDT(),        I_CLRWDT, ALU_PASS, DST_NONE, 3'b000);
    t(GOTO(11'h7FF),   I_GOTO,  ALU_PASS, DST_NONE, 3'b000);
    t(IORLW(8'h12),    I_IORLW, ALU_OR,   DST_W, 3'b100);
    t(MOVLW(8'h12),    I_MOVLW, ALU_PASS, DST_W, 3'b000);
    t(14'h3312,        I_MOVLW, ALU_PASS, DST_W, 3'b000);  // 11 00xx
    t(RETFIE(),        I_RETFIE, ALU_PASS, DST_NONE, 3'b000);
    t(RETLW(8'h12),    I_RETLW, ALU_PASS, DST_W, 3'b000);
    t(RETURN(),        I_RETURN, ALU_PASS, DST_NONE, 3'b000);
    t(SLEEP(),         I_SLEEP, ALU_PASS, DST_NONE, 3'b000);
    t(SUBLW(8'h12),    I_SUBLW, ALU_ADD,  DST_W, 3'b111);
    t(XORLW(8'h12),    I_XORLW, ALU_XOR,  DST_W, 3'b100);
    t(MULT(),          I_MULT,  ALU_MULT, DST_W, 3'b100);
    t(14'h3BFF,        I_MULT,  ALU_MULT, DST_W, 3'b100);  // 11 1011 xxxx xxxx
    // Flush loads a NOP.
    @(negedge clk); instr_in = GOTO(11'h5); load = 1'b1; flush = 1'b1;
    @(negedge clk); load = 1'b0; flush = 1'b0;
    checks++; if (ir != 14'h0 || dec.instr != I_NOP) failures++;
    // Hold without load.
    @(negedge clk); instr_in = MULT();
    @(negedge clk);
    checks++; if (dec.instr != I_NOP) failures++;
    t(RETURN(), I_RETURN, ALU_PASS, DST_NONE, 3'b000);
    checks++; if (!dec.is_return) failures++;
    t(BTFSC(7'h03, 3'd2), I_BTFSC, ALU_AND, DST_NONE, 3'b000);
    checks++; if (!dec.is_skip || !dec.use_file) failures++;
    t(XORLW(8'h12), I_XORLW, ALU_XOR, DST_W, 3'b100);
    checks++; if (!dec.lit_op || dec.use_file) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

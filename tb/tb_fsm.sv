// tb_fsm: checks the control state machine with a small program held in a
// testbench ROM and decoded by inst_decode. The testbench plays the rest of
// the core: it forces the skip condition (alu_z) for BTFSC, asserts a PCL
// write for ADDWF, raises the interrupt request at chosen points and wakes the
// machine from SLEEP. It records the address of every instruction that
// reaches S2 and compares the list with the expected flow: GOTO, CALL and
// RETURN, a taken skip, SLEEP (PC frozen until wake), an interrupt that
// pre-empts an instruction (which is executed after RETFIE), an interrupt in
// the idle cycle after a GOTO (which must return to the GOTO target), and a
// computed jump through PCL with PCLATH. It also checks two clocks per
// executed instruction (not counting SINT and SLEEP cycles) and the push/pop counts.
module tb_fsm;
  timeunit 1ps;
  timeprecision 1ps;
  import pic_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // falling edge: the asynchronous resets take effect
  logic [13:0] rom [512];
  logic [13:0] ir;
  decoded_t    dec;
  fsm_state_e  state;
  logic [12:0] pc;
  logic        ir_load, ir_flush, int_ack, pushed, popped;
  logic        alu_z, pcl_write, irq, wake;
  int checks = 0, failures = 0;

  inst_decode u_dec (.clk, .rst_n, .load(ir_load), .flush(ir_flush),
                     .instr_in(rom[pc[8:0]]), .ir, .dec);

  fsm dut (.clk, .rst_n, .dec, .k11(ir[10:0]), .alu_z, .pcl_write,
           .alu_y(8'h40), .pclath(5'h01), .irq, .wake, .state, .pc, .ir_load,
           .ir_flush, .int_ack, .pushed, .popped);

  always #5 clk = ~clk;

  // Address and idle flag of the instruction register.
  logic [12:0] ir_addr;
  logic        ir_bub;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin ir_addr <= '0; ir_bub <= 1'b1; end
    else if (ir_load) begin ir_addr <= pc; ir_bub <= ir_flush; end

  // Interrupt requests: one pre-empting the instruction at 15h, one in the
  // idle slot after the GOTO at 16h.
  logic done1 = 1'b0, done2 = 1'b0;
  logic [12:0] last_exec;
  always_comb begin
    alu_z     = (dec.instr == I_BTFSC);
    pcl_write = (state == ST_S2) && (dec.instr == I_ADDWF);
    irq = (state == ST_S1) &&
          ((!done1 && !ir_bub && ir_addr == 13'h15) ||
           (!done2 && ir_bub && last_exec == 13'h16));
  end

  int n_push = 0, n_pop = 0;
  logic [12:0] trace [$];
  longint cyc = 0, last_cyc = -1;
  int bad_spacing = 0;
  logic sint_seen = 1'b0;   // SINT or SLEEP cycles since the last S2
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (int_ack) begin if (!done1) done1 <= 1'b1; else done2 <= 1'b1; end
    if (state == ST_SINT || state == ST_SLEEP) sint_seen = 1'b1;
    if (pushed) n_push++;
    if (popped) n_pop++;
    if (state == ST_S2 && !ir_bub) begin
      trace.push_back(ir_addr);
      last_exec = ir_addr;
      if (last_cyc >= 0 && !sint_seen && (cyc - last_cyc) % 2 != 0) begin
        bad_spacing++;
      end
      sint_seen = 1'b0;
      last_cyc = cyc;
    end
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N_EXP = 17;
  localparam logic [12:0] EXP [N_EXP] = '{
    13'h000, 13'h001, 13'h005, 13'h00A, 13'h00B, 13'h006, 13'h008, 13'h009,
    13'h014, 13'h004, 13'h015, 13'h016, 13'h004, 13'h01E, 13'h01F, 13'h140,
    13'h140};

  initial begin
    for (int i = 0; i < 512; i++) rom[i] = NOP();
    rom[13'h000] = NOP();
    rom[13'h001] = GOTO(11'h005);
    rom[13'h004] = RETFIE();
    rom[13'h005] = CALL(11'h00A);
    rom[13'h006] = BTFSC(7'h03, 3'd0);   // skip forced by the testbench
    rom[13'h007] = MOVLW(8'h00);         // skipped
    rom[13'h008] = SLEEP();
    rom[13'h009] = GOTO(11'h014);
    rom[13'h00B] = RETURN();
    rom[13'h016] = GOTO(11'h01E);
    rom[13'h01F] = ADDWF(7'h02, 1'b1);   // PCL write -> {01, 40}
    rom[13'h140] = GOTO(11'h140);
    wake = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    wait (state == ST_SLEEP);
    begin
      logic [12:0] p;
      p = pc;
      repeat (20) @(posedge clk);
      checks++;
      if (state != ST_SLEEP || pc != p) begin failures++; $display("FAIL: sleep"); end
    end
    @(negedge clk) wake = 1'b1;
    @(negedge clk) wake = 1'b0;

    wait (trace.size() >= N_EXP);
    checks++;
    for (int i = 0; i < N_EXP; i++)
      if (trace[i] != EXP[i]) begin
        failures++;
        $display("FAIL: step %0d executed %03h, expected %03h", i, trace[i], EXP[i]);
        break;
      end
    checks++; if (bad_spacing != 0) begin failures++; $display("FAIL: odd spacing"); end
    checks++; if (n_push != 3 || n_pop != 3) begin
      failures++; $display("FAIL: push %0d pop %0d", n_push, n_pop);
    end
    checks++; if (!done1 || !done2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

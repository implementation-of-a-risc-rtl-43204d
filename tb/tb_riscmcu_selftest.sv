// tb_riscmcu_selftest: the microcontroller's interactive self-test program,
// run on the core with ideal memories and checked automatically.
//
// The self-test is the board-level test the design was brought up with: a
// program that walks through the instruction set while a person watches
// PORTC on LEDs, sets PORTB switches and presses a PORTD button to go on to
// the next step. Here it is re-assembled by hand with the encoders of pic_pkg
// (build()), and the testbench plays the person:
//   1. multiplication table: for ch1, ch2 = 0..15 the program computes
//      ch1*ch2 with a shift-and-add subroutine (CLRF, RRF, RLF, ADDWF,
//      DECFSZ, BTFSS, BCF, CALL/RETURN) and writes it to PORTC, counting
//      with INCF/SUBWF; all 256 products are checked in order;
//   2. PORTC = AFh, then the program waits for a PORTD<3:0> press; an
//      interrupt on PORTB<0> arrives during the wait and the service routine
//      writes FFh to PORTC and complements PORTA;
//   3. ANDWF: PORTC = PORTC & 0Fh;
//   4. PORTC = ~PORTB (COMF), PORTB + 07h (ADDLW), 10h - PORTB (SUBLW),
//      PORTB & AAh (ANDLW), PORTB ^ FFh (XORLW), PORTB<3:0> x PORTB<7:4>
//      (MULT), each repeated until the next press, each checked for three
//      random PORTB values;
//   5. a one walking left (RLF) and right (RRF) through PORTC, one pass of
//      each checked;
//   6. SLEEP: the core must stay asleep until a second PORTB<0> edge; the
//      service routine runs (FFh, PORTA complemented back) and the program
//      ends with PORTC = F0h.
// PORTB<0> is the interrupt pin, as on the board, so the random PORTB values
// keep bit 0 low. The program keeps a step counter in RAM 28h, which the
// testbench watches to release the button.
//
// Differences from the original program: its delay loops (250 x 255 NOPs,
// meant for the human eye) are cut to DLY_OUTER x DLY_INNER so the run stays
// short; its interrupt enable value FEh would also set the flag bit, so the
// enable is 90h (GIE, PORTB0IE) and the service routine clears the flag and
// saves W and STATUS, which a PIC16 service routine must do.
module tb_riscmcu_selftest;
  timeunit 1ps;
  timeprecision 1ps;
  import pic_pkg::*;

  localparam int unsigned ROM_WORDS = 1024;
  localparam logic [7:0]  DLY_OUTER = 8'd2, DLY_INNER = 8'd4;

  // File registers used by the program.
  localparam logic [6:0] F_STATUS = 7'h03, F_PORTA = 7'h05,
                         F_PORTB = 7'h06, F_INTCON = 7'h0B, F_PORTC = 7'h0C,
                         F_PORTD = 7'h0D;
  localparam logic [6:0] R_CH1 = 7'h20, R_CH2 = 7'h21, R_X = 7'h22, R_Y = 7'h23,
                         R_PROD = 7'h24, R_CNT = 7'h25, R_DI = 7'h26,
                         R_DK = 7'h27, R_STEP = 7'h28, R_LCNT = 7'h29,
                         R_WSAVE = 7'h70, R_SSAVE = 7'h71;
  localparam logic W = 1'b0, F = 1'b1;
  localparam logic [2:0] B_C = 3'd0, B_Z = 3'd2, B_RP0 = 3'd5;

  // Subroutine addresses.
  localparam logic [10:0] A_ISR = 11'h004, A_MAIN = 11'h010, A_SMUL = 11'h100,
                          A_SDELAY = 11'h110, A_LDELAY = 11'h120,
                          A_WAITD = 11'h128;

  // Loop bodies of step 4.
  typedef enum int {B_COMF, B_ADDLW, B_SUBLW, B_ANDLW, B_XORLW, B_MULT} body_e;

  logic [13:0] rom [ROM_WORDS];
  logic [7:0]  ram [512];
  int unsigned pc_a;
  int unsigned main_end;                  // first free word after main

  function automatic void emit(input logic [13:0] w);
    rom[pc_a] = w;
    pc_a++;
  endfunction

  // while ((PORTD & 0Fh) == 0) { body } ; step++ ; long delay
  function automatic void wait_loop(input body_e body);
    int unsigned top, done_at;
    top = pc_a;
    emit(MOVF(F_PORTD, W));
    emit(ANDLW(8'h0F));
    emit(BTFSS(F_STATUS, B_Z));
    done_at = pc_a;
    emit(NOP());                          // patched: GOTO past the loop
    if (body == B_MULT) begin
      emit(NOP()); emit(NOP()); emit(NOP());
      emit(BCF(F_STATUS, B_RP0));
    end
    if (body == B_COMF) emit(COMF(F_PORTB, W));
    else                emit(MOVF(F_PORTB, W));
    case (body)
      B_ADDLW: emit(ADDLW(8'h07));
      B_SUBLW: emit(SUBLW(8'h10));
      B_ANDLW: emit(ANDLW(8'hAA));
      B_XORLW: emit(XORLW(8'hFF));
      B_MULT:  emit(MULT());
      default: ;
    endcase
    emit(MOVWF(F_PORTC));
    emit(GOTO(11'(top)));
    rom[done_at] = GOTO(11'(pc_a));
    emit(INCF(R_STEP, F));
    emit(CALL(A_LDELAY));
  endfunction

  // while ((PORTD & 0Fh) == 0) walk a one through PORTC ; step++ ; long delay
  function automatic void walk_loop(input bit left);
    int unsigned top, done_at, inner;
    top = pc_a;
    emit(MOVF(F_PORTD, W));
    emit(ANDLW(8'h0F));
    emit(BTFSS(F_STATUS, B_Z));
    done_at = pc_a;
    emit(NOP());
    emit(MOVLW(left ? 8'h01 : 8'h80));
    emit(MOVWF(R_CH1));
    emit(CLRF(R_CH2));
    inner = pc_a;
    emit(MOVF(R_CH1, W));
    emit(MOVWF(F_PORTC));
    emit(BCF(F_STATUS, B_C));
    emit(left ? RLF(R_CH1, F) : RRF(R_CH1, F));
    emit(CALL(A_LDELAY));
    emit(INCF(R_CH2, F));
    emit(BTFSS(R_CH2, 3'd3));             // eight passes
    emit(GOTO(11'(inner)));
    emit(GOTO(11'(top)));
    rom[done_at] = GOTO(11'(pc_a));
    emit(INCF(R_STEP, F));
    emit(CALL(A_LDELAY));
  endfunction

  function automatic void build();
    int unsigned l1, l2, lp;
    for (int i = 0; i < ROM_WORDS; i++) rom[i] = NOP();
    pc_a = 0;
    emit(GOTO(A_MAIN));
    // interrupt service: PORTC = FFh, PORTA = ~PORTA
    pc_a = 32'(A_ISR);
    emit(MOVWF(R_WSAVE));
    emit(SWAPF(F_STATUS, W));
    emit(MOVWF(R_SSAVE));
    emit(MOVLW(8'hFF));
    emit(MOVWF(F_PORTC));
    emit(COMF(F_PORTA, F));
    emit(BCF(F_INTCON, 3'd1));
    emit(SWAPF(R_SSAVE, W));
    emit(MOVWF(F_STATUS));
    emit(SWAPF(R_WSAVE, F));
    emit(SWAPF(R_WSAVE, W));
    emit(RETFIE());
    // main: port directions, interrupt enable
    pc_a = 32'(A_MAIN);
    emit(CLRF(R_STEP));
    emit(BSF(F_STATUS, B_RP0));
    emit(CLRF(F_PORTA));                  // TRISA = 00h
    emit(MOVLW(8'hFF));
    emit(MOVWF(F_PORTB));                 // TRISB = FFh
    emit(CLRF(F_PORTC));                  // TRISC = 00h
    emit(MOVWF(F_PORTD));                 // TRISD = FFh
    emit(BCF(F_STATUS, B_RP0));
    emit(MOVLW(8'h90));
    emit(MOVWF(F_INTCON));
    // step 1: multiplication table
    emit(CLRF(R_CH1));
    l1 = pc_a;
    emit(CLRF(R_CH2));
    l2 = pc_a;
    emit(MOVF(R_CH1, W));
    emit(MOVWF(R_X));
    emit(MOVF(R_CH2, W));
    emit(MOVWF(R_Y));
    emit(CALL(A_SMUL));
    emit(MOVWF(F_PORTC));
    emit(CALL(A_SDELAY));
    emit(CALL(A_SDELAY));
    emit(INCF(R_CH2, F));
    emit(MOVLW(8'h10));
    emit(SUBWF(R_CH2, W));                // C = (ch2 >= 16)
    emit(BTFSS(F_STATUS, B_C));
    emit(GOTO(11'(l2)));
    emit(INCF(R_CH1, F));
    emit(MOVLW(8'h10));
    emit(SUBWF(R_CH1, W));
    emit(BTFSS(F_STATUS, B_C));
    emit(GOTO(11'(l1)));
    // step 2
    emit(MOVLW(8'hAF));
    emit(MOVWF(F_PORTC));
    emit(CALL(A_WAITD));
    emit(CALL(A_LDELAY));
    // step 3
    emit(MOVLW(8'h0F));
    emit(ANDWF(F_PORTC, F));
    emit(CALL(A_WAITD));
    emit(CALL(A_LDELAY));
    // step 4
    wait_loop(B_COMF);
    wait_loop(B_ADDLW);
    wait_loop(B_SUBLW);
    wait_loop(B_ANDLW);
    wait_loop(B_XORLW);
    wait_loop(B_MULT);
    // step 5
    walk_loop(1'b1);
    walk_loop(1'b0);
    // step 6
    emit(SLEEP());
    emit(NOP());
    emit(MOVLW(8'hF0));
    emit(MOVWF(F_PORTC));
    emit(GOTO(11'(pc_a)));
    main_end = pc_a;
    // W = X * Y (8-bit result), shift and add; X and Y are destroyed
    pc_a = 32'(A_SMUL);
    emit(CLRF(R_PROD));
    emit(MOVLW(8'h08));
    emit(MOVWF(R_CNT));
    lp = pc_a;
    emit(BCF(F_STATUS, B_C));
    emit(RRF(R_Y, F));
    emit(BTFSS(F_STATUS, B_C));
    emit(GOTO(11'(pc_a + 3)));
    emit(MOVF(R_X, W));
    emit(ADDWF(R_PROD, F));
    emit(BCF(F_STATUS, B_C));
    emit(RLF(R_X, F));
    emit(DECFSZ(R_CNT, F));
    emit(GOTO(11'(lp)));
    emit(MOVF(R_PROD, W));
    emit(RETURN());
    // short delay: DLY_OUTER x DLY_INNER NOPs
    pc_a = 32'(A_SDELAY);
    emit(MOVLW(DLY_OUTER));
    emit(MOVWF(R_DI));
    lp = pc_a;
    emit(MOVLW(-DLY_INNER));
    emit(MOVWF(R_DK));
    emit(NOP());
    emit(INCFSZ(R_DK, F));
    emit(GOTO(11'(pc_a - 2)));
    emit(DECFSZ(R_DI, F));
    emit(GOTO(11'(lp)));
    emit(RETURN());
    // long delay: eight short delays
    pc_a = 32'(A_LDELAY);
    emit(MOVLW(8'h08));
    emit(MOVWF(R_LCNT));
    emit(CALL(A_SDELAY));
    emit(DECFSZ(R_LCNT, F));
    emit(GOTO(A_LDELAY + 11'd2));
    emit(RETURN());
    // wait for a PORTD<3:0> press, then count the step
    pc_a = 32'(A_WAITD);
    emit(MOVF(F_PORTD, W));
    emit(ANDLW(8'h0F));
    emit(BTFSC(F_STATUS, B_Z));
    emit(GOTO(A_WAITD));
    emit(INCF(R_STEP, F));
    emit(RETURN());
  endfunction

  // ---------------------------------------------------------------------------
  // Core and ideal memories
  // ---------------------------------------------------------------------------
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // falling edge: the asynchronous resets take effect
  logic [12:0] prog_addr;
  logic [15:0] prog_data;
  logic [8:0]  ram_addr;
  logic [7:0]  ram_wdata, ram_rdata;
  logic        ram_we;
  logic [4:0]  porta_out, porta_oe;
  logic [7:0]  portb_out, portb_oe, portc_out, portc_oe, portd_out, portd_oe;
  logic [7:0]  portb_pin = 8'h00, portd_pin = 8'h00;

  riscmcu dut (
    .clk, .rst_n, .int_in(portb_pin[0]), .prog_addr, .prog_data,
    .ram_addr, .ram_wdata, .ram_rdata, .ram_we,
    .porta_in(5'h00), .porta_out, .porta_oe,
    .portb_in(portb_pin), .portb_out, .portb_oe,
    .portc_in(8'h00), .portc_out, .portc_oe,
    .portd_in(portd_pin), .portd_out, .portd_oe
  );

  always #5 clk = ~clk;

  assign prog_data = {2'b00, rom[prog_addr[9:0]]};
  assign ram_rdata = ram[ram_addr];
  always_ff @(posedge clk) if (ram_we) ram[ram_addr] <= ram_wdata;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Every value written to PORTC, in order.
  logic [7:0] portc_log [$];
  always @(posedge clk) if (rst_n && dut.state == ST_S2 && dut.to_f && dut.target == T_PORTC) begin
    #1 portc_log.push_back(portc_out);
  end

  int n_int = 0, n_mult = 0, n_sleep = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.state == ST_SINT) n_int++;
    if (dut.state == ST_SLEEP) n_sleep++;
    if (dut.state == ST_S2 && dut.dec.instr == I_MULT) n_mult++;
  end

  // Watchdog.
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Press the PORTD button until the program counts the next step.
  task automatic press();
    logic [7:0] step;
    step = ram[9'(R_STEP)];
    portd_pin = {4'h0, 4'(1 << $urandom_range(3))};
    wait (ram[9'(R_STEP)] == step + 8'd1);
    repeat (4) @(posedge clk);
    portd_pin = 8'h00;
  endtask

  task automatic int_pulse();
    portb_pin[0] = 1'b1;
    repeat (6) @(posedge clk);
    portb_pin[0] = 1'b0;
  endtask

  // Wait until n more values have been written to PORTC.
  task automatic wait_writes(input int n);
    int target;
    target = portc_log.size() + n;
    wait (portc_log.size() >= target);
  endtask

  function automatic logic [7:0] expect_body(input body_e body, input logic [7:0] r);
    case (body)
      B_COMF:  return ~r;
      B_ADDLW: return r + 8'h07;
      B_SUBLW: return 8'h10 - r;
      B_ANDLW: return r & 8'hAA;
      B_XORLW: return r ^ 8'hFF;
      B_MULT:  return 8'(r[3:0] * r[7:4]);
      default: return 8'h00;
    endcase
  endfunction

  initial begin
    logic [4:0] porta_before;
    logic [7:0] r;
    int base;
    body_e body;
    build();
    for (int i = 0; i < 512; i++) ram[i] = 8'h00;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check(main_end <= 32'(A_SMUL), $sformatf("main program ends at %03h, below the subroutines", main_end));

    // Step 1: the multiplication table.
    wait (portc_log.size() >= 257);
    for (int i = 0; i < 256; i++)
      check(portc_log[i] == 8'((i / 16) * (i % 16)),
            $sformatf("product %0d x %0d = %02h", i / 16, i % 16, portc_log[i]));
    // Step 2: AFh, then an interrupt while the program waits for the button.
    check(portc_log[256] == 8'hAF, "PORTC = AFh after the table");
    check(porta_oe == 5'h1F && portc_oe == 8'hFF && portb_oe == 8'h00 && portd_oe == 8'h00,
          "port directions set by the program");
    repeat (20) @(posedge clk);
    porta_before = porta_out;
    int_pulse();
    wait_writes(1);
    check(portc_log[$] == 8'hFF, "service routine writes FFh to PORTC");
    repeat (30) @(posedge clk);
    check(porta_out == ~porta_before, "service routine complements PORTA");
    check(ram[9'(R_STEP)] == 8'd0, "interrupt does not end the wait");
    press();
    // Step 3: ANDWF on the PORTC latch.
    wait_writes(1);
    check(portc_log[$] == 8'h0F, $sformatf("PORTC & 0Fh = %02h", portc_log[$]));
    press();
    // Step 4: one loop per instruction, three PORTB values each.
    for (int b = int'(B_COMF); b <= int'(B_MULT); b++) begin
      body = body_e'(b);
      for (int k = 0; k < 3; k++) begin
        r = {7'($urandom), 1'b0};
        portb_pin = r;
        wait_writes(2);
        check(portc_log[$] == expect_body(body, r),
              $sformatf("%s: PORTB = %02h gives PORTC = %02h, expected %02h",
                        body.name(), r, portc_log[$], expect_body(body, r)));
      end
      portb_pin = 8'h00;
      press();
    end
    // Step 5: a one walking left, then right. Each walk starts with the
    // first PORTC write after the button press that ended the step before.
    for (int dir = 0; dir < 2; dir++) begin
      base = portc_log.size();
      wait (portc_log.size() >= base + 8);
      for (int i = 0; i < 8; i++)
        check(portc_log[base + i] == (dir == 0 ? 8'h01 << i : 8'h80 >> i),
              $sformatf("walking one %s, position %0d: %02h", dir == 0 ? "left" : "right",
                        i, portc_log[base + i]));
      press();
    end
    // Step 6: SLEEP, woken by the interrupt pin.
    wait (dut.state == ST_SLEEP);
    porta_before = porta_out;
    base = portc_log.size();
    repeat (100) @(posedge clk);
    check(dut.state == ST_SLEEP && portc_log.size() == base, "core sleeps until the interrupt");
    int_pulse();
    wait (portc_out == 8'hF0);
    repeat (4) @(posedge clk);
    check(portc_log.size() == base + 2 && portc_log[base] == 8'hFF && portc_log[base + 1] == 8'hF0,
          "after waking: service routine, then PORTC = F0h");
    check(porta_out == ~porta_before, "second interrupt complements PORTA back");
    check(n_int == 2, $sformatf("interrupt entries: %0d", n_int));
    check(n_mult >= 6, $sformatf("MULT executed %0d times in its loop", n_mult));
    check(n_sleep > 0, "sleep state entered");
    $display("program: main %0d words, up to %03h; PORTC writes: %0d, interrupts: %0d, MULT: %0d, sleep cycles: %0d",
             main_end - 32'(A_MAIN), 32'(A_WAITD) + 5,
             portc_log.size(), n_int, n_mult, n_sleep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

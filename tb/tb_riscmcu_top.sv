// tb_riscmcu_top: end-to-end testbench of the whole FPGA design, at its
// real sizes and clock rates (48 MHz board clock, 57600 baud).
//
// The testbench plays the PC and the board:
//   1. checks the link with the loader (55h -> AAh) while the core sits in
//      reset with all pins as inputs;
//   2. sends the test program of tb_prog_pkg over the serial line with 'W'
//      commands (low byte first), checks each 'K' answer, and reads one
//      block back with 'R';
//   3. lets the core run from address 0; when the program enables the
//      interrupt it pulses the PORTB<0> pin, and again while the core
//      sleeps; PORTD pins carry a fixed value for the port-read test;
//   4. when the program writes its end marker to PORTC, reads every expected
//      result from the data memory through the debug port and checks the
//      interrupt count, the port pins and output enables;
//   5. checks timing on the core clock (two 12 MHz clocks per instruction,
//      a GOTO loop pass of four instruction slots), that SLEEP stops
//      execution, and counts each mechanism (flush, skip, push, pop,
//      interrupt entry, sleep, indirect access, computed jump, MULT), failing
//      any that never happened;
//   6. loads a second, short program while the first is still running: the
//      core must be held in reset during the load (ports back to inputs) and
//      then run the new program, which drives 77h on PORTB.
module tb_riscmcu_top;
  timeunit 1ps;
  timeprecision 1ps;
  import pic_pkg::*;
  import tb_prog_pkg::*;

  logic clk48 = 1'b0, rst_n = 1'b1, serial_rx = 1'b1, serial_tx;
  logic [7:0] portb_pin = 8'h00;
  logic [4:0] porta_out, porta_oe;
  logic [7:0] portb_out, portb_oe, portc_out, portc_oe, portd_out, portd_oe;
  logic       dbg_en = 1'b0, dbg_we = 1'b0;
  logic [8:0] dbg_addr = '0;
  logic [7:0] dbg_din = '0, dbg_dout;
  logic       loading, load_error;
  int checks = 0, failures = 0;

  riscmcu_top dut (
    .clk48, .rst_n, .serial_rx, .serial_tx,
    .porta_in(5'h00), .porta_out, .porta_oe,
    .portb_in(portb_pin), .portb_out, .portb_oe,
    .portc_in(8'h00), .portc_out, .portc_oe,
    .portd_in(PORTD_PIN), .portd_out, .portd_oe,
    .dbg_en, .dbg_we, .dbg_addr, .dbg_din, .dbg_dout, .loading, .load_error
  );

  // 48 MHz board clock (period 20.833 ns, simulated in ps).
  always #10417 clk48 = ~clk48;
  initial #1 rst_n = 1'b0;

  localparam longint BIT_PS = 17_361_111;   // 57600 baud

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------------------------
  // Serial line model
  // ---------------------------------------------------------------------------
  task automatic send(input logic [7:0] b);
    serial_rx = 1'b0; #(BIT_PS);
    for (int i = 0; i < 8; i++) begin serial_rx = b[i]; #(BIT_PS); end
    serial_rx = 1'b1; #(BIT_PS);
    #(BIT_PS / 8);
  endtask

  logic [7:0] rsp [$];
  initial forever begin
    logic [7:0] b;
    @(negedge serial_tx);
    #(BIT_PS / 2);
    for (int i = 0; i < 8; i++) begin #(BIT_PS); b[i] = serial_tx; end
    #(BIT_PS);
    if (serial_tx) rsp.push_back(b);
  end

  task automatic wait_rsp(input int n);
    int t;
    t = 0;
    while (rsp.size() < n && t < 4000) begin #(BIT_PS); t++; end
  endtask

  // Sends words [first, first + n) of img, low byte first, 'W' blocks of up
  // to 128 words; checks each answer.
  task automatic load_words(ref logic [13:0] img [ROM_WORDS], input int first, input int n);
    int w, cnt;
    w = first;
    while (w < first + n) begin
      cnt = (first + n - w > 128) ? 128 : first + n - w;
      rsp.delete();
      send(8'h57); send(8'(w >> 7)); send(8'(w << 1)); send(8'(2 * cnt));
      for (int i = 0; i < cnt; i++) begin
        send(img[w + i][7:0]);
        send({2'b00, img[w + i][13:8]});
      end
      wait_rsp(1);
      check(rsp.size() == 1 && rsp[0] == 8'h4B, $sformatf("load block at word %03h acknowledged", w));
      w += cnt;
    end
  endtask

  // ---------------------------------------------------------------------------
  // Debug port read (clk24 domain)
  // ---------------------------------------------------------------------------
  task automatic dbg_read(input logic [8:0] a, output logic [7:0] d);
    @(negedge dut.clk24); dbg_en = 1'b1; dbg_we = 1'b0; dbg_addr = a;
    @(negedge dut.clk24); dbg_en = 1'b0;
    d = dbg_dout;
  endtask

  // ---------------------------------------------------------------------------
  // Observation of the core
  // ---------------------------------------------------------------------------
  longint cyc12 = 0, t20 = -1, t21 = -1;
  longint t2e [$];
  int n_flush = 0, n_skip = 0, n_push = 0, n_pop = 0, n_int = 0, n_sleep = 0,
      n_indirect = 0, n_pclw = 0, n_mult = 0;
  bit observe = 1'b0;
  always @(posedge dut.clk12) if (observe && dut.mcu_rst_n) begin
    cyc12++;
    if (dut.ram_we) begin
      if (dut.ram_addr == 9'h020 && t20 < 0) t20 = cyc12;
      if (dut.ram_addr == 9'h021 && t21 < 0) t21 = cyc12;
      if (dut.ram_addr == 9'h02E && dut.ram_wdata != 8'h00) t2e.push_back(cyc12);
    end
    if (dut.u_mcu.ir_load && dut.u_mcu.ir_flush) n_flush++;
    if (dut.u_mcu.state == ST_S2 && dut.u_mcu.dec.is_skip && dut.u_mcu.ir_flush) n_skip++;
    if (dut.u_mcu.pushed) n_push++;
    if (dut.u_mcu.popped) n_pop++;
    if (dut.u_mcu.state == ST_SINT) n_int++;
    if (dut.u_mcu.state == ST_SLEEP) n_sleep++;
    if (dut.u_mcu.state == ST_S2 && dut.u_mcu.dec.use_file && dut.u_mcu.indirect) n_indirect++;
    if (dut.u_mcu.state == ST_S2 && dut.u_mcu.to_f && dut.u_mcu.target == T_PCL) n_pclw++;
    if (dut.u_mcu.state == ST_S2 && dut.u_mcu.dec.instr == I_MULT) n_mult++;
  end

  // Watchdog.
  initial begin
    #200ms;   // a full run needs about 120 ms
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [13:0] img2 [ROM_WORDS];

  initial begin
    logic [7:0] d;
    build();
    #200000 rst_n = 1'b1;
    #(2 * BIT_PS);

    // 1. Link check.
    rsp.delete();
    send(8'h55);
    wait_rsp(1);
    check(rsp.size() == 1 && rsp[0] == 8'hAA, "link check answered");
    check(portc_oe == 8'h00 && portb_oe == 8'h00, "pins are inputs before the program runs");

    // 2. Program load: vector and main, table, subroutines, failure trap.
    observe = 1'b0;
    load_words(prog, 0, 256);
    load_words(prog, 32'h200, 32);
    load_words(prog, 32'h3F0, 16);
    // Read back words 200h-203h.
    rsp.delete();
    send(8'h52); send(8'h04); send(8'h00); send(8'h08);
    wait_rsp(8);
    begin
      bit ok;
      ok = (rsp.size() == 8);
      for (int i = 0; i < 4 && ok; i++)
        ok = (rsp[2 * i] == prog[32'h200 + i][7:0]) &&
             (rsp[2 * i + 1] == {2'b00, prog[32'h200 + i][13:8]});
      check(ok, "read-back of loaded words");
    end

    // 3. Run. The core is already running (it restarts after every command),
    // so clear the data memory results and restart it with one more ping.
    for (int i = 0; i < N_EXP; i++) begin
      @(negedge dut.clk24); dbg_en = 1'b1; dbg_we = 1'b1; dbg_addr = EXP_ADDR[i]; dbg_din = 8'h00;
    end
    @(negedge dut.clk24); dbg_addr = ISR_COUNT_ADDR;
    @(negedge dut.clk24); dbg_en = 1'b0; dbg_we = 1'b0;
    send(8'h55);
    wait (loading);
    observe = 1'b1;
    wait (!loading);
    check(portc_oe == 8'h00, "core in reset during the command");

    wait (dut.u_mcu.intcon[IC_GIE] && dut.u_mcu.intcon[IC_INTE]);
    #2us portb_pin[0] = 1'b1;
    #1us portb_pin[0] = 1'b0;

    wait (dut.u_mcu.state == ST_SLEEP);
    begin
      logic [12:0] pc_at_sleep;
      pc_at_sleep = dut.u_mcu.pc;
      #5us;
      check(dut.u_mcu.state == ST_SLEEP && dut.u_mcu.pc == pc_at_sleep,
            "core stays asleep with PC frozen");
    end
    portb_pin[0] = 1'b1;
    #1us portb_pin[0] = 1'b0;

    // 4. Results.
    wait (portc_out == 8'hD0 || portc_out == 8'hFA);
    #1us;
    check(portc_out == 8'hD0, $sformatf("end marker, PORTC = %02h", portc_out));
    check(portc_oe == 8'hFF && portd_oe == 8'h00 && portb_oe == 8'h00,
          "output enables follow TRIS");
    for (int i = 0; i < N_EXP; i++) begin
      dbg_read(EXP_ADDR[i], d);
      check(d == EXP_VAL[i], $sformatf("RAM[%03h] = %02h, expected %02h", EXP_ADDR[i], d, EXP_VAL[i]));
    end
    dbg_read(ISR_COUNT_ADDR, d);
    check(d == ISR_COUNT, $sformatf("interrupt count %0d", d));

    // 5. Timing and mechanisms.
    check(t21 - t20 == 6, $sformatf("%0d core clocks for 3 instructions", t21 - t20));
    check(t2e.size() == 3, "three loop passes");
    if (t2e.size() == 3) check(t2e[1] - t2e[0] == 8 && t2e[2] - t2e[1] == 8, "loop pass of 8 clocks");
    check(n_flush > 0, "pipeline flush happened");
    check(n_skip >= 4, $sformatf("skips: %0d", n_skip));
    check(n_push == 5, $sformatf("pushes: %0d", n_push));
    check(n_pop == 5, $sformatf("pops: %0d", n_pop));
    check(n_int == 2, $sformatf("interrupt entries: %0d", n_int));
    check(n_sleep > 0, "sleep happened");
    check(n_indirect >= 4, $sformatf("indirect accesses: %0d", n_indirect));
    check(n_pclw == 1, "computed jump through PCL");
    check(n_mult == 1, "MULT executed");
    check(load_error == 1'b0, "no serial frame errors");
    $display("mechanisms: flush=%0d skip=%0d push=%0d pop=%0d int=%0d sleep_cycles=%0d indirect=%0d pcl_write=%0d mult=%0d",
             n_flush, n_skip, n_push, n_pop, n_int, n_sleep, n_indirect, n_pclw, n_mult);

    // 6. Reload while running.
    observe = 1'b0;
    for (int i = 0; i < ROM_WORDS; i++) img2[i] = NOP();
    img2[0] = BSF(F_STATUS, 3'd5);
    img2[1] = CLRF(F_PORTB);            // TRISB = 00
    img2[2] = BCF(F_STATUS, 3'd5);
    img2[3] = MOVLW(8'h77);
    img2[4] = MOVWF(F_PORTB);
    img2[5] = GOTO(11'h005);
    fork
      load_words(img2, 0, 6);
      begin
        wait (loading);
        #1us;
        check(dut.u_mcu.pc == '0 && portc_oe == 8'h00, "core held in reset while loading");
      end
    join
    #20us;
    check(portb_out == 8'h77 && portb_oe == 8'hFF, $sformatf("second program drives PORTB = %02h", portb_out));
    check(portc_oe == 8'h00, "first program's port setting gone after reload");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

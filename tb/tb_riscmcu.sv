// tb_riscmcu: self-checking testbench of the microcontroller core.
//
// The core is connected, as in the document's own simulation set-up, to an
// asynchronous program ROM and a data RAM with combinational read and
// clocked write. The ROM holds the program of tb_prog_pkg, which runs every
// instruction group, skips, calls, a computed GOTO, indirect and banked
// addressing, ports, an interrupt and SLEEP. The testbench
//   - drives PORTD pins and pulses the interrupt pin when the program waits
//     for it (once in a polling loop, once in SLEEP),
//   - checks every RAM result against hand-computed values,
//   - checks the port outputs, output enables and the interrupt count,
//   - checks timing: two clocks per instruction, four for a taken GOTO, and
//     that SLEEP really stops execution until the interrupt pin moves,
//   - counts how often each mechanism happened (flush, skip, push, pop,
//     interrupt entry, sleep) and fails any that never did.
module tb_riscmcu;
  timeunit 1ps;
  timeprecision 1ps;
  import pic_pkg::*;
  import tb_prog_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // falling edge: the asynchronous resets take effect
  logic int_in = 1'b0;
  logic [12:0] prog_addr;
  logic [15:0] prog_data;
  logic [8:0]  ram_addr;
  logic [7:0]  ram_wdata, ram_rdata;
  logic        ram_we;
  logic [4:0]  porta_out, porta_oe;
  logic [7:0]  portb_out, portb_oe, portc_out, portc_oe, portd_out, portd_oe;

  logic [13:0] rom [ROM_WORDS];
  logic [7:0]  ram [512];

  int checks = 0, failures = 0;
  longint cycle = 0;

  riscmcu dut (
    .clk, .rst_n, .int_in, .prog_addr, .prog_data,
    .ram_addr, .ram_wdata, .ram_rdata, .ram_we,
    .porta_in(5'h00), .porta_out, .porta_oe,
    .portb_in(8'h00), .portb_out, .portb_oe,
    .portc_in(8'h00), .portc_out, .portc_oe,
    .portd_in(PORTD_PIN), .portd_out, .portd_oe
  );

  always #5 clk = ~clk;

  assign prog_data = {2'b00, rom[prog_addr[9:0]]};
  assign ram_rdata = ram[ram_addr];
  always_ff @(posedge clk) if (ram_we) ram[ram_addr] <= ram_wdata;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Cycle stamps of selected writes.
  longint t20 = -1, t21 = -1;
  longint t2e [$];
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && ram_we) begin
      if (ram_addr == 9'h020 && t20 < 0) t20 = cycle;
      if (ram_addr == 9'h021 && t21 < 0) t21 = cycle;
      if (ram_addr == 9'h02E && ram_wdata != 8'h00) t2e.push_back(cycle);
    end
  end

  // Mechanism counters, sampled from the core's internal strobes.
  int n_flush = 0, n_skip = 0, n_push = 0, n_pop = 0, n_int = 0, n_sleep = 0,
      n_indirect = 0, n_pclw = 0, n_mult = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.ir_load && dut.ir_flush) n_flush++;
    if (dut.state == ST_S2 && dut.dec.is_skip && dut.ir_flush) n_skip++;
    if (dut.u_fsm.push) n_push++;
    if (dut.u_fsm.pop) n_pop++;
    if (dut.state == ST_SINT) n_int++;
    if (dut.state == ST_SLEEP) n_sleep++;
    if (dut.state == ST_S2 && dut.dec.use_file && dut.indirect) n_indirect++;
    if (dut.state == ST_S2 && dut.to_f && dut.target == T_PCL) n_pclw++;
    if (dut.state == ST_S2 && dut.dec.instr == I_MULT) n_mult++;
  end

  // Watchdog.
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build();
    for (int i = 0; i < ROM_WORDS; i++) rom[i] = prog[i];
    for (int i = 0; i < 512; i++) ram[i] = 8'h00;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // Reset state of the ports: all inputs.
    check(porta_oe == 5'h00 && portb_oe == 8'h00 && portc_oe == 8'h00 &&
          portd_oe == 8'h00, "ports are inputs after reset");

    // First interrupt: when GIE and PORTB0IE are set.
    wait (dut.intcon[IC_GIE] && dut.intcon[IC_INTE]);
    repeat (10) @(posedge clk);
    int_in = 1'b1;
    repeat (4) @(posedge clk);
    int_in = 1'b0;

    // Second interrupt: when sleeping. Check that the core stays asleep.
    wait (dut.state == ST_SLEEP);
    begin
      logic [12:0] pc_at_sleep;
      pc_at_sleep = dut.pc;
      repeat (40) @(posedge clk);
      check(dut.state == ST_SLEEP && dut.pc == pc_at_sleep,
            "core stays in SLEEP with PC frozen until the interrupt pin moves");
    end
    int_in = 1'b1;
    repeat (4) @(posedge clk);
    int_in = 1'b0;

    // Wait for the end marker on PORTC.
    wait (portc_out == 8'hD0 || portc_out == 8'hFA);
    repeat (4) @(posedge clk);
    check(portc_out == 8'hD0, $sformatf("program end marker, PORTC = %02h", portc_out));
    check(portc_oe == 8'hFF, "PORTC driven after TRISC = 0");
    check(portd_oe == 8'h00, "PORTD still input");

    for (int i = 0; i < N_EXP; i++)
      check(ram[EXP_ADDR[i]] == EXP_VAL[i],
            $sformatf("RAM[%03h] = %02h, expected %02h", EXP_ADDR[i], ram[EXP_ADDR[i]], EXP_VAL[i]));
    check(ram[ISR_COUNT_ADDR] == ISR_COUNT,
          $sformatf("interrupt count %0d, expected %0d", ram[ISR_COUNT_ADDR], ISR_COUNT));
    check(dut.intcon[IC_GIE] == 1'b1, "GIE set again by RETFIE");

    // Timing: MOVLW, ADDLW, MOVWF between the two writes -> 3 x 2 clocks.
    check(t21 - t20 == 6, $sformatf("2 clocks per instruction: %0d clocks for 3", t21 - t20));
    // DECFSZ loop: INCF (2) + DECFSZ (2) + taken GOTO (4) = 8 clocks per pass.
    check(t2e.size() == 3, $sformatf("three loop passes, saw %0d", t2e.size()));
    if (t2e.size() == 3) begin
      check(t2e[1] - t2e[0] == 8, $sformatf("loop pass takes %0d clocks, expected 8", t2e[1] - t2e[0]));
      check(t2e[2] - t2e[1] == 8, "second loop pass takes 8 clocks");
    end

    // Every mechanism happened.
    check(n_flush > 0,    "pipeline flush happened");
    check(n_skip >= 4,    $sformatf("skips: %0d", n_skip));
    check(n_push == 5,    $sformatf("stack pushes: %0d", n_push));
    check(n_pop == 5,      $sformatf("stack pops: %0d", n_pop));
    check(n_int == 2,     $sformatf("interrupt entries: %0d", n_int));
    check(n_sleep > 0,    "sleep state entered");
    check(n_indirect >= 4, $sformatf("indirect accesses: %0d", n_indirect));
    check(n_pclw == 1,    "computed GOTO through PCL");
    check(n_mult == 1,    "MULT executed");
    $display("mechanisms: flush=%0d skip=%0d push=%0d pop=%0d int=%0d sleep_cycles=%0d indirect=%0d pcl_write=%0d mult=%0d",
             n_flush, n_skip, n_push, n_pop, n_int, n_sleep, n_indirect, n_pclw, n_mult);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

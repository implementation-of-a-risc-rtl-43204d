// tb_program_loader: drives the loader's serial input with a model of the PC
// side (8N1 at 57600 baud) and decodes its serial output. The loader is
// connected to a real program memory whose word port the testbench reads
// directly. Checks: the link check (55h -> AAh); a short write answered with
// 'K' and landing in the right words, low byte first; a full 256-byte write
// (count byte 0); read-back of both through the 'R' command; that unknown
// command bytes are ignored; that hold is high exactly while a command is in
// progress; and that a frame with a bad stop bit is reported.
module tb_program_loader;
  timeunit 1ps;
  timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b1, rx = 1'b1, tx;
  logic        mem_en, mem_we, hold, frame_err;
  logic [10:0] mem_addr;
  logic [7:0]  mem_wdata, mem_rdata;
  logic [9:0]  addrb = '0;
  logic [15:0] dob;
  int checks = 0, failures = 0;

  program_loader dut (.clk, .rst_n, .rx, .tx, .mem_en, .mem_we, .mem_addr,
                      .mem_wdata, .mem_rdata, .hold, .frame_err);

  program_memory u_mem (.clk, .ena(mem_en), .wea(mem_we), .addra(mem_addr),
                        .dia(mem_wdata), .doa(mem_rdata), .enb(1'b1),
                        .web(1'b0), .addrb, .dib(16'h0000), .dob);

  always #20833 clk = ~clk;   // 24 MHz, ps
  initial #1 rst_n = 1'b0;

  localparam longint BIT_PS = 17_361_111;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input logic [7:0] b, input bit stop = 1'b1);
    rx = 1'b0; #(BIT_PS);
    for (int i = 0; i < 8; i++) begin rx = b[i]; #(BIT_PS); end
    rx = stop; #(BIT_PS);
    rx = 1'b1; #(BIT_PS / 4);
  endtask

  // Serial output decoder.
  logic [7:0] rsp [$];
  initial forever begin
    logic [7:0] b;
    @(negedge tx);
    #(BIT_PS / 2);
    for (int i = 0; i < 8; i++) begin #(BIT_PS); b[i] = tx; end
    #(BIT_PS);
    if (tx) rsp.push_back(b);
  end

  task automatic wait_rsp(input int n);
    int t;
    t = 0;
    while (rsp.size() < n && t < 4000) begin #(BIT_PS); t++; end
  endtask

  int n_ferr = 0;
  always @(posedge clk) if (frame_err) n_ferr++;

  function automatic logic [15:0] word_at(input int i);
    return {u_mem.mem_hi[i], u_mem.mem_lo[i]};
  endfunction

  initial begin
    #200ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] blk [256];
    #100000 rst_n = 1'b1;
    #(2 * BIT_PS);
    check(!hold, "idle after reset");
    // Link check.
    send(8'h55);
    wait_rsp(1);
    check(rsp.size() == 1 && rsp[0] == 8'hAA, "ping answered with AA");
    #(2 * BIT_PS);
    check(!hold, "hold released after ping");
    rsp.delete();
    // Unknown command: no answer.
    send(8'h00); send(8'h13);
    #(12 * BIT_PS);
    check(rsp.size() == 0 && !hold, "unknown command ignored");
    // Short write of 5 bytes at byte address 123h (odd: starts at a high byte).
    send(8'h57); send(8'h01); send(8'h23); send(8'h05);
    check(hold, "hold during a write command");
    send(8'h11); send(8'h22); send(8'h33); send(8'h44); send(8'h55);
    wait_rsp(1);
    check(rsp.size() == 1 && rsp[0] == 8'h4B, "write answered with K");
    rsp.delete();
    check(word_at(9'h091) [15:8] == 8'h11, "byte 123h is the high byte of word 91h");
    check(word_at(9'h092) == 16'h3322, "word 92h = 3322");
    check(word_at(9'h093) == 16'h5544, "word 93h = 5544");
    // Word port sees the same.
    @(negedge clk) addrb = 10'h092;
    @(posedge clk); #1;
    check(dob == 16'h3322, "word port read");
    // Full 256-byte block at 400h.
    send(8'h57); send(8'h04); send(8'h00); send(8'h00);
    for (int i = 0; i < 256; i++) begin blk[i] = 8'($urandom); send(blk[i]); end
    wait_rsp(1);
    check(rsp.size() == 1 && rsp[0] == 8'h4B, "256-byte write answered with K");
    rsp.delete();
    begin
      int bad;
      bad = 0;
      for (int i = 0; i < 128; i++)
        if (word_at(10'h200 + i) != {blk[2 * i + 1], blk[2 * i]}) bad++;
      check(bad == 0, $sformatf("256-byte block in memory, %0d wrong words", bad));
    end
    #(2 * BIT_PS);
    check(!hold, "hold released after write");
    // Read back 5 bytes.
    send(8'h52); send(8'h01); send(8'h23); send(8'h05);
    wait_rsp(5);
    check(rsp.size() == 5 && rsp[0] == 8'h11 && rsp[1] == 8'h22 && rsp[2] == 8'h33 &&
          rsp[3] == 8'h44 && rsp[4] == 8'h55, "read-back of 5 bytes");
    rsp.delete();
    // Read back the block (count 0 = 256).
    send(8'h52); send(8'h04); send(8'h00); send(8'h00);
    wait_rsp(256);
    begin
      int bad;
      bad = 0;
      for (int i = 0; i < 256; i++) if (i >= rsp.size() || rsp[i] != blk[i]) bad++;
      check(rsp.size() == 256 && bad == 0, $sformatf("read-back of 256 bytes, %0d wrong", bad));
    end
    rsp.delete();
    #(2 * BIT_PS);
    check(!hold, "hold released after read");
    // Bad stop bit.
    send(8'h55, 1'b0);
    #(2 * BIT_PS);
    check(n_ferr == 1, "frame error reported");
    check(rsp.size() == 0, "bad frame not executed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

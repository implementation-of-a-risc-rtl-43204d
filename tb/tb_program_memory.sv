// tb_program_memory: writes a random program through the byte port (low byte
// at even addresses) and reads it back through both the word port and the
// byte port, checking the byte order; also checks write-through on the data
// output, that a disabled port neither writes nor changes its output, and a
// word-port write read back through the byte port.
module tb_program_memory;
  timeunit 1ps;
  timeprecision 1ps;
  localparam int WORDS = 1024;
  logic clk = 1'b0;
  logic ena = 1'b0, wea = 1'b0, enb = 1'b0, web = 1'b0;
  logic [10:0] addra = '0;
  logic [9:0]  addrb = '0;
  logic [7:0]  dia = '0, doa;
  logic [15:0] dib = '0, dob;
  logic [15:0] img [WORDS];
  int checks = 0, failures = 0;

  program_memory #(.WORDS(WORDS)) dut (
    .clk, .ena, .wea, .addra, .dia, .doa,
    .enb, .web, .addrb, .dib, .dob
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < WORDS; i++) img[i] = {2'b00, 14'($urandom)};
    // Byte-port writes.
    for (int i = 0; i < 2 * WORDS; i++) begin
      @(negedge clk);
      ena = 1'b1; wea = 1'b1; addra = 11'(i);
      dia = i[0] ? img[i / 2][15:8] : img[i / 2][7:0];
      @(posedge clk); #1;
      if (i % 97 == 0) check(doa == dia, "byte write appears on doa");
    end
    @(negedge clk) ena = 1'b0; wea = 1'b0;
    // Word-port reads.
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); enb = 1'b1; addrb = 10'(i);
      @(posedge clk); #1;
      check(dob == img[i], $sformatf("word %03h = %04h, expected %04h", i, dob, img[i]));
    end
    // Disabled word port holds its output.
    @(negedge clk); enb = 1'b0; addrb = 10'h3;
    @(posedge clk); #1;
    check(dob == img[WORDS - 1], "disabled port holds output");
    // Byte-port reads of a few words.
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); ena = 1'b1; wea = 1'b0; addra = 11'(i);
      @(posedge clk); #1;
      check(doa == (i[0] ? img[i / 2][15:8] : img[i / 2][7:0]), "byte read-back");
    end
    // Disabled byte port does not write.
    @(negedge clk); ena = 1'b0; wea = 1'b1; addra = 11'h0; dia = ~img[0][7:0];
    @(negedge clk); wea = 1'b0; enb = 1'b1; addrb = 10'h0;
    @(posedge clk); #1;
    check(dob == img[0], "disabled byte port does not write");
    // Word-port write, byte-port read.
    @(negedge clk); enb = 1'b1; web = 1'b1; addrb = 10'h155; dib = 16'h2BCD;
    @(posedge clk); #1;
    check(dob == 16'h2BCD, "word write appears on dob");
    @(negedge clk); web = 1'b0; enb = 1'b0; ena = 1'b1; addra = 11'h2AB;
    @(posedge clk); #1;
    check(doa == 8'h2B, "high byte of a word written by port B");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

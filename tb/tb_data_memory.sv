// tb_data_memory: random reads and writes on both ports of the 512 x 8 data
// RAM, both ports active in the same cycles, against a reference array;
// checks write-through, output hold with enable low, synchronous output
// reset, and that port B wins when both ports write one byte together.
module tb_data_memory;
  timeunit 1ps;
  timeprecision 1ps;
  localparam int DEPTH = 512;
  logic clk = 1'b0;
  logic ena = 1'b0, wea = 1'b0, rsta = 1'b0, enb = 1'b0, web = 1'b0, rstb = 1'b0;
  logic [8:0] addra = '0, addrb = '0;
  logic [7:0] dia = '0, dib = '0, doa, dob;
  logic [7:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  data_memory #(.DEPTH(DEPTH)) dut (.clk, .ena, .wea, .rsta, .addra, .dia, .doa,
                                    .enb, .web, .rstb, .addrb, .dib, .dob);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Port A: fills the lower half, port B the upper half, then each reads the other.
  initial begin
    fork
      for (int i = 0; i < DEPTH / 2; i++) begin
        @(negedge clk); ena = 1'b1; wea = 1'b1; addra = 9'(i); dia = 8'($urandom);
        ref_mem[i] = dia;
        @(posedge clk); #1 check(doa == dia, "port A write-through");
      end
      for (int i = DEPTH / 2; i < DEPTH; i++) begin
        @(negedge clk); enb = 1'b1; web = 1'b1; addrb = 9'(i); dib = 8'($urandom);
        ref_mem[i] = dib;
        @(posedge clk); #1 check(dob == dib, "port B write-through");
      end
    join
    @(negedge clk) wea = 1'b0;
    @(negedge clk) web = 1'b0;
    for (int n = 0; n < 300; n++) begin
      int ia, ib;
      ia = $urandom_range(DEPTH - 1); ib = $urandom_range(DEPTH - 1);
      fork
        begin @(negedge clk); addra = 9'(ia); @(posedge clk); #1
          check(doa == ref_mem[ia], $sformatf("A read %03h", ia)); end
        begin @(negedge clk); addrb = 9'(ib); @(posedge clk); #1
          check(dob == ref_mem[ib], $sformatf("B read %03h", ib)); end
      join
    end
    // Enable low: output holds, no write.
    @(negedge clk); ena = 1'b0; wea = 1'b1; addra = 9'h010; dia = ~ref_mem[16];
    @(posedge clk); #1;
    @(negedge clk); ena = 1'b1; wea = 1'b0;
    @(posedge clk); #1 check(doa == ref_mem[16], "disabled write ignored");
    // Output reset.
    @(negedge clk); rsta = 1'b1;
    @(posedge clk); #1 check(doa == 8'h00, "synchronous output reset");
    @(negedge clk); rsta = 1'b0;
    // Both ports write the same byte: port B wins.
    @(negedge clk); wea = 1'b1; web = 1'b1; addra = 9'h1F0; addrb = 9'h1F0;
    dia = 8'h3C; dib = 8'hC3;
    @(negedge clk); wea = 1'b0; web = 1'b0; addra = 9'h1F0; addrb = 9'h000;
    @(posedge clk); #1 check(doa == 8'hC3, "port B wins a write collision");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

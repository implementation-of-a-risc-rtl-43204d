// tb_alu: checks every ALU operation with random and corner-case operands
// against a reference computed in the testbench from the PIC16 instruction
// definitions (sum, carry out of bit 7, carry out of bit 3, zero), and the
// destination strobes.
module tb_alu;
  timeunit 1ps;
  timeprecision 1ps;
  import pic_pkg::*;

  alu_op_e    op;
  logic [7:0] a, b, y;
  logic       cin, c_status, c_out, dc_out, z_out, to_w, to_f;
  dest_e      dest;
  int checks = 0, failures = 0;

  alu dut (.op, .a, .b, .cin, .c_status, .dest, .y, .c_out, .dc_out, .z_out,
           .to_w, .to_f);

  task automatic expect_out(input logic [7:0] ey, input logic ec, input logic edc,
                            input bit chk_dc, input string what);
    checks++;
    if (y !== ey || c_out !== ec || (chk_dc && dc_out !== edc) || z_out !== (ey == 8'h00)) begin
      failures++;
      $display("FAIL %s: op=%s a=%02h b=%02h cin=%0b c=%0b -> y=%02h c=%0b dc=%0b z=%0b (exp %02h %0b %0b)",
               what, op.name(), a, b, cin, c_status, y, c_out, dc_out, z_out, ey, ec, edc);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] s;
    logic [4:0] ls;
    dest = DST_NONE;
    for (int n = 0; n < 3000; n++) begin
      a = 8'($urandom); b = 8'($urandom); cin = 1'($urandom); c_status = 1'($urandom);
      if (n < 4) begin a = (n[0]) ? 8'hFF : 8'h00; b = (n[1]) ? 8'hFF : 8'h00; end
      op = ALU_ADD; #1;
      s  = {1'b0, a} + {1'b0, b} + 9'(cin);
      ls = {1'b0, a[3:0]} + {1'b0, b[3:0]} + 5'(cin);
      expect_out(s[7:0], s[8], ls[4], 1'b1, "add");
      op = ALU_AND;  #1; expect_out(a & b, c_status, 1'b0, 1'b0, "and");
      op = ALU_OR;   #1; expect_out(a | b, c_status, 1'b0, 1'b0, "or");
      op = ALU_XOR;  #1; expect_out(a ^ b, c_status, 1'b0, 1'b0, "xor");
      op = ALU_COMP; #1; expect_out(~a, c_status, 1'b0, 1'b0, "comp");
      op = ALU_SWAP; #1; expect_out({a[3:0], a[7:4]}, c_status, 1'b0, 1'b0, "swap");
      op = ALU_RLF;  #1; expect_out({a[6:0], c_status}, a[7], 1'b0, 1'b0, "rlf");
      op = ALU_RRF;  #1; expect_out({c_status, a[7:1]}, a[0], 1'b0, 1'b0, "rrf");
      op = ALU_PASS; #1; expect_out(a, c_status, 1'b0, 1'b0, "pass");
      op = ALU_MULT; #1; expect_out(8'(a[3:0] * b[3:0]), c_status, 1'b0, 1'b0, "mult");
    end
    // Subtraction the way the core issues it: f - W = f + ~W + 1.
    op = ALU_ADD; cin = 1'b1;
    a = 8'h37; b = ~8'h00; #1; expect_out(8'h37, 1'b1, 1'b1, 1'b1, "sub W=0");
    a = 8'h05; b = ~8'h10; #1; expect_out(8'hF5, 1'b0, 1'b1, 1'b1, "sub borrow");
    a = 8'h10; b = ~8'h01; #1; expect_out(8'h0F, 1'b1, 1'b0, 1'b1, "sub digit borrow");
    // Destination strobes.
    dest = DST_W; #1; checks++; if (!(to_w && !to_f)) failures++;
    dest = DST_F; #1; checks++; if (!(!to_w && to_f)) failures++;
    dest = DST_NONE; #1; checks++; if (to_w || to_f) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mult4: exhaustive check of the 4 x 4 multiplier against integer
// multiplication, including the worked example 5 x D = 41h.
module tb_mult4;
  timeunit 1ps;
  timeprecision 1ps;
  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;

  mult4 dut (.a, .b, .p);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        checks++;
        if (p != 8'(i * j)) begin
          failures++;
          $display("FAIL: %0d * %0d = %0d", i, j, p);
        end
      end
    end
    a = 4'h5; b = 4'hD; #1;
    checks++;
    if (p != 8'h41) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// mult4: 4 x 4-bit unsigned multiplier for the MULT instruction.
//
// The MULT instruction multiplies the low nibble of W by its high nibble and
// writes the 8-bit product. This unit is built as four shifted, gated partial
// products summed together (a plain array multiplier); it is purely
// combinational. Example: 5 x D gives 41 (hex).
//
// The document gives the operation and the example; the array structure is
// this design's choice.
module mult4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);

  always_comb begin
    p = 8'h00;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) p = p + (8'(a) << i);
    end
  end

endmodule

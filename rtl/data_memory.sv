// data_memory: 512 x 8 dual-port synchronous data RAM.
//
// Port A serves the microcontroller's data bus (general-purpose registers of
// all four banks, addressed by the 9-bit data address); port B is a debug port
// through which the RAM can be inspected or preset. Each port has its own
// enable, write enable and synchronous output reset; both share one clock
// (clk24 in this design). On a rising clock edge, for each port with EN
// high: RST clears its output register; otherwise WE high writes the input
// data (which also appears on the output) and WE low reads the addressed byte
// to the output. With EN low the output holds. If both ports write the same
// byte in one cycle, port B wins.
//
// Follows the document: 512 bytes, two 8-bit ports with the signals of its
// RAM diagram (WEA/ENA/RSTA/ADDRA/DIA/DOA and the port-B set). Own choices:
// one clock for both ports (the block RAM allows two; both are clk24 here),
// and a separate port-B reset rstb where the diagram repeats the name RSTA.
module data_memory #(
  parameter int unsigned DEPTH = 512
) (
  input  logic                       clk,
  input  logic                       ena,
  input  logic                       wea,
  input  logic                       rsta,
  input  logic [$clog2(DEPTH)-1:0]   addra,
  input  logic [7:0]                 dia,
  output logic [7:0]                 doa,
  input  logic                       enb,
  input  logic                       web,
  input  logic                       rstb,
  input  logic [$clog2(DEPTH)-1:0]   addrb,
  input  logic [7:0]                 dib,
  output logic [7:0]                 dob
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ena) begin
      if (wea) mem[addra] <= dia;
      if (rsta)     doa <= 8'h00;
      else if (wea) doa <= dia;
      else          doa <= mem[addra];
    end
    if (enb) begin
      if (web) mem[addrb] <= dib;
      if (rstb)     dob <= 8'h00;
      else if (web) dob <= dib;
      else          dob <= mem[addrb];
    end
  end

endmodule

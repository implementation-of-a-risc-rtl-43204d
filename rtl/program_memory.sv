// program_memory: 16 kbit dual-port synchronous program RAM.
//
// Port A is 2048 x 8 and is written by the program loader one byte at a time;
// port B is 1024 x 16 and is read by the microcontroller (only bits 13:0 are
// instruction bits). Both views share one array of 16-bit words: byte address
// 2n is the low byte and 2n+1 the high byte of word n, so a program sent low
// byte first lands in the right place.
//
// Each port has its own enable and write enable; both ports share one clock
// (clk24 in this design). On a rising clock edge, for each port with EN high:
// if WE is high the input data is written and also appears on that port's
// data output; if WE is low the addressed location is read to the output.
// With EN low nothing is written and the output holds. If both ports write
// the same word in one cycle, port B wins; the design never does this.
//
// Follows the document: the port widths, address widths and enable/write
// enable behaviour of the block RAM it uses. Own choices: the byte order, and
// one clock for both ports (the block RAM allows two; both are clk24 here).
module program_memory #(
  parameter int unsigned WORDS = 1024   // 16-bit words (16 kbit)
) (
  input  logic                         clk,
  // port A: byte port (loader)
  input  logic                         ena,
  input  logic                         wea,
  input  logic [$clog2(WORDS*2)-1:0]   addra,
  input  logic [7:0]                   dia,
  output logic [7:0]                   doa,
  // port B: word port (instruction fetch)
  input  logic                         enb,
  input  logic                         web,
  input  logic [$clog2(WORDS)-1:0]     addrb,
  input  logic [15:0]                  dib,
  output logic [15:0]                  dob
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [7:0] mem_lo [WORDS];
  logic [7:0] mem_hi [WORDS];

  logic [AW-1:0] wa;
  assign wa = addra[AW:1];

  always_ff @(posedge clk) begin
    if (ena) begin
      if (wea) begin
        if (addra[0]) mem_hi[wa] <= dia;
        else          mem_lo[wa] <= dia;
        doa <= dia;
      end else begin
        doa <= addra[0] ? mem_hi[wa] : mem_lo[wa];
      end
    end
    if (enb) begin
      if (web) begin
        mem_lo[addrb] <= dib[7:0];
        mem_hi[addrb] <= dib[15:8];
        dob <= dib;
      end else begin
        dob <= {mem_hi[addrb], mem_lo[addrb]};
      end
    end
  end

endmodule

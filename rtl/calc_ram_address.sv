// calc_ram_address: data-memory address generation, register-map decode and
// operand read multiplexer.
//
// Direct addressing concatenates STATUS<6:5> (RP1:RP0) with the 7-bit file
// field of the instruction; when the file field is zero (INDF) the access is
// indirect and the address is STATUS<7> (IRP) concatenated with the 8-bit FSR.
// The resulting 9-bit address is classified into general-purpose SRAM or one of
// the special registers of the register map (0E-7F and 8E-FF are SRAM; PCL,
// STATUS, FSR, PCLATH and INTCON appear in both banks; ports in bank 0, TRIS
// registers and OPTION in bank 1). Banks 2 and 3 use the same decode on the low
// eight address bits, so their register area mirrors banks 0 and 1; their SRAM
// area is separate because the full 9-bit address goes to the RAM. Addresses
// of the register area that the map does not list, and INDF read through
// itself, read as zero and are never written.
//
// The module also selects the value of the addressed location (the value that
// the state machine latches as the ALU's operand) and forms the one-hot bit mask
// for the bit-oriented instructions. Everything here is combinational.
//
// Follows the document: the direct/indirect concatenation (its Figures 4.12 and
// 4.13) and the address table. Own choices: the mirroring of banks 2/3 and the
// zero read of unlisted addresses.
module calc_ram_address
  import pic_pkg::*;
(
  input  logic [6:0]     f,          // instruction file field
  input  logic [2:0]     b,          // instruction bit field
  input  logic [7:0]     status,
  input  logic [7:0]     fsr,
  // values of the readable locations
  input  logic [7:0]     ram_rdata,
  input  logic [7:0]     pcl,
  input  logic [7:0]     porta_rd,
  input  logic [7:0]     portb_rd,
  input  logic [7:0]     portc_rd,
  input  logic [7:0]     portd_rd,
  input  logic [7:0]     trisa,
  input  logic [7:0]     trisb,
  input  logic [7:0]     trisc,
  input  logic [7:0]     trisd,
  input  logic [7:0]     pclath,
  input  logic [7:0]     intcon,
  input  logic [7:0]     option,
  output logic [RAW-1:0] addr,       // 9-bit data address
  output logic           indirect,
  output target_e        target,
  output logic [7:0]     rd_value,   // value of the addressed location
  output logic [7:0]     mask        // 1 << b
);

  logic [6:0] low7;

  always_comb begin
    indirect = (f == A_INDF[6:0]);
    if (indirect) addr = {status[ST_IRP], fsr};
    else          addr = {status[ST_RP1], status[ST_RP0], f};
    low7 = addr[6:0];

    if (low7 >= 7'h0E) begin
      target = T_SRAM;
    end else begin
      unique case (low7)
        A_PCL[6:0]:    target = T_PCL;
        A_STATUS[6:0]: target = T_STATUS;
        A_FSR[6:0]:    target = T_FSR;
        A_PCLATH[6:0]: target = T_PCLATH;
        A_INTCON[6:0]: target = T_INTCON;
        A_OPTION[6:0]: target = addr[7] ? T_OPTION : T_NONE;
        A_PORTA[6:0]:  target = addr[7] ? T_TRISA  : T_PORTA;
        A_PORTB[6:0]:  target = addr[7] ? T_TRISB  : T_PORTB;
        A_PORTC[6:0]:  target = addr[7] ? T_TRISC  : T_PORTC;
        A_PORTD[6:0]:  target = addr[7] ? T_TRISD  : T_PORTD;
        default: target = T_NONE;
      endcase
    end

    unique case (target)
      T_SRAM:   rd_value = ram_rdata;
      T_PCL:    rd_value = pcl;
      T_STATUS: rd_value = status;
      T_FSR:    rd_value = fsr;
      T_PORTA:  rd_value = porta_rd;
      T_PORTB:  rd_value = portb_rd;
      T_PORTC:  rd_value = portc_rd;
      T_PORTD:  rd_value = portd_rd;
      T_TRISA:  rd_value = trisa;
      T_TRISB:  rd_value = trisb;
      T_TRISC:  rd_value = trisc;
      T_TRISD:  rd_value = trisd;
      T_PCLATH: rd_value = pclath;
      T_INTCON: rd_value = intcon;
      T_OPTION: rd_value = option;
      default:  rd_value = 8'h00;
    endcase

    mask = 8'h01 << b;
  end

endmodule

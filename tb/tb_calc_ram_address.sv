// tb_calc_ram_address: random and directed check of the data-address unit.
// For random file fields, bank bits, IRP and FSR it compares the 9-bit
// address, the indirect flag, the register-map target and the read value
// against a reference written from the register map (every source gets a
// distinct value so a wrong multiplexer choice shows), and checks the bit
// mask for every bit number.
module tb_calc_ram_address;
  timeunit 1ps;
  timeprecision 1ps;
  import pic_pkg::*;

  logic [6:0] f;
  logic [2:0] b;
  logic [7:0] status, fsr;
  logic [8:0] addr;
  logic       indirect;
  target_e    target;
  logic [7:0] rd_value, mask;
  int checks = 0, failures = 0;

  // Distinct values for each readable source.
  localparam logic [7:0] V_RAM = 8'hA1, V_PCL = 8'hB2, V_PA = 8'h13, V_PB = 8'h24,
                         V_PC = 8'h35, V_PD = 8'h46, V_TA = 8'h57, V_TB = 8'h68,
                         V_TC = 8'h79, V_TD = 8'h8A, V_PCLATH = 8'h1B,
                         V_INTCON = 8'h2C, V_OPTION = 8'h3D;

  calc_ram_address dut (
    .f, .b, .status, .fsr, .ram_rdata(V_RAM), .pcl(V_PCL),
    .porta_rd(V_PA), .portb_rd(V_PB), .portc_rd(V_PC), .portd_rd(V_PD),
    .trisa(V_TA), .trisb(V_TB), .trisc(V_TC), .trisd(V_TD),
    .pclath(V_PCLATH), .intcon(V_INTCON), .option(V_OPTION),
    .addr, .indirect, .target, .rd_value, .mask
  );

  function automatic void ref_map(input logic [8:0] a, output target_e t,
                                  output logic [7:0] v);
    logic [7:0] lo;
    lo = a[7:0];
    t = T_NONE; v = 8'h00;
    if (lo[6:0] >= 7'h0E) begin t = T_SRAM; v = V_RAM; end
    else case (lo)
      8'h02, 8'h82: begin t = T_PCL;    v = V_PCL; end
      8'h03, 8'h83: begin t = T_STATUS; v = status; end
      8'h04, 8'h84: begin t = T_FSR;    v = fsr; end
      8'h05: begin t = T_PORTA; v = V_PA; end
      8'h06: begin t = T_PORTB; v = V_PB; end
      8'h0C: begin t = T_PORTC; v = V_PC; end
      8'h0D: begin t = T_PORTD; v = V_PD; end
      8'h85: begin t = T_TRISA; v = V_TA; end
      8'h86: begin t = T_TRISB; v = V_TB; end
      8'h8C: begin t = T_TRISC; v = V_TC; end
      8'h8D: begin t = T_TRISD; v = V_TD; end
      8'h0A, 8'h8A: begin t = T_PCLATH; v = V_PCLATH; end
      8'h0B, 8'h8B: begin t = T_INTCON; v = V_INTCON; end
      8'h81: begin t = T_OPTION; v = V_OPTION; end
      default: ;
    endcase
  endfunction

  task automatic check_now();
    logic [8:0] ea;
    target_e    et;
    logic [7:0] ev;
    ea = (f == 7'h00) ? {status[ST_IRP], fsr} : {status[ST_RP1], status[ST_RP0], f};
    ref_map(ea, et, ev);
    checks++;
    if (addr != ea || indirect != (f == 7'h00) || target != et || rd_value != ev ||
        mask != (8'h01 << b)) begin
      failures++;
      $display("FAIL f=%02h st=%02h fsr=%02h: addr=%03h (exp %03h) target=%s (exp %s) rd=%02h (exp %02h)",
               f, status, fsr, addr, ea, target.name(), et.name(), rd_value, ev);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Every file address in every bank, direct.
    for (int bank = 0; bank < 4; bank++)
      for (int i = 1; i < 128; i++) begin
        f = 7'(i); b = 3'(i); fsr = 8'($urandom);
        status = {1'($urandom), 2'(bank), 5'($urandom)};
        #1 check_now();
      end
    // Every FSR value with both IRP settings, indirect.
    for (int irp = 0; irp < 2; irp++)
      for (int i = 0; i < 256; i++) begin
        f = 7'h00; b = 3'($urandom); fsr = 8'(i);
        status = {1'(irp), 7'($urandom)};
        #1 check_now();
      end
    // Directed: TRISC in bank 1, bank-2 RAM, indirect read of INDF itself.
    f = 7'h0C; status = 8'h20; #1;
    checks++; if (target != T_TRISC || addr != 9'h08C) failures++;
    f = 7'h20; status = 8'h40; #1;
    checks++; if (target != T_SRAM || addr != 9'h120) failures++;
    f = 7'h00; status = 8'h00; fsr = 8'h00; #1;
    checks++; if (target != T_NONE || rd_value != 8'h00) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// RegSel multiplexer: chooses the 6-bit register file address.
//
// Combinational. RegSel picks one of five sources: the hard-wired addresses
// 32 (PC) and 1 (RA, the return address register), or the rd, rs1 and rs2
// specifier fields of the instruction in IR, each padded to 6 bits with a 0
// in the most significant bit. The five sources, the two hard-wired numbers
// and the zero padding follow the source design; the field positions
// rd = IR[31:27], rs1 = IR[26:22], rs2 = IR[21:17] follow its instruction
// layout. Unused RegSel codes select address 0 (own choice).
module reg_addr_sel
  import bus_riscv_pkg::*;
(
  input  logic [31:0]        ir,
  input  regsel_e            sel,
  output logic [RADDR_W-1:0] addr
);

  always_comb begin
    unique case (sel)
      RS_PC:   addr = REG_PC;
      RS_RA:   addr = REG_RA;
      RS_RD:   addr = {1'b0, ir[31:27]};
      RS_RS1:  addr = {1'b0, ir[26:22]};
      RS_RS2:  addr = {1'b0, ir[21:17]};
      default: addr = '0;
    endcase
  end

endmodule

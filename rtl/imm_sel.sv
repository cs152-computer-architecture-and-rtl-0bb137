// Immediate selector and sign extender ("Immed Select").
//
// Combinational. Takes the instruction word held in IR and, according to
// imm_sel, extracts one of five immediates and sign-extends it to 32 bits:
//   IType  : IR[21:10]                         (ALU immediates, loads, JALR)
//   LType  : IR[26:7] placed in bits 31:12     (LUI)
//   JType  : IR[31:7] shifted left by one      (J, JAL byte offset)
//   BsType : {IR[31:27], IR[16:10]}            (store offset)
//   BrType : {IR[31:27], IR[16:10]} << 1       (branch byte offset)
// The five types and sign extension of every immediate follow the source
// design. The bit positions and the one-bit shift of jump and branch offsets
// come from the early RISC-V encoding used by this design (rd in bits 31:27),
// not from the source design itself. Unused selector codes give 0.
module imm_sel
  import bus_riscv_pkg::*;
(
  input  logic [31:0] ir,
  input  immsel_e     sel,
  output logic [31:0] imm
);

  logic [11:0] b_imm;
  assign b_imm = {ir[31:27], ir[16:10]};

  always_comb begin
    unique case (sel)
      IMM_I:   imm = {{20{ir[21]}}, ir[21:10]};
      IMM_L:   imm = {ir[26:7], 12'b0};
      IMM_J:   imm = {{6{ir[31]}}, ir[31:7], 1'b0};
      IMM_BS:  imm = {{20{b_imm[11]}}, b_imm};
      IMM_BR:  imm = {{19{b_imm[11]}}, b_imm, 1'b0};
      default: imm = '0;
    endcase
  end

endmodule

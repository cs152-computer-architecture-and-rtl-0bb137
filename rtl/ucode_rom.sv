// Microcode ROM of the bus-based RV32 processor.
//
// Combinational: addr (the uPC) selects one microinstruction, a uinst_t
// holding every control signal of the datapath for this cycle, the
// microbranch uBr and the Next State field. Don't-care entries of the table
// are 0 here, so only the fields a state needs are set.
//
// The fetch states and NOP come from the source design's table:
//   FETCH0  MA <- PC; A <- PC     uBr N
//   FETCH1  IR <- Mem             uBr S   (spin while memory busy)
//   FETCH2  PC <- A+4             uBr D   (dispatch)
//   NOP0    -                     uBr J FETCH0
// The microcode of the other instructions is this design's own, written
// for the same datapath and the same ALU operations. Every instruction ends
// with a J back to FETCH0. Branch targets and jump targets are relative to
// the address of the branch or jump, which is PC-4 once FETCH2 has run.
//   R-type (ADD/SUB/SLT/SLTU): A <- rs1; B <- rs2; rd <- A op B
//   I-type (ADDI/SLTI/SLTIU):  A <- rs1; B <- ImmI; rd <- A op B
//   LW:    A <- rs1; B <- ImmI; MA <- A+B; rd <- Mem (S); J FETCH0
//   SW:    A <- rs1; B <- ImmBs; MA <- A+B; Mem <- rs2 (S); J FETCH0
//   LUI:   rd <- ImmL
//   J:     A <- PC; A <- A-4; B <- ImmJ; PC <- A+B
//   JAL:   A <- PC; RA <- A; A <- A-4; B <- ImmJ; PC <- A+B
//   JALR:  A <- rs1; B <- ImmI; B <- A+B; A <- PC; rd <- A; PC <- B
//   Bxx:   A <- rs1; B <- rs2; ALU SUB/SLT/SLTU with EZ or NZ to BRTAKEN0;
//          J FETCH0 (not taken)
//   BRTAKEN: A <- PC; A <- A-4; B <- ImmBr; PC <- A+B
//   ILLEGAL0: J ILLEGAL0 (the machine stops)
// Addresses without a state hold J FETCH0.
module ucode_rom
  import bus_riscv_pkg::*;
(
  input  logic [UPC_W-1:0] addr,
  output uinst_t           uinst
);

  // Register -> bus, loaded into any of A, B, MA.
  function automatic uinst_t reg_out(regsel_e s, logic a, logic b, logic ma);
    uinst_t u = '0;
    u.reg_sel = s;  u.en_reg = 1'b1;
    u.ld_a = a;  u.ld_b = b;  u.ld_ma = ma;
    return u;
  endfunction

  // ALU -> bus, loaded into any of A, B, MA.
  function automatic uinst_t alu_out(aluop_e op, logic a, logic b, logic ma);
    uinst_t u = '0;
    u.alu_op = op;  u.en_alu = 1'b1;
    u.ld_a = a;  u.ld_b = b;  u.ld_ma = ma;
    return u;
  endfunction

  // ALU -> bus -> register s.
  function automatic uinst_t alu_to_reg(aluop_e op, regsel_e s);
    uinst_t u = '0;
    u.alu_op = op;  u.en_alu = 1'b1;
    u.reg_sel = s;  u.reg_wr = 1'b1;  u.en_reg = 1'b1;
    return u;
  endfunction

  // ALU computes (for its zero flag) without driving the bus.
  function automatic uinst_t alu_only(aluop_e op);
    uinst_t u = '0;
    u.alu_op = op;
    return u;
  endfunction

  // Immediate -> bus, loaded into B.
  function automatic uinst_t imm_to_b(immsel_e t);
    uinst_t u = '0;
    u.imm_sel = t;  u.en_imm = 1'b1;  u.ld_b = 1'b1;
    return u;
  endfunction

  function automatic uinst_t with_br(uinst_t u_in, ubr_e br, logic [UPC_W-1:0] ns);
    uinst_t u = u_in;
    u.ubr = br;  u.next_state = ns;
    return u;
  endfunction

  function automatic uinst_t jump_fetch();
    return with_br('0, UBR_J, S_FETCH0);
  endfunction

  // Three-state register-register or register-immediate ALU instruction.
  function automatic uinst_t alu_instr(int unsigned step, aluop_e op, logic use_imm);
    unique case (step)
      0:       return reg_out(RS_RS1, 1'b1, 1'b0, 1'b0);
      1:       return use_imm ? imm_to_b(IMM_I) : reg_out(RS_RS2, 1'b0, 1'b1, 1'b0);
      default: return with_br(alu_to_reg(op, RS_RD), UBR_J, S_FETCH0);
    endcase
  endfunction

  // Four-state conditional branch: compare, then EZ/NZ to BRTAKEN0.
  function automatic uinst_t branch_instr(int unsigned step, aluop_e op, ubr_e br);
    unique case (step)
      0:       return reg_out(RS_RS1, 1'b1, 1'b0, 1'b0);
      1:       return reg_out(RS_RS2, 1'b0, 1'b1, 1'b0);
      2:       return with_br(alu_only(op), br, S_BRTAKEN0);
      default: return jump_fetch();
    endcase
  endfunction

  // Relative step inside a group of states that starts at base.
  function automatic logic in_group(logic [UPC_W-1:0] a, logic [UPC_W-1:0] base, int unsigned n);
    return (32'(a) >= 32'(base)) && (32'(a) < 32'(base) + n);
  endfunction

  logic [UPC_W-1:0] a;
  assign a = addr;

  always_comb begin
    uinst = jump_fetch();
    // ---- fetch and NOP (from the source design's table) ----
    if (a == S_FETCH0) begin
      uinst = with_br(reg_out(RS_PC, 1'b1, 1'b0, 1'b1), UBR_N, '0);
    end else if (a == S_FETCH0 + 7'd1) begin
      uinst = '0;
      uinst.ld_ir = 1'b1;  uinst.en_mem = 1'b1;  uinst.ubr = UBR_S;
    end else if (a == S_FETCH0 + 7'd2) begin
      uinst = with_br(alu_to_reg(ALU_INC_A_4, RS_PC), UBR_D, '0);
    end else if (a == S_NOP0) begin
      uinst = jump_fetch();
    // ---- ALU instructions ----
    end else if (in_group(a, S_ADD0, 3)) begin
      uinst = alu_instr(32'(a - S_ADD0), ALU_ADD, 1'b0);
    end else if (in_group(a, S_SUB0, 3)) begin
      uinst = alu_instr(32'(a - S_SUB0), ALU_SUB, 1'b0);
    end else if (in_group(a, S_SLT0, 3)) begin
      uinst = alu_instr(32'(a - S_SLT0), ALU_SLT, 1'b0);
    end else if (in_group(a, S_SLTU0, 3)) begin
      uinst = alu_instr(32'(a - S_SLTU0), ALU_SLTU, 1'b0);
    end else if (in_group(a, S_ADDI0, 3)) begin
      uinst = alu_instr(32'(a - S_ADDI0), ALU_ADD, 1'b1);
    end else if (in_group(a, S_SLTI0, 3)) begin
      uinst = alu_instr(32'(a - S_SLTI0), ALU_SLT, 1'b1);
    end else if (in_group(a, S_SLTIU0, 3)) begin
      uinst = alu_instr(32'(a - S_SLTIU0), ALU_SLTU, 1'b1);
    // ---- loads and stores ----
    end else if (a == S_LW0) begin
      uinst = reg_out(RS_RS1, 1'b1, 1'b0, 1'b0);
    end else if (a == S_LW0 + 7'd1) begin
      uinst = imm_to_b(IMM_I);
    end else if (a == S_LW0 + 7'd2) begin
      uinst = alu_out(ALU_ADD, 1'b0, 1'b0, 1'b1);
    end else if (a == S_LW0 + 7'd3) begin
      uinst = '0;
      uinst.reg_sel = RS_RD;  uinst.reg_wr = 1'b1;  uinst.en_reg = 1'b1;
      uinst.en_mem  = 1'b1;   uinst.ubr = UBR_S;
    end else if (a == S_LW0 + 7'd4) begin
      uinst = jump_fetch();
    end else if (a == S_SW0) begin
      uinst = reg_out(RS_RS1, 1'b1, 1'b0, 1'b0);
    end else if (a == S_SW0 + 7'd1) begin
      uinst = imm_to_b(IMM_BS);
    end else if (a == S_SW0 + 7'd2) begin
      uinst = alu_out(ALU_ADD, 1'b0, 1'b0, 1'b1);
    end else if (a == S_SW0 + 7'd3) begin
      uinst = reg_out(RS_RS2, 1'b0, 1'b0, 1'b0);
      uinst.mem_wr = 1'b1;  uinst.en_mem = 1'b1;  uinst.ubr = UBR_S;
    end else if (a == S_SW0 + 7'd4) begin
      uinst = jump_fetch();
    // ---- LUI ----
    end else if (a == S_LUI0) begin
      uinst = '0;
      uinst.imm_sel = IMM_L;  uinst.en_imm = 1'b1;
      uinst.reg_sel = RS_RD;  uinst.reg_wr = 1'b1;  uinst.en_reg = 1'b1;
      uinst.ubr = UBR_J;      uinst.next_state = S_FETCH0;
    // ---- jumps ----
    end else if (a == S_J0) begin
      uinst = reg_out(RS_PC, 1'b1, 1'b0, 1'b0);
    end else if (a == S_J0 + 7'd1) begin
      uinst = alu_out(ALU_DEC_A_4, 1'b1, 1'b0, 1'b0);
    end else if (a == S_J0 + 7'd2) begin
      uinst = imm_to_b(IMM_J);
    end else if (a == S_J0 + 7'd3) begin
      uinst = with_br(alu_to_reg(ALU_ADD, RS_PC), UBR_J, S_FETCH0);
    end else if (a == S_JAL0) begin
      uinst = reg_out(RS_PC, 1'b1, 1'b0, 1'b0);
    end else if (a == S_JAL0 + 7'd1) begin
      uinst = alu_to_reg(ALU_COPY_A, RS_RA);
    end else if (a == S_JAL0 + 7'd2) begin
      uinst = alu_out(ALU_DEC_A_4, 1'b1, 1'b0, 1'b0);
    end else if (a == S_JAL0 + 7'd3) begin
      uinst = imm_to_b(IMM_J);
    end else if (a == S_JAL0 + 7'd4) begin
      uinst = with_br(alu_to_reg(ALU_ADD, RS_PC), UBR_J, S_FETCH0);
    end else if (a == S_JALR0) begin
      uinst = reg_out(RS_RS1, 1'b1, 1'b0, 1'b0);
    end else if (a == S_JALR0 + 7'd1) begin
      uinst = imm_to_b(IMM_I);
    end else if (a == S_JALR0 + 7'd2) begin
      uinst = alu_out(ALU_ADD, 1'b0, 1'b1, 1'b0);
    end else if (a == S_JALR0 + 7'd3) begin
      uinst = reg_out(RS_PC, 1'b1, 1'b0, 1'b0);
    end else if (a == S_JALR0 + 7'd4) begin
      uinst = alu_to_reg(ALU_COPY_A, RS_RD);
    end else if (a == S_JALR0 + 7'd5) begin
      uinst = with_br(alu_to_reg(ALU_COPY_B, RS_PC), UBR_J, S_FETCH0);
    // ---- conditional branches ----
    end else if (in_group(a, S_BEQ0, 4)) begin
      uinst = branch_instr(32'(a - S_BEQ0), ALU_SUB, UBR_EZ);
    end else if (in_group(a, S_BNE0, 4)) begin
      uinst = branch_instr(32'(a - S_BNE0), ALU_SUB, UBR_NZ);
    end else if (in_group(a, S_BLT0, 4)) begin
      uinst = branch_instr(32'(a - S_BLT0), ALU_SLT, UBR_NZ);
    end else if (in_group(a, S_BGE0, 4)) begin
      uinst = branch_instr(32'(a - S_BGE0), ALU_SLT, UBR_EZ);
    end else if (in_group(a, S_BLTU0, 4)) begin
      uinst = branch_instr(32'(a - S_BLTU0), ALU_SLTU, UBR_NZ);
    end else if (in_group(a, S_BGEU0, 4)) begin
      uinst = branch_instr(32'(a - S_BGEU0), ALU_SLTU, UBR_EZ);
    end else if (a == S_BRTAKEN0) begin
      uinst = reg_out(RS_PC, 1'b1, 1'b0, 1'b0);
    end else if (a == S_BRTAKEN0 + 7'd1) begin
      uinst = alu_out(ALU_DEC_A_4, 1'b1, 1'b0, 1'b0);
    end else if (a == S_BRTAKEN0 + 7'd2) begin
      uinst = imm_to_b(IMM_BR);
    end else if (a == S_BRTAKEN0 + 7'd3) begin
      uinst = with_br(alu_to_reg(ALU_ADD, RS_PC), UBR_J, S_FETCH0);
    // ---- unimplemented instruction: stop ----
    end else if (a == S_ILLEGAL0) begin
      uinst = with_br('0, UBR_J, S_ILLEGAL0);
    end
  end

endmodule

// Self-checking test of the microcode ROM.
// 1. The fetch rows and NOP row of the published table: every field that is
//    not a don't-care must match (FETCH0: RegSel=PC, enReg, ldA, ldMA, N;
//    FETCH1: ldIR, enMem, MemWr=0, S; FETCH2: RegSel=PC, RegWr, enReg,
//    INC_A_4, enALU, D; NOP0: J FETCH0).
// 2. For every state: at most one bus driver, and a register/memory load
//    only when something drives the bus.
// 3. Every instruction's microcode, followed from its dispatch state, ends
//    in a J back to FETCH0 within 8 states, and a memory access is always an
//    S state.
// 4. A few rows of the instruction microcode, written out by hand.
module tb_ucode_rom;
  import bus_riscv_pkg::*;

  logic [6:0] addr;
  uinst_t     u;
  int checks = 0, failures = 0;

  ucode_rom dut (.addr(addr), .uinst(u));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int drivers(uinst_t x);
    return int'(x.en_imm) + int'(x.en_alu) + int'(x.en_reg && !x.reg_wr) + int'(x.en_mem && !x.mem_wr);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int starts [] = '{3, 4, 7, 10, 13, 16, 19, 22, 25, 30, 35, 36, 40, 45, 51, 55, 59, 63, 67, 71, 75};
    addr = 0; #1;
    check(u.reg_sel == RS_PC && !u.reg_wr && u.en_reg && u.ld_a && !u.en_alu && u.ld_ma
          && !u.en_mem && !u.en_imm && u.ubr == UBR_N, "FETCH0 row");
    addr = 1; #1;
    check(u.ld_ir && !u.en_reg && !u.ld_a && !u.en_alu && !u.ld_ma && !u.mem_wr && u.en_mem
          && !u.en_imm && u.ubr == UBR_S, "FETCH1 row");
    addr = 2; #1;
    check(!u.ld_ir && u.reg_sel == RS_PC && u.reg_wr && u.en_reg && !u.ld_a
          && u.alu_op == ALU_INC_A_4 && u.en_alu && !u.en_mem && !u.en_imm && u.ubr == UBR_D,
          "FETCH2 row");
    addr = 3; #1;
    check(!u.en_reg && !u.en_alu && !u.en_mem && !u.en_imm && u.ubr == UBR_J && u.next_state == 0,
          "NOP0 row");

    for (int s = 0; s < 128; s++) begin
      addr = 7'(s); #1;
      check(drivers(u) <= 1, $sformatf("state %0d: %0d bus drivers", s, drivers(u)));
      if (u.ld_ir || u.ld_a || u.ld_b || u.ld_ma || (u.en_reg && u.reg_wr) || (u.en_mem && u.mem_wr))
        check(drivers(u) == 1, $sformatf("state %0d loads from an undriven bus", s));
      if (u.en_mem) check(u.ubr == UBR_S, $sformatf("state %0d: memory access without S", s));
    end

    foreach (starts[i]) begin
      int s = starts[i];
      bit ended = 0;
      for (int k = 0; k < 8 && !ended; k++) begin
        addr = 7'(s); #1;
        if (u.ubr == UBR_J && u.next_state == 0) ended = 1;
        else if (u.ubr == UBR_J || u.ubr == UBR_D) break;
        s++;
      end
      check(ended, $sformatf("microcode from state %0d does not return to FETCH0", starts[i]));
    end

    // LW3: rd <- Mem, spinning on busy.
    addr = 28; #1;
    check(u.reg_sel == RS_RD && u.reg_wr && u.en_reg && u.en_mem && !u.mem_wr && u.ubr == UBR_S,
          "LW3 row");
    // SW3: Mem <- rs2.
    addr = 33; #1;
    check(u.reg_sel == RS_RS2 && !u.reg_wr && u.en_reg && u.en_mem && u.mem_wr && u.ubr == UBR_S,
          "SW3 row");
    // BEQ2: SUB, EZ to BRTAKEN0; BLT2: SLT, NZ.
    addr = 53; #1;
    check(u.alu_op == ALU_SUB && u.ubr == UBR_EZ && u.next_state == 75 && drivers(u) == 0, "BEQ2 row");
    addr = 61; #1;
    check(u.alu_op == ALU_SLT && u.ubr == UBR_NZ && u.next_state == 75, "BLT2 row");
    // BRTAKEN2: B <- BrType immediate.
    addr = 77; #1;
    check(u.en_imm && u.imm_sel == IMM_BR && u.ld_b, "BRTAKEN2 row");
    // ILLEGAL0 loops on itself.
    addr = 79; #1;
    check(u.ubr == UBR_J && u.next_state == 79, "ILLEGAL0 row");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

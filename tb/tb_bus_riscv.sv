// End-to-end test of the bus-based RV32 processor at its default parameters.
//
// The testbench writes a program and random data straight into the memory
// array, sets x1..x31 to known values, releases reset and lets the machine
// run until it reaches the program's final self-loop. An instruction-level
// reference model written here (its own decoder and executor, no shared code
// with the design) runs the same program; afterwards every register, the PC
// and every memory word must agree. The program uses every implemented
// instruction: a summing loop with LW/ADD/SLT/ADDI/BNE, a SW, SUB, SLTU,
// SLTI, SLTIU, LUI, a JAL to a subroutine that stores and returns with JALR,
// all six branch kinds, NOP and J.
//
// Timing checks: every instruction fetch must take 3 + LATENCY cycles from
// FETCH0 to the dispatch (the source design's three fetch states plus the
// memory's busy cycles), and the whole run must take the cycle count the
// reference model predicts from the microcode's per-instruction lengths.
// Mechanism counters: each microbranch kind (N, J, EZ and NZ both taken and
// not taken, D, S spinning and S passing), each of the four bus drivers, a
// cycle loading two registers at once, register and memory writes. Each one
// that never happens counts as a failure.
module tb_bus_riscv;
  import bus_riscv_pkg::*;

  localparam int unsigned WORDS = 4096;   // defaults of bus_riscv
  localparam int unsigned LAT   = 1;
  localparam int unsigned DATA  = 32'h400;
  localparam int unsigned NDATA = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [31:0] bus_o, ir_o;
  logic [UPC_W-1:0] upc_o;
  logic zero_o, busy_o;

  bus_riscv dut (
    .clk(clk), .rst_n(rst_n), .bus_o(bus_o), .upc_o(upc_o),
    .ir_o(ir_o), .zero_o(zero_o), .busy_o(busy_o)
  );

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- instruction encoders (early RISC-V layout) -------------
  function automatic logic [31:0] r_t(int rd, int rs1, int rs2, logic [9:0] f10);
    return {5'(rd), 5'(rs1), 5'(rs2), f10, 7'b0110011};
  endfunction
  function automatic logic [31:0] i_t(int rd, int rs1, int imm, logic [2:0] f3, logic [6:0] op);
    return {5'(rd), 5'(rs1), 12'(imm), f3, op};
  endfunction
  function automatic logic [31:0] s_t(int rs1, int rs2, int imm, logic [2:0] f3, logic [6:0] op);
    logic [11:0] v = 12'(imm);
    return {v[11:7], 5'(rs1), 5'(rs2), v[6:0], f3, op};
  endfunction
  // Branch from instruction index 'from' to index 'to'; offset in half-words.
  function automatic logic [31:0] br(logic [2:0] f3, int rs1, int rs2, int from, int to);
    return s_t(rs1, rs2, (to - from) * 2, f3, 7'b1100011);
  endfunction
  function automatic logic [31:0] jmp(logic [6:0] op, int from, int to);
    return {25'((to - from) * 2), op};
  endfunction
  function automatic logic [31:0] lui(int rd, int imm20);
    return {5'(rd), 20'(imm20), 7'b0110111};
  endfunction

  localparam logic [6:0] IMM = 7'b0010011, LD = 7'b0000011, ST = 7'b0100011;
  localparam logic [6:0] JJ = 7'b1100111, JL = 7'b1101111, JR = 7'b1101011;

  logic [31:0] prog [37];
  initial begin
    prog[0]  = i_t(1, 0, DATA, 3'b000, IMM);       // ADDI x1,x0,0x400
    prog[1]  = i_t(2, 0, NDATA, 3'b000, IMM);      // ADDI x2,x0,8
    prog[2]  = i_t(3, 0, 0, 3'b000, IMM);          // ADDI x3,x0,0
    prog[3]  = i_t(6, 0, 0, 3'b000, IMM);          // ADDI x6,x0,0
    prog[4]  = i_t(4, 1, 0, 3'b010, LD);           // loop: LW x4,0(x1)
    prog[5]  = r_t(3, 3, 4, 10'b0000000_000);      // ADD  x3,x3,x4
    prog[6]  = r_t(5, 4, 3, 10'b0000000_010);      // SLT  x5,x4,x3
    prog[7]  = r_t(6, 6, 5, 10'b0000000_000);      // ADD  x6,x6,x5
    prog[8]  = i_t(1, 1, 4, 3'b000, IMM);          // ADDI x1,x1,4
    prog[9]  = i_t(2, 2, -1, 3'b000, IMM);         // ADDI x2,x2,-1
    prog[10] = br(3'b001, 2, 0, 10, 4);            // BNE  x2,x0,loop
    prog[11] = s_t(1, 3, 0, 3'b010, ST);           // SW   x3,0(x1)
    prog[12] = r_t(7, 0, 3, 10'b1000000_000);      // SUB  x7,x0,x3
    prog[13] = r_t(8, 3, 7, 10'b0000000_011);      // SLTU x8,x3,x7
    prog[14] = i_t(9, 7, -5, 3'b010, IMM);         // SLTI x9,x7,-5
    prog[15] = i_t(10, 3, 5, 3'b011, IMM);         // SLTIU x10,x3,5
    prog[16] = lui(11, 32'hABCDE);                 // LUI  x11,0xABCDE
    prog[17] = jmp(JL, 17, 30);                    // JAL  func
    prog[18] = i_t(12, 0, 7, 3'b000, IMM);         // ADDI x12,x0,7
    prog[19] = br(3'b000, 12, 12, 19, 21);         // BEQ  x12,x12 (taken)
    prog[20] = i_t(13, 13, 1, 3'b000, IMM);
    prog[21] = br(3'b100, 7, 3, 21, 23);           // BLT  x7,x3
    prog[22] = i_t(13, 13, 2, 3'b000, IMM);
    prog[23] = br(3'b101, 3, 7, 23, 25);           // BGE  x3,x7
    prog[24] = i_t(13, 13, 4, 3'b000, IMM);
    prog[25] = br(3'b110, 3, 7, 25, 27);           // BLTU x3,x7
    prog[26] = i_t(13, 13, 8, 3'b000, IMM);
    prog[27] = br(3'b111, 3, 7, 27, 29);           // BGEU x3,x7
    prog[28] = NOP_WORD;                           // NOP
    prog[29] = jmp(JJ, 29, 34);                    // J    over
    prog[30] = i_t(14, 0, -99, 3'b000, IMM);       // func: ADDI x14,x0,-99
    prog[31] = s_t(0, 14, 32'h430, 3'b010, ST);    // SW   x14,0x430(x0)
    prog[32] = i_t(15, 1, 0, 3'b000, JR);          // JALR x15,x1,0
    prog[33] = i_t(13, 13, 64, 3'b000, IMM);       // never executed
    prog[34] = br(3'b001, 0, 0, 34, 33);           // over: BNE x0,x0 (not taken)
    prog[35] = br(3'b000, 0, 12, 35, 33);          // BEQ  x0,x12 (not taken)
    prog[36] = jmp(JJ, 36, 36);                    // J    . (stop)
  end

  // ---------------- reference model -----------------------------------------
  logic [31:0] rm_mem [WORDS];
  logic [31:0] rm_reg [32];
  logic [31:0] rm_pc;
  int unsigned rm_instrs;
  longint unsigned rm_cycles;

  function automatic logic [31:0] sx12(logic [11:0] v);
    return {{20{v[11]}}, v};
  endfunction

  // Executes one instruction; returns 1 at the final self-loop.
  function automatic bit rm_step();
    logic [31:0] ins, a, b, res, bimm, target;
    logic [4:0]  rd, rs1, rs2;
    bit          taken;
    int unsigned cost;
    ins = rm_mem[rm_pc[13:2]];
    rd  = ins[31:27]; rs1 = ins[26:22]; rs2 = ins[21:17];
    a   = rm_reg[rs1]; b = rm_reg[rs2];
    bimm = sx12({ins[31:27], ins[16:10]});
    target = rm_pc + 4;
    res = '0;
    cost = 0;
    if (ins == {25'(0), 7'b1100111}) return 1'b1;
    case (ins[6:0])
      7'b0110011: begin
        cost = 3;
        case (ins[16:7])
          10'b0000000_000: res = a + b;
          10'b1000000_000: res = a - b;
          10'b0000000_010: res = {31'b0, $signed(a) < $signed(b)};
          default:         res = {31'b0, a < b};
        endcase
        rm_reg[rd] = res;
      end
      7'b0010011: begin
        if (ins == 32'h13) cost = 1;
        else cost = 3;
        b = sx12(ins[21:10]);
        case (ins[9:7])
          3'b000:  res = a + b;
          3'b010:  res = {31'b0, $signed(a) < $signed(b)};
          default: res = {31'b0, a < b};
        endcase
        rm_reg[rd] = res;
      end
      7'b0000011: begin
        cost = 5 + LAT;
        rm_reg[rd] = rm_mem[12'((a + sx12(ins[21:10])) >> 2)];
      end
      7'b0100011: begin
        cost = 5 + LAT;
        rm_mem[12'((a + bimm) >> 2)] = b;
      end
      7'b0110111: begin
        cost = 1;
        rm_reg[rd] = {ins[26:7], 12'b0};
      end
      7'b1100111: begin
        cost = 4;
        target = rm_pc + {{6{ins[31]}}, ins[31:7], 1'b0};
      end
      7'b1101111: begin
        cost = 5;
        rm_reg[1] = rm_pc + 4;
        target = rm_pc + {{6{ins[31]}}, ins[31:7], 1'b0};
      end
      7'b1101011: begin
        cost = 6;
        target = a + sx12(ins[21:10]);
        rm_reg[rd] = rm_pc + 4;
      end
      7'b1100011: begin
        case (ins[9:7])
          3'b000:  taken = (a == b);
          3'b001:  taken = (a != b);
          3'b100:  taken = ($signed(a) < $signed(b));
          3'b101:  taken = ($signed(a) >= $signed(b));
          3'b110:  taken = (a < b);
          default: taken = (a >= b);
        endcase
        cost = taken ? 7 : 4;
        if (taken) target = rm_pc + {bimm[30:0], 1'b0};
      end
      default: $display("reference model: unknown instruction %h", ins);
    endcase
    rm_reg[0] = '0;
    rm_pc = target;
    rm_cycles += 64'(3 + LAT + cost);
    rm_instrs++;
    return 1'b0;
  endfunction

  // ---------------- mechanism counters and fetch timing ---------------------
  int n_ubr_n, n_ubr_j, n_ez_t, n_ez_n, n_nz_t, n_nz_n, n_disp, n_spin, n_spass;
  int n_drv_imm, n_drv_alu, n_drv_reg, n_drv_mem, n_multi_ld, n_reg_wr, n_mem_wr;
  longint unsigned cycle = 0;
  longint unsigned fetch_start = 0;
  longint unsigned first_fetch = 0;
  longint unsigned dispatch_cycle [$];

  always @(posedge clk) begin
    if (rst_n) begin
      cycle <= cycle + 1;
      unique case (dut.ctl.ubr)
        UBR_N:  n_ubr_n++;
        UBR_J:  n_ubr_j++;
        UBR_EZ: if (dut.zero) n_ez_t++; else n_ez_n++;
        UBR_NZ: if (!dut.zero) n_nz_t++; else n_nz_n++;
        UBR_D:  n_disp++;
        UBR_S:  if (dut.busy) n_spin++; else n_spass++;
        default: ;
      endcase
      if (dut.ctl.en_imm) n_drv_imm++;
      if (dut.ctl.en_alu) n_drv_alu++;
      if (dut.reg_drive)  n_drv_reg++;
      if (dut.mem_drive)  n_drv_mem++;
      if (int'(dut.ctl.ld_ir) + int'(dut.ctl.ld_a) + int'(dut.ctl.ld_b) + int'(dut.ctl.ld_ma) > 1)
        n_multi_ld++;
      if (dut.ctl.reg_wr && dut.ctl.en_reg) n_reg_wr++;
      if (dut.ctl.mem_wr && dut.ctl.en_mem && !dut.busy) n_mem_wr++;
      if (upc_o == S_FETCH0) fetch_start = cycle;
      if (upc_o == S_FETCH0 + 7'd2) begin
        check(cycle - fetch_start == 64'(2 + LAT),
              $sformatf("fetch took %0d cycles to dispatch, expected %0d",
                        cycle - fetch_start + 1, 3 + LAT));
        dispatch_cycle.push_back(cycle);
      end
    end
  end

  // Watchdog.
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] init_reg [32];
    int unsigned ok_mem;
    #1;
    // Program, data and register contents, same for DUT and model.
    for (int i = 0; i < int'(WORDS); i++) rm_mem[i] = '0;
    for (int i = 0; i < 37; i++) rm_mem[i] = prog[i];
    for (int i = 0; i < int'(NDATA); i++)
      rm_mem[DATA / 4 + i] = $urandom() ^ ((i % 3 == 0) ? 32'h8000_0000 : 32'h0);
    for (int i = 0; i < int'(WORDS); i++) dut.u_mem.mem[i] = rm_mem[i];
    init_reg[0] = '0;
    for (int i = 1; i < 32; i++) init_reg[i] = 32'(i * 1000);
    for (int i = 0; i < 32; i++) begin
      rm_reg[i] = init_reg[i];
      dut.u_rf.regs[i] = init_reg[i];
    end
    rm_pc = '0;
    rm_instrs = 0;
    rm_cycles = 0;
    while (!rm_step()) begin
      if (rm_instrs > 1000) break;
    end
    $display("reference model: %0d instructions, %0d cycles", rm_instrs, rm_cycles);

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Run until the self-loop J has been dispatched twice.
    wait (dispatch_cycle.size() == int'(rm_instrs) + 2);
    wait (upc_o == S_FETCH0);
    @(negedge clk);

    // Cycle count: from the first FETCH0 (cycle 0) to the dispatch of the
    // final J: all instructions plus that J's fetch.
    check(dispatch_cycle[rm_instrs] + 1 == rm_cycles + 64'(3 + LAT),
          $sformatf("run took %0d cycles to the final dispatch, expected %0d",
                    dispatch_cycle[rm_instrs] + 1, rm_cycles + 64'(3 + LAT)));
    for (int i = 0; i < 32; i++)
      check(i == 0 || dut.u_rf.regs[i] == rm_reg[i],
            $sformatf("x%0d = %h, expected %h", i, dut.u_rf.regs[i], rm_reg[i]));
    check(dut.u_rf.regs[REG_PC] == 32'(36 * 4),
          $sformatf("PC = %h, expected %h", dut.u_rf.regs[REG_PC], 36 * 4));
    ok_mem = 1;
    for (int i = 0; i < int'(WORDS); i++)
      if (dut.u_mem.mem[i] != rm_mem[i]) begin
        ok_mem = 0;
        $display("mem[%0d] = %h, expected %h", i, dut.u_mem.mem[i], rm_mem[i]);
      end
    check(ok_mem == 1, "memory contents differ from the reference model");
    check(rm_mem[(DATA + 4 * NDATA) / 4] == rm_reg[3], "stored sum");
    check(rm_mem[32'h430 / 4] == 32'hFFFF_FF9D, "subroutine store");

    // Every mechanism must have happened.
    check(n_ubr_n > 0,    "uBr N never taken");
    check(n_ubr_j > 0,    "uBr J never taken");
    check(n_ez_t > 0,     "uBr EZ never branched");
    check(n_ez_n > 0,     "uBr EZ never fell through");
    check(n_nz_t > 0,     "uBr NZ never branched");
    check(n_nz_n > 0,     "uBr NZ never fell through");
    check(n_disp > 0,     "uBr D never used");
    check(n_spin > 0,     "uBr S never spun on busy");
    check(n_spass > 0,    "uBr S never passed");
    check(n_drv_imm > 0,  "immediate never drove the bus");
    check(n_drv_alu > 0,  "ALU never drove the bus");
    check(n_drv_reg > 0,  "register file never drove the bus");
    check(n_drv_mem > 0,  "memory never drove the bus");
    check(n_multi_ld > 0, "no cycle loaded two registers");
    check(n_reg_wr > 0,   "no register write");
    check(n_mem_wr > 0,   "no memory write");
    $display("mechanisms: N=%0d J=%0d EZ=%0d/%0d NZ=%0d/%0d D=%0d S spin=%0d pass=%0d",
             n_ubr_n, n_ubr_j, n_ez_t, n_ez_n, n_nz_t, n_nz_n, n_disp, n_spin, n_spass);
    $display("bus drivers: imm=%0d alu=%0d reg=%0d mem=%0d; dual loads=%0d reg wr=%0d mem wr=%0d",
             n_drv_imm, n_drv_alu, n_drv_reg, n_drv_mem, n_multi_ld, n_reg_wr, n_mem_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

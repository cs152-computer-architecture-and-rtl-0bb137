// Shared types and constants of the bus-based microcoded RV32 processor.
//
// The machine moves every value over one 32-bit bus. A microinstruction
// (struct uinst_t) holds the control signals of one cycle: the load signals
// ldIR/ldA/ldB/ldMA, the register file and memory controls RegSel/RegWr/enReg
// and MemWr/enMem, the ALU operation, the immediate type, the four bus
// enables and the microbranch (uBr) with its target state.
//
// Following the source design: the 32-bit word, the 6-bit register address,
// PC at register 32 and RA at register 1, the ten ALU operations, the five
// immediate types and the six microbranch kinds. This package's own choices:
// the binary encodings of every enumerated field, the instruction field
// positions and opcodes (taken from the early RISC-V encoding in which rd sits
// in bits 31:27), and the state numbering of the microprogram.
package bus_riscv_pkg;

  localparam int unsigned XLEN      = 32;  // bus and register width
  localparam int unsigned RADDR_W   = 6;   // register file address width
  localparam int unsigned UPC_W     = 7;   // microprogram counter width

  localparam logic [RADDR_W-1:0] REG_PC = 6'd32;
  localparam logic [RADDR_W-1:0] REG_RA = 6'd1;

  typedef enum logic [2:0] {
    RS_PC  = 3'd0,
    RS_RA  = 3'd1,
    RS_RD  = 3'd2,
    RS_RS1 = 3'd3,
    RS_RS2 = 3'd4
  } regsel_e;

  typedef enum logic [3:0] {
    ALU_COPY_A  = 4'd0,
    ALU_COPY_B  = 4'd1,
    ALU_INC_A_1 = 4'd2,
    ALU_DEC_A_1 = 4'd3,
    ALU_INC_A_4 = 4'd4,
    ALU_DEC_A_4 = 4'd5,
    ALU_ADD     = 4'd6,
    ALU_SUB     = 4'd7,
    ALU_SLT     = 4'd8,
    ALU_SLTU    = 4'd9
  } aluop_e;

  typedef enum logic [2:0] {
    IMM_I  = 3'd0,   // IType
    IMM_L  = 3'd1,   // LType (LUI)
    IMM_J  = 3'd2,   // JType
    IMM_BS = 3'd3,   // BsType (stores)
    IMM_BR = 3'd4    // BrType (branches)
  } immsel_e;

  // Microbranch: a 3-bit field with six values.
  typedef enum logic [2:0] {
    UBR_N  = 3'd0,   // next: uPC + 1
    UBR_J  = 3'd1,   // jump to next_state
    UBR_EZ = 3'd2,   // jump if ALU zero, else uPC + 1
    UBR_NZ = 3'd3,   // jump if not ALU zero, else uPC + 1
    UBR_D  = 3'd4,   // dispatch on IR opcode/function
    UBR_S  = 3'd5    // spin while memory busy, else uPC + 1
  } ubr_e;

  typedef struct packed {
    logic              ld_ir;
    regsel_e           reg_sel;
    logic              reg_wr;
    logic              en_reg;
    logic              ld_a;
    logic              ld_b;
    aluop_e            alu_op;
    logic              en_alu;
    logic              ld_ma;
    logic              mem_wr;
    logic              en_mem;
    immsel_e           imm_sel;
    logic              en_imm;
    ubr_e              ubr;
    logic [UPC_W-1:0]  next_state;
  } uinst_t;

  // ---------------------------------------------------------------------
  // Instruction encoding (early RISC-V, rd in the top bits):
  //   R: rd[31:27] rs1[26:22] rs2[21:17] funct10[16:7] opcode[6:0]
  //   I: rd[31:27] rs1[26:22] imm[21:10] funct3[9:7]  opcode[6:0]
  //   B: imm[11:7]@[31:27] rs1[26:22] rs2[21:17] imm[6:0]@[16:10] funct3 opcode
  //   L: rd[31:27] imm20[26:7] opcode[6:0]
  //   J: offset25[31:7] opcode[6:0]
  // ---------------------------------------------------------------------
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_OP     = 7'b0110011;
  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_J      = 7'b1100111;
  localparam logic [6:0] OP_JALR   = 7'b1101011;
  localparam logic [6:0] OP_JAL    = 7'b1101111;

  // The canonical no-op word: ADDI x0, x0, 0.
  localparam logic [XLEN-1:0] NOP_WORD = {25'd0, OP_IMM};

  // ---------------------------------------------------------------------
  // Microprogram state numbers. States of one instruction are consecutive;
  // only the first of each (the dispatch target) is named here.
  // ---------------------------------------------------------------------
  localparam logic [UPC_W-1:0] S_FETCH0   = 7'd0;   // 3 states
  localparam logic [UPC_W-1:0] S_NOP0     = 7'd3;   // 1
  localparam logic [UPC_W-1:0] S_ADD0     = 7'd4;   // 3
  localparam logic [UPC_W-1:0] S_SUB0     = 7'd7;   // 3
  localparam logic [UPC_W-1:0] S_SLT0     = 7'd10;  // 3
  localparam logic [UPC_W-1:0] S_SLTU0    = 7'd13;  // 3
  localparam logic [UPC_W-1:0] S_ADDI0    = 7'd16;  // 3
  localparam logic [UPC_W-1:0] S_SLTI0    = 7'd19;  // 3
  localparam logic [UPC_W-1:0] S_SLTIU0   = 7'd22;  // 3
  localparam logic [UPC_W-1:0] S_LW0      = 7'd25;  // 5
  localparam logic [UPC_W-1:0] S_SW0      = 7'd30;  // 5
  localparam logic [UPC_W-1:0] S_LUI0     = 7'd35;  // 1
  localparam logic [UPC_W-1:0] S_J0       = 7'd36;  // 4
  localparam logic [UPC_W-1:0] S_JAL0     = 7'd40;  // 5
  localparam logic [UPC_W-1:0] S_JALR0    = 7'd45;  // 6
  localparam logic [UPC_W-1:0] S_BEQ0     = 7'd51;  // 4
  localparam logic [UPC_W-1:0] S_BNE0     = 7'd55;  // 4
  localparam logic [UPC_W-1:0] S_BLT0     = 7'd59;  // 4
  localparam logic [UPC_W-1:0] S_BGE0     = 7'd63;  // 4
  localparam logic [UPC_W-1:0] S_BLTU0    = 7'd67;  // 4
  localparam logic [UPC_W-1:0] S_BGEU0    = 7'd71;  // 4
  localparam logic [UPC_W-1:0] S_BRTAKEN0 = 7'd75;  // 4
  localparam logic [UPC_W-1:0] S_ILLEGAL0 = 7'd79;  // 1

endpackage

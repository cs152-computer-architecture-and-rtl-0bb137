// Dispatch decoder: first microcode state of the instruction in IR.
//
// Combinational. When the microsequencer executes a dispatch microbranch
// (uBr = D) it jumps to the state this module returns: the state named after
// the instruction with a "0" appended (ADD0, LW0, BEQ0 ...), as in the
// source design. The decoder looks at the opcode IR[6:0] and at the
// function field (funct3 = IR[9:7], or the full funct10 = IR[16:7] for
// register-register operations). The word ADDI x0,x0,0 goes to NOP0.
// Words that are not in the implemented subset go to ILLEGAL0.
//
// The opcode and function values are those of the early RISC-V encoding
// (own choice; the source design points to the ISA manual for them). The
// subset is what the source design's ALU operations can carry out: ADD, SUB,
// SLT, SLTU, ADDI, SLTI, SLTIU, LW, SW, LUI, J, JAL, JALR and the six
// conditional branches.
module dispatch
  import bus_riscv_pkg::*;
(
  input  logic [31:0]      ir,
  output logic [UPC_W-1:0] target
);

  logic [6:0] opcode;
  logic [2:0] funct3;
  logic [9:0] funct10;

  assign opcode  = ir[6:0];
  assign funct3  = ir[9:7];
  assign funct10 = ir[16:7];

  always_comb begin
    target = S_ILLEGAL0;
    if (ir == NOP_WORD) begin
      target = S_NOP0;
    end else begin
      unique case (opcode)
        OP_OP: begin
          unique case (funct10)
            10'b0000000_000: target = S_ADD0;
            10'b1000000_000: target = S_SUB0;
            10'b0000000_010: target = S_SLT0;
            10'b0000000_011: target = S_SLTU0;
            default:         target = S_ILLEGAL0;
          endcase
        end
        OP_IMM: begin
          unique case (funct3)
            3'b000:  target = S_ADDI0;
            3'b010:  target = S_SLTI0;
            3'b011:  target = S_SLTIU0;
            default: target = S_ILLEGAL0;
          endcase
        end
        OP_LOAD:  target = (funct3 == 3'b010) ? S_LW0 : S_ILLEGAL0;
        OP_STORE: target = (funct3 == 3'b010) ? S_SW0 : S_ILLEGAL0;
        OP_LUI:   target = S_LUI0;
        OP_J:     target = S_J0;
        OP_JAL:   target = S_JAL0;
        OP_JALR:  target = (funct3 <= 3'b010) ? S_JALR0 : S_ILLEGAL0;
        OP_BRANCH: begin
          unique case (funct3)
            3'b000:  target = S_BEQ0;
            3'b001:  target = S_BNE0;
            3'b100:  target = S_BLT0;
            3'b101:  target = S_BGE0;
            3'b110:  target = S_BLTU0;
            3'b111:  target = S_BGEU0;
            default: target = S_ILLEGAL0;
          endcase
        end
        default: target = S_ILLEGAL0;
      endcase
    end
  end

endmodule

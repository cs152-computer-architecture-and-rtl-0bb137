// ALU of the bus-based RV32 processor.
//
// Purely combinational. Operand a comes from register A and operand b from
// register B; alu_op picks one of the ten operations the design defines:
// COPY_A, COPY_B, A+1, A-1, A+4, A-4, A+B, A-B, signed A<B and unsigned A<B.
// The two comparisons return 1 or 0 in a full-width word. The zero output is
// 1 exactly when the result is all zeros; the microsequencer uses it for its
// EZ/NZ conditional microbranches, whether or not the result is put on the bus.
//
// The operation list and the zero flag follow the source design. Operation
// codes outside the list give a result of 0 (own choice).
module alu
  import bus_riscv_pkg::*;
#(
  parameter int unsigned W = XLEN
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  aluop_e       alu_op,
  output logic [W-1:0] result,
  output logic         zero
);

  always_comb begin
    unique case (alu_op)
      ALU_COPY_A:  result = a;
      ALU_COPY_B:  result = b;
      ALU_INC_A_1: result = a + W'(1);
      ALU_DEC_A_1: result = a - W'(1);
      ALU_INC_A_4: result = a + W'(4);
      ALU_DEC_A_4: result = a - W'(4);
      ALU_ADD:     result = a + b;
      ALU_SUB:     result = a - b;
      ALU_SLT:     result = W'($signed(a) < $signed(b));
      ALU_SLTU:    result = W'(a < b);
      default:     result = '0;
    endcase
  end

  assign zero = (result == '0);

endmodule

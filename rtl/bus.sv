// The shared 32-bit bus and its four drivers.
//
// In the source design every component that writes the bus does so through
// a tri-state buffer: the immediate extender (enImm), the ALU (enALU), the
// register file (its read enable) and the memory (its read enable). This
// module models those buffers the way they are built on chip today: each
// source's word is gated by its enable and the gated words are ORed. With
// one enable high the bus carries that source's word; with none high the
// bus is 0 (the source design leaves it undefined). Driving with more than
// one enable is a microcode error; bus_riscv asserts against it.
module bus #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] imm_data,
  input  logic         en_imm,
  input  logic [W-1:0] alu_data,
  input  logic         en_alu,
  input  logic [W-1:0] reg_data,
  input  logic         en_reg_drive,
  input  logic [W-1:0] mem_data,
  input  logic         en_mem_drive,
  output logic [W-1:0] bus_out
);

  always_comb begin
    bus_out = '0;
    if (en_imm)       bus_out |= imm_data;
    if (en_alu)       bus_out |= alu_data;
    if (en_reg_drive) bus_out |= reg_data;
    if (en_mem_drive) bus_out |= mem_data;
  end

endmodule

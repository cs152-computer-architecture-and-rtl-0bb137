// Self-checking test of the dispatch decoder: each implemented instruction,
// with random register and immediate fields, must map to its own first
// microcode state; NOP to NOP0; unimplemented opcodes and function codes to
// ILLEGAL0. Expected states are the numbered states of the microprogram.
module tb_dispatch;
  import bus_riscv_pkg::*;

  logic [31:0] ir;
  logic [6:0]  target;
  int checks = 0, failures = 0;

  dispatch dut (.ir(ir), .target(target));

  task automatic try(logic [31:0] w, int exp, string name);
    ir = w;
    #1;
    checks++;
    if (target !== 7'(exp)) begin
      failures++;
      $display("FAIL: %s ir=%h -> %0d, expected %0d", name, w, target, exp);
    end
  endtask

  // Random rd/rs1/rs2/immediate bits around fixed funct and opcode fields.
  function automatic logic [31:0] w(logic [9:0] f10, logic [6:0] op, bit f3_only);
    logic [31:0] r = $urandom();
    if (f3_only) return {r[31:10], f10[2:0], op};
    return {r[31:17], f10, op};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(32'h0000_0013, 3, "NOP");
    for (int n = 0; n < 200; n++) begin
      try(w(10'b0000000_000, 7'h33, 0),  4, "ADD");
      try(w(10'b1000000_000, 7'h33, 0),  7, "SUB");
      try(w(10'b0000000_010, 7'h33, 0), 10, "SLT");
      try(w(10'b0000000_011, 7'h33, 0), 13, "SLTU");
      try(w(10'b0000000_001, 7'h33, 0), 79, "SLL (not implemented)");
      try(w(10'd0, 7'h13, 1) | 32'h0800_0000, 16, "ADDI");
      try(w(10'd2, 7'h13, 1), 19, "SLTI");
      try(w(10'd3, 7'h13, 1), 22, "SLTIU");
      try(w(10'd4, 7'h13, 1), 79, "XORI (not implemented)");
      try(w(10'd2, 7'h03, 1), 25, "LW");
      try(w(10'd0, 7'h03, 1), 79, "LB (not implemented)");
      try(w(10'd2, 7'h23, 1), 30, "SW");
      try(w(10'd0, 7'h23, 1), 79, "SB (not implemented)");
      try(w(10'($urandom()), 7'h37, 0), 35, "LUI");
      try(w(10'($urandom()), 7'h67, 0), 36, "J");
      try(w(10'($urandom()), 7'h6f, 0), 40, "JAL");
      try(w(10'($urandom_range(2)), 7'h6b, 1), 45, "JALR");
      try(w(10'd0, 7'h63, 1), 51, "BEQ");
      try(w(10'd1, 7'h63, 1), 55, "BNE");
      try(w(10'd4, 7'h63, 1), 59, "BLT");
      try(w(10'd5, 7'h63, 1), 63, "BGE");
      try(w(10'd6, 7'h63, 1), 67, "BLTU");
      try(w(10'd7, 7'h63, 1), 71, "BGEU");
      try(w(10'd2, 7'h63, 1), 79, "branch funct3 2");
      try(w(10'($urandom()), 7'h7f, 0), 79, "unknown opcode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

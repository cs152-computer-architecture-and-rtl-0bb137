// Self-checking test of the ALU: every operation on corner values and on
// random operands, result and zero flag against values computed here.
module tb_alu;
  import bus_riscv_pkg::*;

  logic [31:0] a, b, result;
  aluop_e      op;
  logic        zero;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .alu_op(op), .result(result), .zero(zero));

  function automatic logic [31:0] model(aluop_e o, logic [31:0] x, logic [31:0] y);
    case (o)
      ALU_COPY_A:  return x;
      ALU_COPY_B:  return y;
      ALU_INC_A_1: return x + 1;
      ALU_DEC_A_1: return x - 1;
      ALU_INC_A_4: return x + 4;
      ALU_DEC_A_4: return x - 4;
      ALU_ADD:     return x + y;
      ALU_SUB:     return x - y;
      ALU_SLT:     return (int'(x) < int'(y)) ? 1 : 0;
      default:     return (longint'(x) < longint'(y)) ? 1 : 0;
    endcase
  endfunction

  task automatic try(aluop_e o, logic [31:0] x, logic [31:0] y);
    logic [31:0] exp;
    op = o; a = x; b = y;
    #1;
    exp = model(o, x, y);
    checks++;
    if (result !== exp || zero !== (exp == 0)) begin
      failures++;
      $display("FAIL: op=%s a=%h b=%h result=%h zero=%b expected %h", o.name(), x, y, result, zero, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'h2, 32'h7fff_ffff, 32'h8000_0000, 32'hffff_ffff};
    // The example of the description: A=2, B=2, SUB gives 0 and zero = 1.
    try(ALU_SUB, 2, 2);
    for (int o = 0; o <= 9; o++)
      foreach (corner[i]) foreach (corner[j]) try(aluop_e'(o), corner[i], corner[j]);
    for (int n = 0; n < 2000; n++) try(aluop_e'($urandom_range(9)), $urandom(), $urandom());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

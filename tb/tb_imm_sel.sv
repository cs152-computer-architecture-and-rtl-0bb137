// Self-checking test of the immediate selector: for random instruction
// words, each of the five immediate types is rebuilt here from its field
// positions with arithmetic (not bit slicing) and compared.
module tb_imm_sel;
  import bus_riscv_pkg::*;

  logic [31:0] ir, imm;
  immsel_e     sel;
  int checks = 0, failures = 0;

  imm_sel dut (.ir(ir), .sel(sel), .imm(imm));

  function automatic int signed field(logic [31:0] w, int hi, int lo, bit sgn);
    longint v = (longint'(w) >> lo) & ((64'd1 << (hi - lo + 1)) - 1);
    if (sgn && v >= (64'd1 << (hi - lo))) v -= (64'd1 << (hi - lo + 1));
    return int'(v);
  endfunction

  task automatic try(logic [31:0] w, immsel_e s);
    int signed exp;
    ir = w; sel = s;
    #1;
    case (s)
      IMM_I:  exp = field(w, 21, 10, 1);
      IMM_L:  exp = field(w, 26, 7, 0) * 4096;
      IMM_J:  exp = field(w, 31, 7, 1) * 2;
      IMM_BS: exp = field(w, 31, 27, 1) * 128 + field(w, 16, 10, 0);
      default: exp = (field(w, 31, 27, 1) * 128 + field(w, 16, 10, 0)) * 2;
    endcase
    checks++;
    if (imm !== 32'(exp)) begin
      failures++;
      $display("FAIL: sel=%s ir=%h imm=%h expected %h", s.name(), w, imm, 32'(exp));
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
    for (int s = 0; s <= 4; s++) begin
      try(32'h0, immsel_e'(s));
      try(32'hffff_ffff, immsel_e'(s));
      try(32'h8000_0000, immsel_e'(s));
      try(32'h0020_0000, immsel_e'(s));
      for (int n = 0; n < 500; n++) try($urandom(), immsel_e'(s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

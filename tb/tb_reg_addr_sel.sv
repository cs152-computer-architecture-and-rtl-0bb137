// Self-checking test of the RegSel multiplexer: PC gives 32, RA gives 1,
// rd/rs1/rs2 give the zero-padded fields of random instruction words.
module tb_reg_addr_sel;
  import bus_riscv_pkg::*;

  logic [31:0] ir;
  regsel_e     sel;
  logic [5:0]  addr;
  int checks = 0, failures = 0;

  reg_addr_sel dut (.ir(ir), .sel(sel), .addr(addr));

  task automatic try(logic [31:0] w, regsel_e s, int exp);
    ir = w; sel = s;
    #1;
    checks++;
    if (addr !== 6'(exp)) begin
      failures++;
      $display("FAIL: sel=%s ir=%h addr=%0d expected %0d", s.name(), w, addr, exp);
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
    for (int n = 0; n < 500; n++) begin
      logic [31:0] w = $urandom();
      try(w, RS_PC, 32);
      try(w, RS_RA, 1);
      try(w, RS_RD,  int'(w / (1 << 27)) % 32);
      try(w, RS_RS1, int'(w / (1 << 22)) % 32);
      try(w, RS_RS2, int'(w / (1 << 17)) % 32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

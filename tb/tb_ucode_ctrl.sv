// Self-checking test of the microsequencer. Random instruction words (all
// implemented ones plus unimplemented ones) are placed in IR whenever the
// controller dispatches, and zero and busy are random every cycle. Each
// cycle the next uPC is predicted from the current microinstruction and the
// inputs by the six rules N, J, EZ, NZ, D, S, with the dispatch target taken
// from a table kept here. Each rule, and both outcomes of EZ, NZ and S (nine in all), must
// occur. Reset must put the uPC at FETCH0.
module tb_ucode_ctrl;
  import bus_riscv_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [31:0] ir = 32'h13;
  logic        zero = 0, busy = 0;
  logic [6:0]  upc, expected;
  uinst_t      u;
  int checks = 0, failures = 0;
  int seen [string];

  ucode_ctrl dut (.clk(clk), .rst_n(rst_n), .ir(ir), .zero(zero), .busy(busy), .upc(upc), .uinst(u));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [31:0] words [13] = '{32'h0000_00e3, 32'h0000_0013, 32'h0000_0033, 32'h0001_0033, 32'h0000_0113,
                              32'h0000_0103, 32'h0000_0123, 32'h0000_0037, 32'h0000_0067,
                              32'h0000_006f, 32'h0000_006b, 32'h0000_03e3, 32'h0000_007f};
  int          firsts [13] = '{55, 3, 4, 7, 19, 25, 30, 35, 36, 40, 45, 71, 79};
  int          pick;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pick = 0;
    #12;
    check(upc == 0, "reset to FETCH0");
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      zero = 1'($urandom_range(1));
      busy = 1'($urandom_range(1));
      // Leave the stopped state now and then.
      if (upc == 79 && $urandom_range(3) == 0) begin
        rst_n = 0; #1; rst_n = 1;
        check(upc == 0, "asynchronous reset");
      end
      if (upc == 1) begin
        pick = $urandom_range(12);
        ir = words[pick] | ({$urandom()} & 32'hffff_0000 & ((pick == 2 || pick == 3) ? 32'hfffe_0000 : 32'hffff_ffff));
        if (pick == 1) ir = words[1];
      end
      #1;
      case (u.ubr)
        UBR_N:  begin expected = upc + 1; seen["N"]++; end
        UBR_J:  begin expected = u.next_state; seen["J"]++; end
        UBR_EZ: begin expected = zero ? u.next_state : upc + 1; seen[zero ? "EZ1" : "EZ0"]++; end
        UBR_NZ: begin expected = !zero ? u.next_state : upc + 1; seen[zero ? "NZ0" : "NZ1"]++; end
        UBR_D:  begin expected = 7'(firsts[pick]); seen["D"]++; end
        default: begin expected = busy ? upc : upc + 1; seen[busy ? "S1" : "S0"]++; end
      endcase
      @(posedge clk); #1;
      check(upc == expected, $sformatf("uPC %0d, expected %0d", upc, expected));
    end
    foreach (seen[k]) $display("rule %s used %0d times", k, seen[k]);
    check(seen.size() == 9, $sformatf("only %0d of 9 rule outcomes seen", seen.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

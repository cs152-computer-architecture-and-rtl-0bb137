// Self-checking test of the load-enabled register: reset value, loading
// only when ld is 1, holding otherwise, and a one-cycle delay from bus to q.
module tb_ld_reg;
  logic        clk = 0, rst_n = 0, ld = 0;
  logic [31:0] d = '0, q, expected;
  int checks = 0, failures = 0;

  ld_reg #(.W(32)) dut (.clk(clk), .rst_n(rst_n), .ld(ld), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    check(q == 0, "reset value");
    @(negedge clk) rst_n = 1;
    expected = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      ld = 1'($urandom_range(1));
      d  = $urandom();
      // Before the edge q still holds the old value.
      check(q == expected, $sformatf("q=%h before edge, expected %h", q, expected));
      if (ld) expected = d;
      @(posedge clk); #1;
      check(q == expected, $sformatf("q=%h after edge, expected %h", q, expected));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

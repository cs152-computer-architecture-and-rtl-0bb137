// Self-checking test of the register file: PC reset value, the enReg/RegWr
// rules (write = RegWr AND enReg, bus drive = NOT RegWr AND enReg),
// combinational reads, writes taking effect at the clock edge, x0 reading 0,
// all 64 addresses, against a model array kept here.
module tb_regfile;
  logic        clk = 0, rst_n = 0;
  logic [5:0]  addr = '0;
  logic        reg_wr = 0, en_reg = 0;
  logic [31:0] din = '0, dout;
  logic        drive;
  logic [31:0] model [64];
  int checks = 0, failures = 0;

  regfile #(.RESET_PC(32'h0000_1000)) dut (
    .clk(clk), .rst_n(rst_n), .addr(addr), .reg_wr(reg_wr), .en_reg(en_reg),
    .din(din), .dout(dout), .drive(drive)
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    addr = 6'd32; #1;
    check(dout == 32'h1000, "PC reset value");
    @(negedge clk) rst_n = 1;
    // Fill every register through the bus port.
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      addr = 6'(i); reg_wr = 1; en_reg = 1; din = $urandom();
      #1 check(drive == 0, "no bus drive during a write");
      model[i] = (i == 0) ? 32'h0 : din;
    end
    @(negedge clk) en_reg = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      addr   = 6'($urandom_range(63));
      reg_wr = 1'($urandom_range(1));
      en_reg = 1'($urandom_range(3) != 0);
      din    = $urandom();
      #1;
      check(drive == (en_reg && !reg_wr), "drive = enReg AND NOT RegWr");
      check(dout == model[addr], $sformatf("read r%0d = %h, expected %h", addr, dout, model[addr]));
      // A write must not show before the edge.
      if (en_reg && reg_wr && addr != 0) begin
        addr = addr;  // same address
        @(posedge clk); #1;
        model[addr] = din;
        check(dout == din, $sformatf("r%0d not written", addr));
      end
    end
    // Read with addr changing and no clock edge: combinational.
    @(negedge clk) en_reg = 1; reg_wr = 0;
    for (int i = 0; i < 64; i++) begin
      addr = 6'(i); #1;
      check(dout == model[i], $sformatf("combinational read r%0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

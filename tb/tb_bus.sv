// Self-checking test of the shared bus: with exactly one enable high the
// bus carries that driver's word, with none it is 0.
module tb_bus;
  logic [31:0] d [4];
  logic        en [4];
  logic [31:0] bus_out;
  int checks = 0, failures = 0;

  bus dut (.imm_data(d[0]), .en_imm(en[0]), .alu_data(d[1]), .en_alu(en[1]),
           .reg_data(d[2]), .en_reg_drive(en[2]), .mem_data(d[3]), .en_mem_drive(en[3]),
           .bus_out(bus_out));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int who = $urandom_range(4);   // 4 = nobody
      foreach (d[i]) begin d[i] = $urandom(); en[i] = (i == who); end
      #1;
      checks++;
      if (bus_out !== ((who == 4) ? 32'h0 : d[who])) begin
        failures++;
        $display("FAIL: driver %0d, bus %h", who, bus_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

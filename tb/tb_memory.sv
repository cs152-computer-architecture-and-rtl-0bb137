// Self-checking test of the memory: busy stays high for exactly LATENCY
// cycles of an access and falls in the cycle the access completes; read
// data is valid in that cycle; a write lands only at the edge that ends the
// access; reads are combinational in MA; MA is a byte address. The default
// instance (LATENCY 1, 4096 words) and small ones with LATENCY 0 and 3 are
// checked against a model array.
module tb_memory;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One memory instance with its own stimulus and model.
  logic [31:0] ma [3], din [3], dout [3];
  logic        mem_wr [3], en_mem [3], drive [3], busy [3];
  bit          done [3];

  memory dut0 (.clk(clk), .rst_n(rst_n), .ma(ma[0]), .mem_wr(mem_wr[0]), .en_mem(en_mem[0]),
               .din(din[0]), .dout(dout[0]), .drive(drive[0]), .busy(busy[0]));
  memory #(.WORDS(64), .LATENCY(0)) dut1 (.clk(clk), .rst_n(rst_n), .ma(ma[1]),
               .mem_wr(mem_wr[1]), .en_mem(en_mem[1]), .din(din[1]), .dout(dout[1]),
               .drive(drive[1]), .busy(busy[1]));
  memory #(.WORDS(64), .LATENCY(3)) dut2 (.clk(clk), .rst_n(rst_n), .ma(ma[2]),
               .mem_wr(mem_wr[2]), .en_mem(en_mem[2]), .din(din[2]), .dout(dout[2]),
               .drive(drive[2]), .busy(busy[2]));

  task automatic exercise(int k, int words, int lat);
    logic [31:0] model [int];
    int idx;
    en_mem[k] = 0; mem_wr[k] = 0; ma[k] = 0; din[k] = 0;
    wait (rst_n);
    // Initialise all words with single writes.
    for (int i = 0; i < words; i++) begin
      @(negedge clk);
      ma[k] = 32'(i * 4); din[k] = $urandom(); mem_wr[k] = 1; en_mem[k] = 1;
      model[i] = din[k];
      for (int c = 0; c < lat; c++) begin
        #1 check(busy[k] == 1, $sformatf("m%0d busy during write cycle %0d", k, c));
        @(negedge clk);
      end
      #1 check(busy[k] == 0, $sformatf("m%0d busy low at end of write", k));
      check(drive[k] == 0, "no bus drive during a write");
      @(negedge clk) en_mem[k] = 0;
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      idx = $urandom_range(words - 1);
      ma[k] = 32'(idx * 4) | 32'($urandom_range(3));
      mem_wr[k] = 1'($urandom_range(1));
      din[k] = $urandom();
      en_mem[k] = 1;
      for (int c = 0; c < lat; c++) begin
        #1 check(busy[k] == 1, $sformatf("m%0d busy in cycle %0d of %0d", k, c, lat));
        if (mem_wr[k]) begin
          // Change the written value while busy: only the last one counts.
          din[k] = $urandom();
        end
        @(negedge clk);
      end
      #1;
      check(busy[k] == 0, $sformatf("m%0d busy still high after %0d cycles", k, lat));
      check(drive[k] == !mem_wr[k], "drive = enMem AND NOT MemWr");
      if (mem_wr[k]) model[idx] = din[k];
      else check(dout[k] == model[idx],
                 $sformatf("m%0d read [%0d] = %h, expected %h", k, idx, dout[k], model[idx]));
      @(negedge clk);
      en_mem[k] = 0;
      // Idle cycle: busy low whatever MA holds.
      #1 check(busy[k] == 0, "busy low when not enabled");
    end
    // Read back everything.
    for (int i = 0; i < words; i++) begin
      @(negedge clk);
      ma[k] = 32'(i * 4); mem_wr[k] = 0; en_mem[k] = 1;
      for (int c = 0; c < lat; c++) @(negedge clk);
      #1 check(dout[k] == model[i], $sformatf("m%0d final [%0d]", k, i));
      @(negedge clk) en_mem[k] = 0;
    end
    done[k] = 1;
  endtask

  initial fork
    exercise(0, 256, 1);
    exercise(1, 64, 0);
    exercise(2, 64, 3);
  join_none

  initial begin
    #12 rst_n = 1;
    wait (done[0] && done[1] && done[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

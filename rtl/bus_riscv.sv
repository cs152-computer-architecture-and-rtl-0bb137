// Bus-based, microcoded RV32 processor (top level).
//
// All datapath components share one 32-bit bus. Four of them can drive it:
// the immediate extender (enImm), the ALU (enALU), the register file and the
// memory. Four edge-triggered registers load from it: IR (instruction), A
// and B (ALU operands) and MA (memory address). The register file holds the
// 32 GPRs, the PC (register 32) and special registers behind a 6-bit address
// chosen by the RegSel multiplexer; the memory is addressed by MA and raises
// busy while an access is unfinished. A microcode controller produces every
// control signal each cycle and steps through its microprogram with the
// N/J/EZ/NZ/D/S microbranches, using the ALU zero flag, the memory busy flag
// and the IR for dispatch. An instruction takes 3 + LATENCY cycles of fetch
// plus its own microcode (and LATENCY more cycles per memory access).
//
// The structure follows the source design. Own choices: the bus is an
// AND-OR multiplexer instead of tri-state buffers, the reset (asynchronous,
// active low) starts the machine at FETCH0 with PC = RESET_PC, and memory
// size and latency are parameters. The interrupt request line of the source
// design has no described function and is not present.
//
// Ports: clk, rst_n; the bus value, the uPC, the IR and the zero and busy
// flags are brought out for observation.
module bus_riscv
  import bus_riscv_pkg::*;
#(
  parameter int unsigned     MEM_WORDS   = 4096,
  parameter int unsigned     MEM_LATENCY = 1,
  parameter logic [XLEN-1:0] RESET_PC    = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [XLEN-1:0]  bus_o,
  output logic [UPC_W-1:0] upc_o,
  output logic [XLEN-1:0]  ir_o,
  output logic             zero_o,
  output logic             busy_o
);

  uinst_t              ctl;
  logic [XLEN-1:0]     bus_val;
  logic [XLEN-1:0]     ir, a, b, ma;
  logic [XLEN-1:0]     imm, alu_res, reg_dout, mem_dout;
  logic                zero, busy, reg_drive, mem_drive;
  logic [RADDR_W-1:0]  reg_addr;
  logic [UPC_W-1:0]    upc;

  ucode_ctrl u_ctrl (
    .clk   (clk),
    .rst_n (rst_n),
    .ir    (ir),
    .zero  (zero),
    .busy  (busy),
    .upc   (upc),
    .uinst (ctl)
  );

  ld_reg #(.W(XLEN)) u_ir (.clk(clk), .rst_n(rst_n), .ld(ctl.ld_ir), .d(bus_val), .q(ir));
  ld_reg #(.W(XLEN)) u_a  (.clk(clk), .rst_n(rst_n), .ld(ctl.ld_a),  .d(bus_val), .q(a));
  ld_reg #(.W(XLEN)) u_b  (.clk(clk), .rst_n(rst_n), .ld(ctl.ld_b),  .d(bus_val), .q(b));
  ld_reg #(.W(XLEN)) u_ma (.clk(clk), .rst_n(rst_n), .ld(ctl.ld_ma), .d(bus_val), .q(ma));

  imm_sel u_imm (
    .ir  (ir),
    .sel (ctl.imm_sel),
    .imm (imm)
  );

  alu #(.W(XLEN)) u_alu (
    .a      (a),
    .b      (b),
    .alu_op (ctl.alu_op),
    .result (alu_res),
    .zero   (zero)
  );

  reg_addr_sel u_regsel (
    .ir   (ir),
    .sel  (ctl.reg_sel),
    .addr (reg_addr)
  );

  regfile #(.W(XLEN), .RESET_PC(RESET_PC)) u_rf (
    .clk    (clk),
    .rst_n  (rst_n),
    .addr   (reg_addr),
    .reg_wr (ctl.reg_wr),
    .en_reg (ctl.en_reg),
    .din    (bus_val),
    .dout   (reg_dout),
    .drive  (reg_drive)
  );

  memory #(.W(XLEN), .WORDS(MEM_WORDS), .LATENCY(MEM_LATENCY)) u_mem (
    .clk    (clk),
    .rst_n  (rst_n),
    .ma     (ma),
    .mem_wr (ctl.mem_wr),
    .en_mem (ctl.en_mem),
    .din    (bus_val),
    .dout   (mem_dout),
    .drive  (mem_drive),
    .busy   (busy)
  );

  bus #(.W(XLEN)) u_bus (
    .imm_data     (imm),
    .en_imm       (ctl.en_imm),
    .alu_data     (alu_res),
    .en_alu       (ctl.en_alu),
    .reg_data     (reg_dout),
    .en_reg_drive (reg_drive),
    .mem_data     (mem_dout),
    .en_mem_drive (mem_drive),
    .bus_out      (bus_val)
  );

  // At most one component may drive the bus in any cycle.
  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({ctl.en_imm, ctl.en_alu, reg_drive, mem_drive}))
    else $error("bus driven by more than one component");

  assign bus_o  = bus_val;
  assign upc_o  = upc;
  assign ir_o   = ir;
  assign zero_o = zero;
  assign busy_o = busy;

endmodule

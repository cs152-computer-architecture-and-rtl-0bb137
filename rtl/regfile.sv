// Register file: 32 GPRs, the PC and further special-purpose registers.
//
// One address input and one data port to the bus. The two controls work as
// in the source design: with en_reg = 0 nothing happens; with en_reg = 1 and
// reg_wr = 0 the addressed register is read and drives the bus; with
// en_reg = 1 and reg_wr = 1 the bus value is written into the addressed
// register at the next rising clock edge. So the write enable is
// reg_wr AND en_reg and the bus-driver enable is (NOT reg_wr) AND en_reg.
// Reads are combinational from addr to dout.
//
// The 6-bit address gives NREGS = 64 entries; entry 32 is the PC and entry 1
// the return address register, as in the source design. Own choices: x0
// always reads 0 and ignores writes (as the RISC-V ISA requires), and reset
// sets only the PC, to RESET_PC; the other entries are not reset.
// The bus-driver output is modelled as a data word plus an enable (drive);
// the bus module combines the drivers.
module regfile
  import bus_riscv_pkg::*;
#(
  parameter int unsigned       W        = XLEN,
  parameter int unsigned       NREGS    = 64,
  parameter logic [XLEN-1:0]   RESET_PC = '0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [RADDR_W-1:0] addr,
  input  logic               reg_wr,
  input  logic               en_reg,
  input  logic [W-1:0]       din,
  output logic [W-1:0]       dout,
  output logic               drive
);

  logic [W-1:0] regs [NREGS];
  logic         we;

  assign we    = reg_wr & en_reg;
  assign drive = ~reg_wr & en_reg;
  assign dout  = (addr == '0) ? '0 : regs[addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs[REG_PC] <= W'(RESET_PC);
    end else if (we && addr != '0) begin
      regs[addr] <= din;
    end
  end

endmodule

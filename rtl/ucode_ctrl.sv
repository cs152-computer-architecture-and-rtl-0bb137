// Microcode controller: microprogram counter, microcode ROM and dispatch.
//
// The uPC register selects a microinstruction from ucode_rom; its control
// fields drive the datapath for the cycle (output uinst). At the rising
// clock edge the uPC takes the next state that the microbranch field picks:
//   N   uPC + 1
//   J   Next State
//   EZ  Next State if the ALU zero flag is 1, else uPC + 1
//   NZ  Next State if the ALU zero flag is 0, else uPC + 1
//   D   the first state of the instruction in IR (dispatch module)
//   S   uPC again while memory busy is 1, else uPC + 1
// These six rules follow the source design. Reset (asynchronous, active
// low, own choice) puts the uPC at FETCH0. Unused uBr codes act as N.
module ucode_ctrl
  import bus_riscv_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [31:0]      ir,
  input  logic             zero,
  input  logic             busy,
  output logic [UPC_W-1:0] upc,
  output uinst_t           uinst
);

  logic [UPC_W-1:0] upc_next;
  logic [UPC_W-1:0] upc_inc;
  logic [UPC_W-1:0] dispatch_target;

  ucode_rom u_rom (
    .addr  (upc),
    .uinst (uinst)
  );

  dispatch u_dispatch (
    .ir     (ir),
    .target (dispatch_target)
  );

  assign upc_inc = upc + UPC_W'(1);

  always_comb begin
    unique case (uinst.ubr)
      UBR_N:   upc_next = upc_inc;
      UBR_J:   upc_next = uinst.next_state;
      UBR_EZ:  upc_next = zero  ? uinst.next_state : upc_inc;
      UBR_NZ:  upc_next = !zero ? uinst.next_state : upc_inc;
      UBR_D:   upc_next = dispatch_target;
      UBR_S:   upc_next = busy  ? upc : upc_inc;
      default: upc_next = upc_inc;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) upc <= S_FETCH0;
    else        upc <= upc_next;
  end

endmodule

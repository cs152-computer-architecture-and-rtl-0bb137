// Load-enabled special register (used for IR, A, B and MA).
//
// A W-bit edge-triggered register whose input is the shared bus. When ld is
// 1 in a cycle, the bus value of that cycle appears on q after the next
// rising clock edge; when ld is 0 the register keeps its value. Several such
// registers may load the same bus value in one cycle.
//
// Edge triggering with a load enable follows the source design. The
// asynchronous active-low reset to 0 is this design's own choice.
module ld_reg #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ld,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (ld) q <= d;
  end

endmodule

// Main memory of the bus-based RV32 processor.
//
// Works like the register file, but its address comes from the MA register:
// a read puts the word at MA on dout combinationally (drive = en_mem AND NOT
// mem_wr), a write stores the bus value at MA on a rising clock edge
// (en_mem AND mem_wr). Unlike the register file, an access can take more than
// one cycle; busy says the access is not finished yet, and the microcode
// spins (uBr = S) until busy falls.
//
// Timing (this design's choice; the source design leaves the memory's
// latency open): every access takes LATENCY extra cycles. From the first
// cycle en_mem is high, busy is 1 for LATENCY cycles and 0 in the cycle
// after, which is the cycle in which the read data is valid and in which a
// write is committed at the clock edge that ends it. While busy, dout is 0.
// The counter restarts whenever en_mem is low and after every finished
// access, so a new access needs en_mem to be sampled again from a count of 0.
// LATENCY = 0 makes a single-cycle memory with busy always 0.
//
// MA holds a byte address; the memory holds WORDS 32-bit words and uses
// MA[AW+1:2] (aligned word access; higher address bits wrap). The low two
// bits and the bits above the array are not used. WORDS and LATENCY have no
// value in the source design. Contents are not reset.
module memory #(
  parameter int unsigned W       = 32,
  parameter int unsigned WORDS   = 4096,
  parameter int unsigned LATENCY = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] ma,
  input  logic         mem_wr,
  input  logic         en_mem,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout,
  output logic         drive,
  output logic         busy
);

  localparam int unsigned AW    = $clog2(WORDS);
  localparam int unsigned CNT_W = (LATENCY > 0) ? $clog2(LATENCY + 1) : 1;

  logic [W-1:0]     mem [WORDS];
  logic [AW-1:0]    idx;
  logic [CNT_W-1:0] cnt;

  assign idx   = ma[AW+1:2];
  assign busy  = en_mem && (32'(cnt) != LATENCY);
  assign drive = en_mem & ~mem_wr;
  assign dout  = busy ? '0 : mem[idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                cnt <= '0;
    else if (!en_mem || !busy) cnt <= '0;
    else                       cnt <= cnt + CNT_W'(1);
  end

  always_ff @(posedge clk) begin
    if (en_mem && mem_wr && !busy) mem[idx] <= din;
  end

endmodule

// line_memory: the IC3D parallel line memory.
//
// LINES lines of NUM_PE x PIX_W bits (64 x 3200 bits at the defaults), with
// one whole-line read port and one whole-line write port usable in the same
// clock, so the array can read one line and write another every cycle. The
// write port carries a per-PE mask: only columns whose mask bit is set are
// written, which lets guarded PEs leave their column untouched.
//
// Timing: the read is synchronous, rdata appears one clock after raddr/re.
// If the same line is written in the cycle it is read, the freshly written
// columns are forwarded into rdata (write-first), so a program can read a line
// in the instruction right after the one that stored it. Size follows the
// IC3D; port timing and forwarding are this design's choice.
module line_memory
  import ic3d_pkg::*;
#(
  parameter int unsigned NUM_PE = 320,
  parameter int unsigned LINES  = 64,
  localparam int unsigned AW    = (LINES > 1) ? $clog2(LINES) : 1
) (
  input  logic                         clk,
  input  logic                         re,
  input  logic [AW-1:0]                raddr,
  output logic [NUM_PE-1:0][PIX_W-1:0] rdata,
  input  logic [AW-1:0]                waddr,
  input  logic [NUM_PE-1:0]            wmask,
  input  logic [NUM_PE-1:0][PIX_W-1:0] wdata,
  output logic                         bypass_o   // forwarding happened (statistics)
);

  logic [NUM_PE-1:0][PIX_W-1:0] mem [LINES];

  always_ff @(posedge clk) begin
    for (int p = 0; p < NUM_PE; p++)
      if (wmask[p]) mem[waddr][p] <= wdata[p];
  end

  always_ff @(posedge clk) begin
    if (re)
      for (int p = 0; p < NUM_PE; p++)
        rdata[p] <= (wmask[p] && waddr == raddr) ? wdata[p] : mem[raddr][p];
  end

  assign bypass_o = re && (waddr == raddr) && (|wmask);

endmodule

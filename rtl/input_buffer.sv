// Internal input buffer of the softmax unit, present only with the REG storage option.
// The inputs read from the on-chip memory during stage 1 are written here, row by row, and
// stages 2 and 3 read them back from these registers instead of re-reading the memory. It is
// built from flip-flops (DEPTH rows of WIDTH bits), as the architecture calls for registers
// internal to the softmax unit; the separate write and read ports are this design's own.
// Timing: a write lands at the clock edge; rdata is registered, one cycle after re, so the
// datapath sees the same latency as from the memory.
module input_buffer #(
  parameter int WIDTH = 64,
  parameter int DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] regs [DEPTH];

  always_ff @(posedge clk) begin
    if (we) regs[waddr] <= wdata;
    if (re) rdata <= regs[raddr];
  end
endmodule

// Single-port on-chip memory holding the softmax inputs, one row of PA values (float16 or
// float32) per word, so that one read delivers the inputs the datapath consumes in one cycle. The architecture
// assumes such a memory with a one-cycle read latency; it is written here as an array that
// synthesis can map to an SRAM. One access per cycle: a write (we) or a read (re) at addr.
// Timing: rdata holds the word read in the previous cycle until the next read.
module input_mem #(
  parameter int WIDTH = 64,
  parameter int DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    else if (re) rdata <= mem[addr];
  end
endmodule

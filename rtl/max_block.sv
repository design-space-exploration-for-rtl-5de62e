// Block 1 of the softmax pipeline: finds X_max over all input rows (stage 1).
// A comparator tree of log2(PA) levels reduces each row of PA floating-point values to its maximum,
// with a pipeline register after every third comparator level; one more comparator (the "+1"
// level) compares that with the running maximum of the earlier rows, held in a register. This
// structure and the register spacing follow the source architecture; the clear/valid/last
// handshake is this design's own.
// Interface: clear (one cycle) restarts the search; in_valid marks a row, in_last its final row.
// Timing: a row enters every cycle; xmax_valid rises floor(log2(PA)/3) + 1 cycles after the last
// row was presented and stays high, with xmax stable, until the next clear.
module max_block
  import softmax_pkg::*;
#(
  parameter int PA = 4,
  parameter int EW = 5,    // exponent bits: 5 floating-point, 8 float32
  parameter int MW = 10,   // fraction bits: 10 floating-point, 23 float32
  localparam int W = 1 + EW + MW
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic           in_valid,
  input  logic           in_last,
  input  logic [PA-1:0][W-1:0] in_data,
  output logic [W-1:0]          xmax,
  output logic           xmax_valid
);
  logic  t_valid, t_last;
  logic [W-1:0] t_max;
  logic  have_any;

  fp_reduce_tree #(.PA(PA), .EW(EW), .MW(MW), .IS_ADD(1'b0), .REG_EVERY(3)) u_tree (
    .clk, .rst_n, .in_valid, .in_last, .in_data,
    .out_valid(t_valid), .out_last(t_last), .out_data(t_max)
  );

  // the extra comparator level across rows
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_any <= 1'b0;
      xmax_valid <= 1'b0;
      xmax <= '0;
    end else if (clear) begin
      have_any <= 1'b0;
      xmax_valid <= 1'b0;
    end else if (t_valid) begin
      have_any <= 1'b1;
      if (!have_any || fp_gt(32'(t_max), 32'(xmax), W)) xmax <= t_max;
      if (t_last) xmax_valid <= 1'b1;
    end
  end
endmodule

// Block 4 of the softmax pipeline: sums the exponentials of all inputs (end of stage 2).
// A floating-point adder tree of log2(PA) levels, with a pipeline register after every adder level as
// in the source architecture, reduces each row; an accumulator adder then adds the row sums of
// successive rows into a register. The clear/valid/last handshake is this design's own.
// Interface: clear restarts the sum; in_valid marks a row of PA exponentials, in_last the final row.
// Timing: one row per cycle; sum_valid rises log2(PA) + 1 cycles after the last row was
// presented and stays high, with sum stable, until the next clear.
module adder_tree
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
  output logic [W-1:0]          sum,
  output logic           sum_valid
);
  logic  t_valid, t_last;
  logic [W-1:0] t_sum, acc_next;

  fp_reduce_tree #(.PA(PA), .EW(EW), .MW(MW), .IS_ADD(1'b1), .REG_EVERY(1)) u_tree (
    .clk, .rst_n, .in_valid, .in_last, .in_data,
    .out_valid(t_valid), .out_last(t_last), .out_data(t_sum)
  );

  fp_addsub #(.EW(EW), .MW(MW)) u_acc (.a(sum), .b(t_sum), .sub(1'b0), .y(acc_next));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum <= '0;
      sum_valid <= 1'b0;
    end else if (clear) begin
      sum <= '0;
      sum_valid <= 1'b0;
    end else if (t_valid) begin
      sum <= acc_next;
      if (t_last) sum_valid <= 1'b1;
    end
  end
endmodule

// Block 6 of the softmax pipeline (stage 3): two rows of PA floating-point subtractors.
// presub recomputes X_M - X_max from the re-read inputs (instead of storing the stage-2
// differences in FIFOs); logsub then subtracts XLOG, giving X_M - X_max - XLOG for the final
// exponential units. Each row is followed by a register, as in the source architecture.
// Timing: one row per cycle, latency 2 cycles. xmax must be stable while rows enter; xlog must be
// stable from the cycle after the first row enters.
module presub_logsub
#(
  parameter int PA = 4,
  parameter int EW = 5,    // exponent bits: 5 floating-point, 8 float32
  parameter int MW = 10,   // fraction bits: 10 floating-point, 23 float32
  localparam int W = 1 + EW + MW
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic           in_last,
  input  logic [PA-1:0][W-1:0] in_x,
  input  logic [W-1:0]          xmax,
  input  logic [W-1:0]          xlog,
  output logic           out_valid,
  output logic           out_last,
  output logic [PA-1:0][W-1:0] out_d
);
  logic           p_valid, p_last;
  logic [PA-1:0][W-1:0] p_d;

  sub_array #(.PA(PA), .EW(EW), .MW(MW)) u_presub (
    .clk, .rst_n, .in_valid, .in_last, .in_a(in_x), .in_b(xmax),
    .out_valid(p_valid), .out_last(p_last), .out_d(p_d)
  );

  sub_array #(.PA(PA), .EW(EW), .MW(MW)) u_logsub (
    .clk, .rst_n, .in_valid(p_valid), .in_last(p_last), .in_a(p_d), .in_b(xlog),
    .out_valid, .out_last, .out_d
  );
endmodule

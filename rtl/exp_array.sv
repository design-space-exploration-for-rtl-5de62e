// Row of PA exponential units: block 3 (e^(X_L - X_max), stage 2) and block 7 (the final
// e^(X_M - X_max - XLOG), stage 3) of the softmax pipeline. The number of units equals the
// parallelism, as in the source architecture. Each lane is an exp_unit; a last flag travels with
// the valid flag. Timing: one row per cycle, latency 2 cycles.
module exp_array
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
  output logic           out_valid,
  output logic           out_last,
  output logic [PA-1:0][W-1:0] out_y
);
  logic [PA-1:0] lane_valid;
  logic [1:0]    last_pipe;

  for (genvar i = 0; i < PA; i++) begin : g_lane
    exp_unit #(.EW(EW), .MW(MW)) u_exp (.clk, .rst_n, .in_valid, .x(in_x[i]), .out_valid(lane_valid[i]), .y(out_y[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_pipe <= 2'b00;
    else last_pipe <= {last_pipe[0], in_valid & in_last};
  end

  assign out_valid = lane_valid[0];
  assign out_last = last_pipe[1];
endmodule

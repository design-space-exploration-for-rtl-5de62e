// Row of PA floating-point subtractors with an output register: block 2 of the softmax pipeline
// (X_L - X_max in stage 2) and the presub half of block 6 (the same difference recomputed in
// stage 3 instead of being stored). The number of subtractors equals the parallelism, as in the
// source architecture; the shared subtrahend and the valid/last flags are this design's own.
// Timing: one row per cycle, latency 1 cycle.
module sub_array
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
  input  logic [PA-1:0][W-1:0] in_a,
  input  logic [W-1:0]          in_b,
  output logic           out_valid,
  output logic           out_last,
  output logic [PA-1:0][W-1:0] out_d
);
  logic [PA-1:0][W-1:0] d;

  for (genvar i = 0; i < PA; i++) begin : g_lane
    fp_addsub #(.EW(EW), .MW(MW)) u_sub (.a(in_a[i]), .b(in_b), .sub(1'b1), .y(d[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_last <= in_valid & in_last;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) out_d <= d;
  end
endmodule

// Floating-point exponential unit, LUT-based piecewise-linear approximation of e^x for x <= 0.
// The input range [-8, 0] is split into 64 intervals of width 1/8. A float-to-fixed converter
// turns |x| into the 6-bit interval index floor(8*|x|), saturated to 63 so that every x below -8
// uses the last entry. The 64-entry LUT holds, per interval, the slope a and intercept
// (y_m - a*x_m) of the chord of e^x over that interval, in the datapath's format; the unit then
// forms a*x with a multiplier and adds the intercept. These follow the source architecture.
// This design's own choices: chords through both interval ends (so e^0 gives exactly 1.0), a
// result that comes out negative far below -8 is returned as +0, and a positive x (never produced
// by X_L - X_max) uses entry 0. The LUT is filled at elaboration from
//   a(n) = 8 * (e^(-n/8) - e^(-(n+1)/8)),   b(n) = e^(-(n+1)/8) + a(n) * (n+1)/8,
// each rounded to the nearest value of the format.
// Parameters: EW/MW exponent and fraction bits (5/10 float16, 8/23 float32).
// Timing: two pipeline stages. Stage 1 registers the LUT entry together with x; stage 2 registers
// the multiply-add result. out_valid follows in_valid by 2 cycles; a new x every cycle.
module exp_unit
  import softmax_lut_pkg::*;
#(
  parameter int EW = 5,
  parameter int MW = 10,
  localparam int W = 1 + EW + MW
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] x,
  output logic         out_valid,
  output logic [W-1:0] y
);
  localparam int BIAS = (1 << (EW - 1)) - 1;

  typedef logic [2*W-1:0] lut_t [64];

  function automatic lut_t build_lut();
    lut_t t;
    real  a, b, xp, xm;
    for (int n = 0; n < 64; n++) begin
      xp = -real'(n) / 8.0;
      xm = -real'(n + 1) / 8.0;
      a = ($exp(xp) - $exp(xm)) * 8.0;
      b = $exp(xm) - a * xm;
      t[n] = {W'(real_to_fp(a, EW, MW)), W'(real_to_fp(b, EW, MW))};
    end
    return t;
  endfunction

  localparam lut_t LUT = build_lut();

  logic [5:0]    idx;
  logic [MW:0]   shifted;
  logic [EW-1:0] ex;
  logic          v1;
  logic [W-1:0]  a1, b1, x1, ax, f;

  // float to fixed: 8*|x| = 1.m * 2^(e - BIAS + 3); keep its integer part, 6 bits, saturating
  always_comb begin
    ex = x[W-2:MW];
    shifted = '0;
    if (x[W-1] == 1'b0 || ex < EW'(BIAS - 3)) begin
      idx = 6'd0;
    end else if (ex >= EW'(BIAS + 3)) begin
      idx = 6'd63;
    end else begin
      shifted = {1'b1, x[MW-1:0]} >> (EW'(MW + BIAS - 3) - ex);
      idx = shifted[5:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1 <= in_valid;
      out_valid <= v1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      {a1, b1} <= LUT[idx];
      x1 <= x;
    end
  end

  fp_mul    #(.EW(EW), .MW(MW)) u_mul (.a(a1), .b(x1), .y(ax));
  fp_addsub #(.EW(EW), .MW(MW)) u_add (.a(ax), .b(b1), .sub(1'b0), .y(f));

  always_ff @(posedge clk) begin
    if (v1) y <= f[W-1] ? '0 : f;
  end
endmodule

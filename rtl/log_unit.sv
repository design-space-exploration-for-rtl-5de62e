// Floating-point natural-logarithm unit (block 5), computing XLOG = ln(sum of exponentials).
// It uses ln(2^(E-bias) * 1.m) = ln(2)*(E-bias) + ln(1.m): the exponent bits address a LUT of
// 2^EW entries holding ln(2)*(E-bias) (32 entries for float16), the top 6 fraction bits address a
// 64-entry LUT holding ln(1.m), and an adder sums the two, as in the source architecture. This
// design's own choices: the fraction LUT stores ln(1 + (k + 0.5)/64), the logarithm at the centre
// of bin k, and the sign bit is ignored (the input, a sum of exponentials, is positive). Both
// LUTs are filled at elaboration from these formulas, rounded to the nearest value of the format.
// Parameters: EW/MW exponent and fraction bits (5/10 float16, 8/23 float32).
// Timing: one registered stage; out_valid follows in_valid by 1 cycle.
module log_unit
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

  typedef logic [W-1:0] exp_lut_t [1 << EW];
  typedef logic [W-1:0] mant_lut_t [64];

  function automatic exp_lut_t build_exp_lut();
    exp_lut_t t;
    for (int e = 0; e < (1 << EW); e++) t[e] = W'(real_to_fp($ln(2.0) * real'(e - BIAS), EW, MW));
    return t;
  endfunction

  function automatic mant_lut_t build_mant_lut();
    mant_lut_t t;
    for (int k = 0; k < 64; k++) t[k] = W'(real_to_fp($ln(1.0 + (real'(k) + 0.5) / 64.0), EW, MW));
    return t;
  endfunction

  localparam exp_lut_t  EXP_LUT  = build_exp_lut();
  localparam mant_lut_t MANT_LUT = build_mant_lut();

  logic [W-1:0] exp_term, mant_term, sum;

  assign exp_term = EXP_LUT[x[W-2:MW]];
  assign mant_term = MANT_LUT[x[MW-1:MW-6]];

  fp_addsub #(.EW(EW), .MW(MW)) u_add (.a(exp_term), .b(mant_term), .sub(1'b0), .y(sum));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) y <= sum;
  end
endmodule

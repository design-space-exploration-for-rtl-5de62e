// Floating-point multiplier (combinational), used for the slope product a*x of the EXP unit.
// The significands (hidden bit included) are multiplied exactly, the product is normalised by at
// most one place, rounded to nearest-even with guard and sticky bits, and the exponents are added
// less the bias. Subnormal inputs count as zero, results below the smallest normal flush to a
// signed zero and overflow gives infinity; these are this design's own choices.
// Parameters: EW exponent bits, MW fraction bits. Timing: purely combinational, no clock.
module fp_mul #(
  parameter int EW = 5,
  parameter int MW = 10,
  localparam int W = 1 + EW + MW
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  localparam int M = MW + 1;
  localparam int BIAS = (1 << (EW - 1)) - 1;
  localparam int EMAX = (1 << EW) - 1;

  logic          s, g, st, rnd_up, a_zero, b_zero, a_inf, b_inf;
  logic [EW-1:0] ea, eb;
  logic [2*M-1:0] prod;
  logic [M-1:0]  m;
  logic [M:0]    mant_r;
  logic signed [EW+2:0] e_res;

  always_comb begin
    s = a[W-1] ^ b[W-1];
    ea = a[W-2:MW];
    eb = b[W-2:MW];
    a_zero = (ea == '0);
    b_zero = (eb == '0);
    a_inf = (ea == EW'(EMAX));
    b_inf = (eb == EW'(EMAX));
    prod = {{M{1'b0}}, 1'b1, a[MW-1:0]} * {{M{1'b0}}, 1'b1, b[MW-1:0]};
    e_res = (EW + 3)'(signed'({3'b000, ea})) + (EW + 3)'(signed'({3'b000, eb})) - (EW + 3)'(BIAS);
    if (prod[2*M-1]) begin
      m = prod[2*M-1:M];
      g = prod[M-1];
      st = |prod[M-2:0];
      e_res = e_res + 1;
    end else begin
      m = prod[2*M-2:M-1];
      g = prod[M-2];
      st = |prod[M-3:0];
    end
    rnd_up = g & (st | m[0]);
    mant_r = {1'b0, m} + (M + 1)'(rnd_up);
    if (mant_r[M]) begin
      mant_r = mant_r >> 1;
      e_res = e_res + 1;
    end
    if (a_inf || b_inf) begin
      y = (a_zero || b_zero) ? {1'b0, {EW{1'b1}}, 1'b1, {(MW - 1){1'b0}}} : {s, {EW{1'b1}}, {MW{1'b0}}};
    end else if (a_zero || b_zero) begin
      y = {s, {(W - 1){1'b0}}};
    end else if (e_res >= (EW + 3)'(EMAX)) begin
      y = {s, {EW{1'b1}}, {MW{1'b0}}};
    end else if (e_res <= 0) begin
      y = {s, {(W - 1){1'b0}}};
    end else begin
      y = {s, e_res[EW-1:0], mant_r[MW-1:0]};
    end
  end
endmodule

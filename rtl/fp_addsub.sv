// Floating-point adder / subtractor (combinational) for the float16 or float32 datapath.
// Computes y = a + b (sub = 0) or y = a - b (sub = 1) with round-to-nearest-even.
// How it works: the operand of larger magnitude is put first, the smaller significand is shifted
// right by the exponent difference into a field with guard, round and sticky bits, the two are
// added or subtracted, the result is normalised (one step right after a carry, or left by the
// leading-zero count after cancellation), rounded, and re-packed.
// Subnormal inputs count as zero and results below the smallest normal flush to a signed zero;
// overflow gives infinity. These simplifications are this design's own choice: the architecture
// only asks for floating-point adders and subtractors in blocks 2, 4 and 6.
// Parameters: EW exponent bits, MW fraction bits (5/10 for float16, 8/23 for float32).
// Timing: purely combinational, no clock.
module fp_addsub #(
  parameter int EW = 5,
  parameter int MW = 10,
  localparam int W = 1 + EW + MW
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] y
);
  localparam int M = MW + 1;          // significand with hidden bit
  localparam int X = M + 3;           // plus guard, round, sticky
  localparam int EMAX = (1 << EW) - 1;

  logic          sa, sb, sbig, ssml, eff_sub, a_inf, b_inf;
  logic [EW-1:0] ea, eb, ebig, esml, d;
  logic [M-1:0]  ma, mb, mbig, msml;
  logic [X-1:0]  big_x, sml_x, norm;
  logic [X:0]    sum;
  logic signed [EW+2:0] e_res;
  int            lz;
  logic          rnd_up, found;
  logic [M:0]    mant_r;

  always_comb begin
    sa = a[W-1];
    sb = b[W-1] ^ sub;
    ea = a[W-2:MW];
    eb = b[W-2:MW];
    a_inf = (ea == EW'(EMAX));
    b_inf = (eb == EW'(EMAX));
    ma = (ea == '0) ? '0 : {1'b1, a[MW-1:0]};
    mb = (eb == '0) ? '0 : {1'b1, b[MW-1:0]};
    // order by magnitude
    if ({ea, ma} >= {eb, mb}) begin
      sbig = sa; ebig = ea; mbig = ma;
      ssml = sb; esml = eb; msml = mb;
    end else begin
      sbig = sb; ebig = eb; mbig = mb;
      ssml = sa; esml = ea; msml = ma;
    end
    eff_sub = sbig ^ ssml;
    d = ebig - esml;
    big_x = {mbig, 3'b000};
    // align the smaller operand, keeping a sticky bit
    if (msml == '0) begin
      sml_x = '0;
    end else if (d > EW'(X - 1)) begin
      sml_x = X'(1);
    end else begin
      sml_x = {msml, 3'b000} >> d;
      if (({msml, 3'b000} & ((X'(1) << d) - X'(1))) != '0) sml_x[0] = 1'b1;
    end
    if (eff_sub) sum = {1'b0, big_x} - {1'b0, sml_x};
    else         sum = {1'b0, big_x} + {1'b0, sml_x};

    // normalise
    e_res = (EW + 3)'(signed'({3'b000, ebig}));
    norm = '0;
    lz = 0;
    found = 1'b0;
    if (sum[X]) begin
      norm = sum[X:1];
      norm[0] = sum[1] | sum[0];
      e_res = e_res + 1;
    end else begin
      for (int i = X - 1; i >= 0; i--) begin
        if (sum[i] && !found) begin
          found = 1'b1;
          lz = X - 1 - i;
        end
      end
      norm = sum[X-1:0] << lz;
      e_res = e_res - (EW + 3)'(lz);
    end
    // round to nearest even: guard = norm[2], round = norm[1], sticky = norm[0]
    rnd_up = norm[2] & (norm[1] | norm[0] | norm[3]);
    mant_r = {1'b0, norm[X-1:3]} + (M + 1)'(rnd_up);
    if (mant_r[M]) begin
      mant_r = mant_r >> 1;
      e_res = e_res + 1;
    end

    // pack
    if (a_inf || b_inf) begin
      if (a_inf && b_inf && (sa != sb)) y = {1'b0, {EW{1'b1}}, 1'b1, {(MW - 1){1'b0}}};
      else if (a_inf) y = {sa, {EW{1'b1}}, {MW{1'b0}}};
      else y = {sb, {EW{1'b1}}, {MW{1'b0}}};
    end else if (sum == '0) begin
      y = {sa & sb, {(W - 1){1'b0}}};          // exact cancellation gives +0
    end else if (e_res >= (EW + 3)'(EMAX)) begin
      y = {sbig, {EW{1'b1}}, {MW{1'b0}}};
    end else if (e_res <= 0) begin
      y = {sbig, {(W - 1){1'b0}}};
    end else begin
      y = {sbig, e_res[EW-1:0], mant_r[MW-1:0]};
    end
  end
endmodule

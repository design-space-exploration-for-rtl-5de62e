// Elaboration-time helpers that fill the EXP and LOG look-up tables from their formulas.
// real_to_fp rounds a real number to the nearest value of a binary floating-point format with
// ew exponent bits and mw fraction bits (float16: 5/10, float32: 8/23) and returns its bit
// pattern in the low 1+ew+mw bits. Values below the smallest normal become zero; values beyond
// the largest finite value become infinity. It is only used to compute constants; no hardware
// is built from it.
package softmax_lut_pkg;
  function automatic logic [31:0] real_to_fp(input real r, input int ew, input int mw);
    logic [63:0] d, sig, m;
    int          ex, bias, drop;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return 32'd0;
    bias = (1 << (ew - 1)) - 1;
    ex = int'(d[62:52]) - 1023;
    sig = {11'd0, 1'b1, d[51:0]};
    drop = 52 - mw;
    m = sig >> drop;
    g = sig[drop - 1];
    st = (sig & ((64'd1 << (drop - 1)) - 64'd1)) != 64'd0;
    if (g && (st || m[0])) m = m + 64'd1;
    if (m[mw + 1]) begin
      m = m >> 1;
      ex = ex + 1;
    end
    if (ex + bias >= (1 << ew) - 1) return 32'((64'(d[63]) << (ew + mw)) | (64'((1 << ew) - 1) << mw));
    if (ex + bias <= 0) return 32'(64'(d[63]) << (ew + mw));
    return 32'((64'(d[63]) << (ew + mw)) | (64'(ex + bias) << mw) | (m & ((64'd1 << mw) - 64'd1)));
  endfunction
endpackage

// Reference floating-point conversions for the testbenches, written independently of the RTL:
// values are carried as IEEE doubles (via $realtobits / $bitstoreal) and rounded from the
// double's 52-bit fraction to a format with ew exponent and mw fraction bits (float16: 5/10,
// float32: 8/23), nearest-even. Subnormal values are treated as zero, like the units under test.
// Bit patterns sit in the low 1+ew+mw bits of a 32-bit vector.
package fp_ref_pkg;
  function automatic real fp_to_real(input logic [31:0] h, input int ew, input int mw);
    logic [63:0] d;
    int          e, bias;
    logic [51:0] f;
    bias = (1 << (ew - 1)) - 1;
    e = int'((h >> mw) & ((32'd1 << ew) - 1));
    if (e == 0) return 0.0;
    f = 52'(h & ((32'd1 << mw) - 1)) << (52 - mw);
    d = {h[ew + mw], 11'(e - bias + 1023), f};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] real_to_fp(input real r, input int ew, input int mw);
    logic [63:0] d;
    logic        s, g, st;
    int          e, bias;
    logic [52:0] sig;
    logic [31:0] m;
    d = $realtobits(r);
    s = d[63];
    bias = (1 << (ew - 1)) - 1;
    if (d[62:52] == 11'd0) return 32'(s) << (ew + mw);
    e = int'(d[62:52]) - 1023;
    sig = {1'b1, d[51:0]};
    m = 32'(sig >> (52 - mw));
    g = sig[51 - mw];
    st = (sig & ((53'd1 << (51 - mw)) - 53'd1)) != 53'd0;
    if (g && (st || m[0])) m = m + 32'd1;
    if (m >> (mw + 1) != 0) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e > bias) return (32'(s) << (ew + mw)) | (((32'd1 << ew) - 1) << mw);
    if (e < 1 - bias) return 32'(s) << (ew + mw);
    return (32'(s) << (ew + mw)) | (32'(e + bias) << mw) | (m & ((32'd1 << mw) - 1));
  endfunction

  function automatic real fp16_to_real(input logic [15:0] h);
    return fp_to_real({16'd0, h}, 5, 10);
  endfunction

  function automatic logic [15:0] real_to_fp16(input real r);
    logic [31:0] v;
    v = real_to_fp(r, 5, 10);
    return v[15:0];
  endfunction

  function automatic real fabs(input real r);
    return (r < 0.0) ? -r : r;
  endfunction

  // a random normal value with biased exponent in [lo, hi]
  function automatic logic [31:0] rand_fp(input int lo, input int hi, input int ew, input int mw);
    logic [31:0] s, e, f;
    s = 32'($urandom % 2);
    e = 32'(lo) + ($urandom % 32'(hi - lo + 1));
    f = $urandom & ((32'd1 << mw) - 1);
    return (s << (ew + mw)) | (e << mw) | f;
  endfunction

  function automatic logic [15:0] rand_fp16(input int lo, input int hi);
    logic [31:0] v;
    v = rand_fp(lo, hi, 5, 10);
    return v[15:0];
  endfunction
endpackage

// Shared types and constants of the softmax unit.
// The datapath works in a binary floating-point format chosen by the Precision parameter:
// IEEE binary16 (1 sign, 5 exponent, 10 fraction bits) or binary32 (1, 8, 23). The arithmetic
// units flush subnormal inputs and results to zero and round to nearest-even; an all-ones
// exponent is treated as infinity (NaN only for inf - inf and 0 * inf).
package softmax_pkg;
  // Precision knob. Only the floating-point settings are implemented.
  typedef enum logic [1:0] {
    FLOAT16,
    FLOAT32
  } precision_e;

  function automatic int exp_bits(input precision_e p);
    return (p == FLOAT32) ? 8 : 5;
  endfunction

  function automatic int frac_bits(input precision_e p);
    return (p == FLOAT32) ? 23 : 10;
  endfunction

  // Sign-and-magnitude ordering of two floating-point values of width w (w <= 32), given in the
  // low bits: 1 when a > b. +0 and -0 compare equal.
  function automatic logic fp_gt(input logic [31:0] a, input logic [31:0] b, input int w);
    logic [31:0] mask, ma, mb;
    logic        sa, sb;
    mask = (32'd1 << (w - 1)) - 32'd1;
    ma = a & mask;
    mb = b & mask;
    sa = a[w - 1];
    sb = b[w - 1];
    if (ma == 32'd0 && mb == 32'd0) return 1'b0;
    if (sa != sb) return sb;        // a positive, b negative
    if (!sa) return ma > mb;        // both positive
    return ma < mb;                 // both negative
  endfunction

  // Stage of the softmax operation, as in the three-stage timeline of the architecture.
  typedef enum logic [2:0] {
    ST_IDLE,
    ST_MAX,       // stage 1: read all rows, track the maximum
    ST_MAX_WAIT,  // stage 1 draining
    ST_SUM,       // stage 2: read all rows, subtract, exponentiate, accumulate
    ST_SUM_WAIT,  // stage 2 draining
    ST_OUT,       // stage 3: log, read all rows, presub, logsub, exponentiate
    ST_OUT_WAIT   // stage 3 draining
  } stage_e;
endpackage

// Self-checking test of exp_unit. For random x in [-12, 0] (plus 0 and values far below -8) the
// output must equal, bit for bit, a reference built from the definition of the piecewise-linear
// approximation: interval n = min(floor(-8x), 63), chord slope a and intercept b of e^x over
// [-(n+1)/8, -n/8] computed with $exp and rounded to float16, then round(round(a*x) + b), negative
// results replaced by 0. It must also lie within 0.003 of e^x, and appear exactly 2 cycles after
// the input; inputs are applied every cycle. A float32 instance receives the same values (widened
// to float32) and is held to the same reference computed in float32.
module tb_exp_unit;
  import fp_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid, out_valid;
  logic [15:0] x, y;
  int checks = 0, failures = 0;

  logic [31:0] x32, y32;
  logic        out_valid32;

  exp_unit dut (.clk, .rst_n, .in_valid, .x, .out_valid, .y);
  exp_unit #(.EW(8), .MW(23)) dut32 (.clk, .rst_n, .in_valid, .x(x32), .out_valid(out_valid32),
                                     .y(y32));

  function automatic logic [31:0] ref_exp_w(input logic [31:0] xh, input int ew, input int mw);
    real xr, xp, xm, a, b;
    int  n;
    logic [31:0] ah, bh, prod, f;
    xr = fp_to_real(xh, ew, mw);
    n = (xr >= 0.0) ? 0 : int'($floor(-xr * 8.0));
    if (n > 63) n = 63;
    xp = -n / 8.0;
    xm = -(n + 1) / 8.0;
    a = ($exp(xp) - $exp(xm)) * 8.0;
    b = $exp(xm) - a * xm;
    ah = real_to_fp(a, ew, mw);
    bh = real_to_fp(b, ew, mw);
    prod = real_to_fp(fp_to_real(ah, ew, mw) * xr, ew, mw);
    f = real_to_fp(fp_to_real(prod, ew, mw) + fp_to_real(bh, ew, mw), ew, mw);
    if (fp_to_real(f, ew, mw) <= 0.0) f = '0;
    return f;
  endfunction

  function automatic logic [15:0] ref_exp(input logic [15:0] xh);
    real xr, xp, xm, a, b;
    int  n;
    logic [15:0] ah, bh, prod, f;
    xr = fp16_to_real(xh);
    n = (xr >= 0.0) ? 0 : int'($floor(-xr * 8.0));
    if (n > 63) n = 63;
    xp = -n / 8.0;
    xm = -(n + 1) / 8.0;
    a = ($exp(xp) - $exp(xm)) * 8.0;
    b = $exp(xm) - a * xm;
    ah = real_to_fp16(a);
    bh = real_to_fp16(b);
    prod = real_to_fp16(fp16_to_real(ah) * xr);
    f = real_to_fp16(fp16_to_real(prod) + fp16_to_real(bh));
    if (fp16_to_real(f) < 0.0) f = 16'h0000;
    if (fp16_to_real(f) == 0.0) f = 16'h0000;
    return f;
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] q [$];
  int sat_seen = 0;

  initial begin
    logic [15:0] xv;
    in_valid = 1'b0; x = '0; x32 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 6000; n++) begin
      if (n == 0) xv = 16'h0000;
      else if (n == 1) xv = 16'hc800;     // -8
      else if (n == 2) xv = 16'hcc00;     // -16
      else xv = real_to_fp16(-12.0 * (real'($urandom % 32'd100001) / 100000.0));
      in_valid = 1'b1;
      x = xv;
      x32 = real_to_fp(fp16_to_real(xv), 8, 23);
      q.push_back(xv);
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("%0d results missing", q.size());
    end
    checks++;
    if (sat_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // results arrive 2 cycles after their input
  logic [1:0] vpipe = 2'b00;
  always @(posedge clk) vpipe <= {vpipe[0], in_valid};

  always @(negedge clk) begin
    if (rst_n) begin
      if (out_valid != vpipe[1]) begin
        failures++;
        $display("out_valid not 2 cycles after in_valid");
      end
      if (out_valid) begin
        logic [15:0] xv, e;
        logic [31:0] e32;
        real xr;
        xv = q.pop_front();
        xr = fp16_to_real(xv);
        e = ref_exp(xv);
        if (xr < -8.0) sat_seen++;
        checks++;
        if (y != e) begin
          failures++;
          if (failures < 10) $display("x=%f: got %h expected %h", xr, y, e);
        end
        checks++;
        if (xr >= -8.0 && fabs(fp16_to_real(y) - $exp(xr)) > 0.003) begin
          failures++;
          if (failures < 10) $display("x=%f: %f far from %f", xr, fp16_to_real(y), $exp(xr));
        end
        // float32 instance: same input value, reference evaluated in float32
        e32 = ref_exp_w(real_to_fp(xr, 8, 23), 8, 23);
        checks++;
        if (!out_valid32 || y32 != e32) begin
          failures++;
          if (failures < 10) $display("fp32 x=%f: got %h expected %h", xr, y32, e32);
        end
        checks++;
        if (xr >= -8.0 && fabs(fp_to_real(y32, 8, 23) - $exp(xr)) > 0.003) begin
          failures++;
          if (failures < 10) $display("fp32 x=%f: %f", xr, fp_to_real(y32, 8, 23));
        end
      end
    end
  end
endmodule

// Self-checking test of log_unit. For random positive float16 x from 2^-10 to 60000 the output
// must equal, bit for bit, round(round(ln(2)*(E-15)) + round(ln(1 + (k+0.5)/64))) with E the
// biased exponent and k the top 6 mantissa bits (values from $ln), lie within 0.02 of ln(x), and
// appear exactly 1 cycle after the input. A float32 instance gets the same values and is held to
// the same construction with the float32 bias (127) and float32 rounding.
module tb_log_unit;
  import fp_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid, out_valid;
  logic [15:0] x, y, xq, e;
  int checks = 0, failures = 0;

  logic [31:0] x32, y32, xq32, e32;
  logic        out_valid32;

  log_unit dut (.clk, .rst_n, .in_valid, .x, .out_valid, .y);
  log_unit #(.EW(8), .MW(23)) dut32 (.clk, .rst_n, .in_valid, .x(x32), .out_valid(out_valid32),
                                     .y(y32));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ex, fr;
    logic [15:0] t_exp, t_mant;
    logic [31:0] t_exp32, t_mant32;
    real r_sum;
    in_valid = 1'b0; x = '0; x32 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      ex = 5 + int'($urandom % 26);
      fr = $urandom;
      x = (n == 0) ? 16'h3c00 : {1'b0, ex[4:0], fr[9:0]};
      xq = x;
      t_exp = real_to_fp16($ln(2.0) * real'(int'(x[14:10]) - 15));
      t_mant = real_to_fp16($ln(1.0 + (real'(x[9:4]) + 0.5) / 64.0));
      r_sum = fp16_to_real(t_exp) + fp16_to_real(t_mant);
      e = real_to_fp16(r_sum);
      x32 = real_to_fp(fp16_to_real(x), 8, 23);
      xq32 = x32;
      t_exp32 = real_to_fp($ln(2.0) * real'(int'(x32[30:23]) - 127), 8, 23);
      t_mant32 = real_to_fp($ln(1.0 + (real'(x32[22:17]) + 0.5) / 64.0), 8, 23);
      r_sum = fp_to_real(t_exp32, 8, 23) + fp_to_real(t_mant32, 8, 23);
      e32 = real_to_fp(r_sum, 8, 23);
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!out_valid) begin
        failures++;
        $display("out_valid not 1 cycle after in_valid");
      end
      checks++;
      if (y != e) begin
        failures++;
        if (failures < 10) $display("ln(%f): got %h expected %h", fp16_to_real(xq), y, e);
      end
      checks++;
      if (fabs(fp16_to_real(y) - $ln(fp16_to_real(xq))) > 0.02) begin
        failures++;
        if (failures < 10) $display("ln(%f): %f", fp16_to_real(xq), fp16_to_real(y));
      end
      checks++;
      if (!out_valid32 || y32 != e32) begin
        failures++;
        if (failures < 10) $display("fp32 ln(%f): got %h expected %h", fp_to_real(xq32, 8, 23), y32, e32);
      end
      checks++;
      if (fabs(fp_to_real(y32, 8, 23) - $ln(fp_to_real(xq32, 8, 23))) > 0.02) begin
        failures++;
        if (failures < 10) $display("fp32 ln(%f): %f", fp_to_real(xq32, 8, 23), fp_to_real(y32, 8, 23));
      end
      if (n % 7 == 0) begin
        @(negedge clk);
        checks++;
        if (out_valid) begin
          failures++;
          $display("out_valid without input");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

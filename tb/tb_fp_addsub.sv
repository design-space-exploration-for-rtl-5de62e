// Self-checking test of fp_addsub in both formats: float16 (default parameters) and float32.
// Random and directed operands are compared bit for bit with the double-precision sum or
// difference rounded to the format by the reference package. Float32 operands are kept within
// 24 binades of each other so that the double result is exact before that rounding.
module tb_fp_addsub;
  import fp_ref_pkg::*;
  logic [15:0] a16, b16, y16;
  logic [31:0] a32, b32, y32;
  logic        sub;
  int checks = 0, failures = 0;

  fp_addsub dut16 (.a(a16), .b(b16), .sub(sub), .y(y16));
  fp_addsub #(.EW(8), .MW(23)) dut32 (.a(a32), .b(b32), .sub(sub), .y(y32));

  task automatic check16(input logic [15:0] ta, input logic [15:0] tb_, input logic ts);
    real rr;
    logic [15:0] e;
    a16 = ta; b16 = tb_; sub = ts;
    #1;
    rr = ts ? fp16_to_real(ta) - fp16_to_real(tb_) : fp16_to_real(ta) + fp16_to_real(tb_);
    e = real_to_fp16(rr);
    checks++;
    if (y16 !== e && !(rr == 0.0 && y16[14:0] == 15'd0)) begin
      failures++;
      if (failures < 10) $display("fp16 %h %s %h: got %h expected %h", ta, ts ? "-" : "+", tb_, y16, e);
    end
  endtask

  task automatic check32(input logic [31:0] ta, input logic [31:0] tb_, input logic ts);
    real rr;
    logic [31:0] e;
    a32 = ta; b32 = tb_; sub = ts;
    #1;
    rr = ts ? fp_to_real(ta, 8, 23) - fp_to_real(tb_, 8, 23) : fp_to_real(ta, 8, 23) + fp_to_real(tb_, 8, 23);
    e = real_to_fp(rr, 8, 23);
    checks++;
    if (y32 !== e && !(rr == 0.0 && y32[30:0] == 31'd0)) begin
      failures++;
      if (failures < 10) $display("fp32 %h %s %h: got %h expected %h", ta, ts ? "-" : "+", tb_, y32, e);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] t16;
    logic [31:0] t32, u32;
    a32 = '0; b32 = '0;
    check16(16'h3c00, 16'h3c00, 1'b0);
    check16(16'h3c00, 16'h3c00, 1'b1);
    check16(16'h3c00, 16'h3800, 1'b1);
    check16(16'h3c00, 16'h1000, 1'b0);
    check16(16'h3c01, 16'h0c00, 1'b0);
    check16(16'hc500, 16'h4500, 1'b0);
    check16(16'h7bff, 16'h7bff, 1'b0);   // overflow to infinity
    for (int i = 0; i < 20000; i++) check16(rand_fp16(1, 30), rand_fp16(1, 30), 1'($urandom));
    for (int i = 0; i < 20000; i++) begin  // close exponents exercise cancellation
      t16 = rand_fp16(5, 25);
      check16(t16, {1'($urandom), t16[14:10] - 5'($urandom % 3), 10'($urandom)}, 1'($urandom));
    end
    check32(32'h3f800000, 32'h3f800000, 1'b1);
    check32(32'h3f800000, 32'h33800000, 1'b0);
    for (int i = 0; i < 30000; i++) begin
      t32 = rand_fp(100, 150, 8, 23);
      u32 = rand_fp(100, 150, 8, 23);
      if (i % 2 == 0) u32[30:23] = t32[30:23] - 8'($urandom % 3);
      check32(t32, u32, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking test of fp_mul in float16 (default parameters) and float32, against
// double-precision products (exact for both formats) rounded to the format.
module tb_fp_mul;
  import fp_ref_pkg::*;
  logic [15:0] a16, b16, y16;
  logic [31:0] a32, b32, y32;
  int checks = 0, failures = 0;

  fp_mul dut16 (.a(a16), .b(b16), .y(y16));
  fp_mul #(.EW(8), .MW(23)) dut32 (.a(a32), .b(b32), .y(y32));

  task automatic check16(input logic [15:0] ta, input logic [15:0] tb_);
    logic [15:0] e;
    a16 = ta; b16 = tb_;
    #1;
    e = real_to_fp16(fp16_to_real(ta) * fp16_to_real(tb_));
    checks++;
    if (y16 !== e) begin
      failures++;
      if (failures < 10) $display("fp16 %h * %h: got %h expected %h", ta, tb_, y16, e);
    end
  endtask

  task automatic check32(input logic [31:0] ta, input logic [31:0] tb_);
    logic [31:0] e;
    a32 = ta; b32 = tb_;
    #1;
    e = real_to_fp(fp_to_real(ta, 8, 23) * fp_to_real(tb_, 8, 23), 8, 23);
    checks++;
    if (y32 !== e) begin
      failures++;
      if (failures < 10) $display("fp32 %h * %h: got %h expected %h", ta, tb_, y32, e);
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
    a32 = '0; b32 = '0;
    check16(16'h3c00, 16'h3c00);
    check16(16'h4000, 16'hc200);
    check16(16'h3c01, 16'h3c01);
    check16(16'h7800, 16'h7800);   // overflow
    check16(16'h0800, 16'h0800);   // underflow flush
    for (int i = 0; i < 30000; i++) check16(rand_fp16(1, 30), rand_fp16(1, 30));
    check32(32'h3f800000, 32'hbf800000);
    for (int i = 0; i < 30000; i++) check32(rand_fp(1, 254, 8, 23), rand_fp(1, 254, 8, 23));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking test of sub_array (PA = 4): random minuends and subtrahends, each lane compared
// bit for bit with the double-precision difference rounded to float16, one cycle after input.
module tb_sub_array;
  import fp_ref_pkg::*;
  localparam int PA = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                in_valid, in_last, out_valid, out_last;
  logic [PA-1:0][15:0] in_a, out_d, exp_d;
  logic [15:0]         in_b;
  logic                exp_last;
  int checks = 0, failures = 0;

  sub_array #(.PA(PA)) dut (.clk, .rst_n, .in_valid, .in_last, .in_a, .in_b, .out_valid, .out_last, .out_d);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 1'b0; in_last = 1'b0; in_a = '0; in_b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_last = 1'($urandom);
      in_b = rand_fp16(1, 30);
      for (int i = 0; i < PA; i++) begin
        in_a[i] = (n % 2) ? rand_fp16(1, 30) : {1'($urandom), in_b[14:10], 10'($urandom)};
        exp_d[i] = real_to_fp16(fp16_to_real(in_a[i]) - fp16_to_real(in_b));
      end
      exp_last = in_last;
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!out_valid || out_last != exp_last) begin
        failures++;
        $display("valid/last wrong after 1 cycle");
      end
      for (int i = 0; i < PA; i++) begin
        checks++;
        if (out_d[i] != exp_d[i] && !(fp16_to_real(out_d[i]) == 0.0 && fp16_to_real(exp_d[i]) == 0.0)) begin
          failures++;
          if (failures < 10) $display("lane %0d: %h - %h = %h expected %h", i, in_a[i], in_b, out_d[i], exp_d[i]);
        end
      end
    end
    @(negedge clk);
    checks++;
    if (out_valid) begin
      failures++;
      $display("out_valid stuck");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

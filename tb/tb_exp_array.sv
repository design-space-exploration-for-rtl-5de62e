// Self-checking test of exp_array (PA = 4): rows of random arguments in [-8, 0], each lane within
// 0.002 of e^x; out_valid and out_last must follow in_valid and in_last by exactly 2 cycles.
module tb_exp_array;
  import fp_ref_pkg::*;
  localparam int PA = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                in_valid, in_last, out_valid, out_last;
  logic [PA-1:0][15:0] in_x, out_y;
  int checks = 0, failures = 0;

  exp_array #(.PA(PA)) dut (.clk, .rst_n, .in_valid, .in_last, .in_x, .out_valid, .out_last, .out_y);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [PA-1:0][15:0] qx [$];
  logic                ql [$];
  logic [1:0] vpipe = 2'b00;
  always @(posedge clk) vpipe <= {vpipe[0], in_valid};

  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid != vpipe[1]) begin
        failures++;
        $display("out_valid misaligned");
      end
      if (out_valid) begin
        logic [PA-1:0][15:0] xr;
        logic lst;
        xr = qx.pop_front();
        lst = ql.pop_front();
        checks++;
        if (out_last != lst) begin
          failures++;
          $display("out_last misaligned");
        end
        for (int i = 0; i < PA; i++) begin
          checks++;
          if (fabs(fp16_to_real(out_y[i]) - $exp(fp16_to_real(xr[i]))) > 0.003) begin
            failures++;
            if (failures < 10) $display("lane %0d x=%f got %f", i, fp16_to_real(xr[i]), fp16_to_real(out_y[i]));
          end
        end
      end
    end
  end

  initial begin
    in_valid = 1'b0; in_last = 1'b0; in_x = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      in_valid = 1'($urandom % 4 != 0);
      in_last = 1'($urandom % 5 == 0);
      for (int i = 0; i < PA; i++) in_x[i] = real_to_fp16(-8.0 * (real'($urandom % 32'd100001) / 100000.0));
      if (in_valid) begin
        qx.push_back(in_x);
        ql.push_back(in_last);
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (4) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

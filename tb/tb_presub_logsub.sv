// Self-checking test of presub_logsub (PA = 4): random rows x with common xmax and xlog; each lane
// must equal round(round(x - xmax) - xlog), the float16-rounded double-precision reference, and
// out_valid / out_last must follow the input by exactly 2 cycles. Rows enter every cycle.
module tb_presub_logsub;
  import fp_ref_pkg::*;
  localparam int PA = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                in_valid, in_last, out_valid, out_last;
  logic [PA-1:0][15:0] in_x, out_d;
  logic [15:0]         xmax, xlog;
  int checks = 0, failures = 0;

  presub_logsub #(.PA(PA)) dut (.clk, .rst_n, .in_valid, .in_last, .in_x, .xmax, .xlog,
                                .out_valid, .out_last, .out_d);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [PA-1:0][15:0] qe [$];
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
        logic [PA-1:0][15:0] ev;
        logic lst;
        ev = qe.pop_front();
        lst = ql.pop_front();
        checks++;
        if (lst != out_last) failures++;
        for (int i = 0; i < PA; i++) begin
          checks++;
          if (out_d[i] != ev[i] && !(fp16_to_real(out_d[i]) == 0.0 && fp16_to_real(ev[i]) == 0.0)) begin
            failures++;
            if (failures < 10) $display("lane %0d: got %h expected %h", i, out_d[i], ev[i]);
          end
        end
      end
    end
  end

  initial begin
    logic [PA-1:0][15:0] ev;
    in_valid = 1'b0; in_last = 1'b0; in_x = '0; xmax = '0; xlog = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < 40; op++) begin
      xmax = real_to_fp16(20.0 * (real'($urandom % 32'd10001) / 10000.0) - 10.0);
      xlog = real_to_fp16(8.0 * (real'($urandom % 32'd10001) / 10000.0));
      for (int r = 0; r < 50; r++) begin
        in_valid = 1'b1;
        in_last = (r == 49);
        for (int i = 0; i < PA; i++) begin
          in_x[i] = real_to_fp16(fp16_to_real(xmax) - 12.0 * (real'($urandom % 32'd10001) / 10000.0));
          ev[i] = real_to_fp16(fp16_to_real(real_to_fp16(fp16_to_real(in_x[i]) - fp16_to_real(xmax)))
                               - fp16_to_real(xlog));
        end
        qe.push_back(ev);
        ql.push_back(in_last);
        @(negedge clk);
      end
      in_valid = 1'b0;
      in_last = 1'b0;
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

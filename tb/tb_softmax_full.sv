// Full-size test of softmax_top with every parameter at its default (PA = 4, 4096-value memory,
// inputs re-read from memory). It runs softmax over 1024 inputs in [-8, 8] and then over the full
// 4096-value memory in [-10, 5], checking every probability against a double-precision softmax of
// the same float16 inputs (absolute error at most 0.005), the row order of the results, and the
// start-to-done cycle count 3*N/4 + 2 + 0 + 13.
module tb_softmax_full;
  import fp_ref_pkg::*;
  localparam int PA = 4;
  localparam int NMAX = 4096;
  localparam int AW = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                host_we, start, busy, done, out_valid;
  logic [AW-1:0]       host_addr, out_group;
  logic [PA-1:0][15:0] host_wdata, out_prob;
  logic [AW:0]         num_groups;
  int checks = 0, failures = 0;

  softmax_top dut (
    .clk, .rst_n, .host_we, .host_addr, .host_wdata, .start, .num_groups,
    .busy, .done, .out_valid, .out_group, .out_prob
  );

  logic [15:0] xin [NMAX];
  logic [15:0] res [NMAX];
  int          rows_seen;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (int'(out_group) != rows_seen) begin
        failures++;
        $display("row order: got %0d expected %0d", out_group, rows_seen);
      end
      for (int i = 0; i < PA; i++) res[int'(out_group) * PA + i] = out_prob[i];
      rows_seen++;
    end
  end

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n, input real lo, input real hi);
    int  cycles;
    real xmax, s, p, err, max_err, psum;
    for (int i = 0; i < n; i++)
      xin[i] = real_to_fp16(lo + (hi - lo) * (real'($urandom % 32'd1000001) / 1000000.0));
    for (int r = 0; r < n / PA; r++) begin
      @(negedge clk);
      host_we = 1'b1;
      host_addr = AW'(r);
      for (int i = 0; i < PA; i++) host_wdata[i] = xin[r * PA + i];
    end
    @(negedge clk);
    host_we = 1'b0;
    rows_seen = 0;
    num_groups = (AW + 1)'(n / PA);
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    cycles = 0;
    do begin
      @(posedge clk);
      cycles++;
    end while (!done && cycles < 100000);
    #1;
    checks++;
    if (cycles != 3 * (n / PA) + 2 + 13) begin
      failures++;
      $display("N=%0d: %0d cycles, expected %0d", n, cycles, 3 * (n / PA) + 15);
    end
    checks++;
    if (rows_seen != n / PA) failures++;
    xmax = fp16_to_real(xin[0]);
    for (int i = 1; i < n; i++) if (fp16_to_real(xin[i]) > xmax) xmax = fp16_to_real(xin[i]);
    s = 0.0;
    for (int i = 0; i < n; i++) s += $exp(fp16_to_real(xin[i]) - xmax);
    max_err = 0.0;
    psum = 0.0;
    for (int i = 0; i < n; i++) begin
      p = $exp(fp16_to_real(xin[i]) - xmax) / s;
      err = fabs(fp16_to_real(res[i]) - p);
      psum += fp16_to_real(res[i]);
      if (err > max_err) max_err = err;
      checks++;
      if (err > 0.005) begin
        failures++;
        if (failures < 20) $display("x[%0d]: got %f expected %f", i, fp16_to_real(res[i]), p);
      end
    end
    $display("N=%0d in [%0.1f, %0.1f]: %0d cycles, max abs error %e, sum of outputs %f",
             n, lo, hi, cycles, max_err, psum);
  endtask

  initial begin
    host_we = 1'b0; start = 1'b0; host_addr = '0; host_wdata = '0; num_groups = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(1024, -8.0, 8.0);
    run(4096, -10.0, 5.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

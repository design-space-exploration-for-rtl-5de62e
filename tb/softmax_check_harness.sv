// Test harness for softmax_top: owns one instance (with the given parameters, float16 or
// float32), runs a list of softmax operations on it and checks every result against a
// double-precision softmax of the same inputs. Per operation it also checks the start-to-done cycle count against
// 3*N/PA + log2(PA) + floor(log2(PA)/3) + 13, the order of the result rows, and counts the
// mechanisms exercised: multi-row operations (the cross-row comparator and accumulator),
// single-row operations, exponent arguments below -8 (last LUT interval), operations served from
// the internal buffer, and operations started in the cycle after the previous one finished.
// Results: finished rises when the list is done; the counters are outputs.
module softmax_check_harness #(
  parameter int  PA          = 4,
  parameter int  MAX_INPUTS  = 4096,
  parameter bit  STORAGE_REG = 1'b0,
  parameter int  MAX_N       = 256,
  parameter real TOL         = 0.01,
  parameter softmax_pkg::precision_e PRECISION = softmax_pkg::FLOAT16
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   n_multi_row,
  output int   n_single_row,
  output int   n_saturated,
  output int   n_buffered,
  output int   n_back_to_back
);
  import fp_ref_pkg::*;
  localparam int ROWS = MAX_INPUTS / PA;
  localparam int AW = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int L = $clog2(PA);
  localparam int EW = softmax_pkg::exp_bits(PRECISION);
  localparam int MW = softmax_pkg::frac_bits(PRECISION);
  localparam int W = 1 + EW + MW;

  logic                  host_we, start, busy, done, out_valid;
  logic [AW-1:0]         host_addr, out_group;
  logic [PA-1:0][W-1:0]  host_wdata, out_prob;
  logic [AW:0]           num_groups;

  softmax_top #(.PA(PA), .MAX_INPUTS(MAX_INPUTS), .STORAGE_REG(STORAGE_REG), .PRECISION(PRECISION)) dut (
    .clk, .rst_n, .host_we, .host_addr, .host_wdata, .start, .num_groups,
    .busy, .done, .out_valid, .out_group, .out_prob
  );

  logic [31:0] xin [MAX_N];
  logic [31:0] res [MAX_N];

  function automatic real val(input logic [31:0] h);
    return fp_to_real(h, EW, MW);
  endfunction
  int          rows_seen;
  real         max_err;

  // collect the result stream
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (int'(out_group) != rows_seen) begin
        failures++;
        $display("row order: got %0d expected %0d", out_group, rows_seen);
      end
      checks++;
      for (int i = 0; i < PA; i++) res[int'(out_group) * PA + i] = 32'(out_prob[i]);
      rows_seen++;
    end
  end

  task automatic load(input int n);
    for (int r = 0; r < n / PA; r++) begin
      @(negedge clk);
      host_we = 1'b1;
      host_addr = AW'(r);
      for (int i = 0; i < PA; i++) host_wdata[i] = W'(xin[r * PA + i]);
    end
    @(negedge clk);
    host_we = 1'b0;
  endtask

  // run one softmax on the n inputs already loaded and check it
  task automatic run(input int n, input bit back_to_back);
    int  cycles, expect_cycles;
    real xmax, s, p, err;
    bit  sat;
    if (!back_to_back) @(negedge clk);
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
    expect_cycles = 3 * (n / PA) + L + L / 3 + 13;
    checks++;
    if (cycles != expect_cycles) begin
      failures++;
      $display("N=%0d PA=%0d: %0d cycles, expected %0d", n, PA, cycles, expect_cycles);
    end
    checks++;
    if (rows_seen != n / PA) begin
      failures++;
      $display("N=%0d: %0d result rows, expected %0d", n, rows_seen, n / PA);
    end
    // reference softmax of the inputs as given
    xmax = val(xin[0]);
    for (int i = 1; i < n; i++) if (val(xin[i]) > xmax) xmax = val(xin[i]);
    s = 0.0;
    sat = 1'b0;
    for (int i = 0; i < n; i++) begin
      s += $exp(val(xin[i]) - xmax);
      if (val(xin[i]) - xmax < -8.0) sat = 1'b1;
    end
    max_err = 0.0;
    for (int i = 0; i < n; i++) begin
      p = $exp(val(xin[i]) - xmax) / s;
      err = fabs(val(res[i]) - p);
      if (err > max_err) max_err = err;
      checks++;
      if (err > TOL) begin
        failures++;
        if (failures < 20) $display("N=%0d x[%0d]=%f: got %f expected %f", n, i, val(xin[i]),
                                    val(res[i]), p);
      end
    end
    $display("W=%0d PA=%0d REG=%0d N=%0d: %0d cycles, max abs error %e", W, PA, STORAGE_REG, n, cycles, max_err);
    if (n > PA) n_multi_row++;
    if (n == PA) n_single_row++;
    if (sat) n_saturated++;
    if (STORAGE_REG) n_buffered++;
    if (back_to_back) n_back_to_back++;
  endtask

  task automatic fill(input int n, input real lo, input real hi);
    for (int i = 0; i < n; i++)
      xin[i] = real_to_fp(lo + (hi - lo) * (real'($urandom % 32'd1000001) / 1000000.0), EW, MW);
  endtask

  initial begin
    finished = 1'b0;
    checks = 0; failures = 0;
    n_multi_row = 0; n_single_row = 0; n_saturated = 0; n_buffered = 0; n_back_to_back = 0;
    host_we = 1'b0; start = 1'b0; host_addr = '0; host_wdata = '0; num_groups = '0;
    wait (rst_n);
    // input ranges of the accuracy study, then edge cases
    fill(PA, -1.0, 1.0);              load(PA);        run(PA, 1'b0);
    fill(MAX_N, -0.1, 0.1);           load(MAX_N);     run(MAX_N, 1'b0);
    fill(MAX_N, -1.0, 1.0);           load(MAX_N);     run(MAX_N, 1'b0);
    fill(MAX_N, -10.0, 5.0);          load(MAX_N);     run(MAX_N, 1'b0);
    fill(MAX_N, 5.0, 10.0);           load(MAX_N);     run(MAX_N, 1'b0);
    fill(MAX_N, -8.0, -4.0);          load(MAX_N);     run(MAX_N, 1'b0);
    fill(MAX_N, -8.0, 8.0);           load(MAX_N);     run(MAX_N, 1'b0);
    run(MAX_N, 1'b1);                 // same inputs again, started right after done
    fill(MAX_N / 2, -30.0, 30.0);     load(MAX_N / 2); run(MAX_N / 2, 1'b0);
    for (int i = 0; i < 2 * PA; i++) xin[i] = real_to_fp(3.0, EW, MW);   // all equal: 1/(2*PA) each
    load(2 * PA);                     run(2 * PA, 1'b0);
    finished = 1'b1;
  end
endmodule

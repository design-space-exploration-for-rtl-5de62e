// Runs the configurations of the design-space study through softmax_check_harness, side by side,
// at the input counts the study uses:
//   - parallelism sweep, float16, 1024 inputs, inputs re-read from memory: PA = 2 and PA = 16
//     (PA = 1, 4, 8 and 32 are covered by tb_softmax_top and tb_softmax_full);
//   - storage study, float16, PA = 4, 1024 inputs kept in the internal buffer (STORAGE_REG = 1);
//   - stage-balance study in float32 with inputs re-read from memory: PA = 1, 4 and 8 at 4096
//     inputs (PA = 16 is covered by tb_softmax_top).
// Every harness checks each probability against a double-precision softmax, the start-to-done
// cycle count (3*N/PA + log2(PA) + floor(log2(PA)/3) + 13) and the result row order, over the
// input ranges of the accuracy study; the cycle count of each operation is printed.
module tb_softmax_workloads;
  import softmax_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NH = 6;
  logic fin [NH];
  int   c [NH], f [NH], mr [NH], sr [NH], st [NH], bu [NH], bb [NH];
  int   checks, failures;

  softmax_check_harness #(.PA(2), .MAX_INPUTS(1024), .STORAGE_REG(1'b0), .MAX_N(1024)) h_pa2 (
    .clk, .rst_n, .finished(fin[0]), .checks(c[0]), .failures(f[0]), .n_multi_row(mr[0]),
    .n_single_row(sr[0]), .n_saturated(st[0]), .n_buffered(bu[0]), .n_back_to_back(bb[0])
  );
  softmax_check_harness #(.PA(16), .MAX_INPUTS(1024), .STORAGE_REG(1'b0), .MAX_N(1024)) h_pa16 (
    .clk, .rst_n, .finished(fin[1]), .checks(c[1]), .failures(f[1]), .n_multi_row(mr[1]),
    .n_single_row(sr[1]), .n_saturated(st[1]), .n_buffered(bu[1]), .n_back_to_back(bb[1])
  );
  softmax_check_harness #(.PA(4), .MAX_INPUTS(1024), .STORAGE_REG(1'b1), .MAX_N(1024)) h_reg4 (
    .clk, .rst_n, .finished(fin[2]), .checks(c[2]), .failures(f[2]), .n_multi_row(mr[2]),
    .n_single_row(sr[2]), .n_saturated(st[2]), .n_buffered(bu[2]), .n_back_to_back(bb[2])
  );
  softmax_check_harness #(.PA(1), .MAX_INPUTS(4096), .STORAGE_REG(1'b0), .MAX_N(4096),
                          .PRECISION(FLOAT32)) h_f32_pa1 (
    .clk, .rst_n, .finished(fin[3]), .checks(c[3]), .failures(f[3]), .n_multi_row(mr[3]),
    .n_single_row(sr[3]), .n_saturated(st[3]), .n_buffered(bu[3]), .n_back_to_back(bb[3])
  );
  softmax_check_harness #(.PA(4), .MAX_INPUTS(4096), .STORAGE_REG(1'b0), .MAX_N(4096),
                          .PRECISION(FLOAT32)) h_f32_pa4 (
    .clk, .rst_n, .finished(fin[4]), .checks(c[4]), .failures(f[4]), .n_multi_row(mr[4]),
    .n_single_row(sr[4]), .n_saturated(st[4]), .n_buffered(bu[4]), .n_back_to_back(bb[4])
  );
  softmax_check_harness #(.PA(8), .MAX_INPUTS(4096), .STORAGE_REG(1'b0), .MAX_N(4096),
                          .PRECISION(FLOAT32)) h_f32_pa8 (
    .clk, .rst_n, .finished(fin[5]), .checks(c[5]), .failures(f[5]), .n_multi_row(mr[5]),
    .n_single_row(sr[5]), .n_saturated(st[5]), .n_buffered(bu[5]), .n_back_to_back(bb[5])
  );

  function automatic int total(input int v [NH]);
    int s = 0;
    for (int i = 0; i < NH; i++) s += v[i];
    return s;
  endfunction

  initial begin
    #20_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f) + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4] && fin[5]);
    checks = total(c);
    failures = total(f);
    // every configuration must have run its multi-row operations
    for (int i = 0; i < NH; i++) begin
      checks++;
      if (mr[i] == 0) begin
        failures++;
        $display("configuration %0d ran no multi-row operation", i);
      end
    end
    // the storage-study configuration must have served its operations from the buffer
    checks++;
    if (bu[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// End-to-end test of softmax_top. Five configurations run side by side: the default one
// (PA = 4, float16, inputs re-read from the on-chip memory), PA = 8 and PA = 32 with the internal
// input buffer (STORAGE_REG = 1), the fully serial PA = 1, and PA = 16 in float32; all but the
// first at smaller memory sizes. Each runs the input ranges of the accuracy study
// and edge cases through softmax_check_harness; the test fails if any result, cycle count or row
// order is wrong, or if a mechanism (multi-row operation, single-row operation, LUT saturation
// below -8, buffered operation, float32 operation, back-to-back start) was never exercised.
module tb_softmax_top;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic fin_a, fin_b;
  int ca, fa, mra, sra, sta, bua, bba;
  int cb, fb, mrb, srb, stb, bub, bbb;
  int cc, fc, mrc, src, stc, buc, bbc;
  int cd, fd, mrd, srd, std, bud, bbd;
  int ce, fe, mre, sre, ste, bue, bbe;
  logic fin_c, fin_d, fin_e;
  int checks, failures;

  softmax_check_harness #(.PA(4), .MAX_INPUTS(4096), .STORAGE_REG(1'b0), .MAX_N(256)) h_mem (
    .clk, .rst_n, .finished(fin_a), .checks(ca), .failures(fa), .n_multi_row(mra),
    .n_single_row(sra), .n_saturated(sta), .n_buffered(bua), .n_back_to_back(bba)
  );
  softmax_check_harness #(.PA(8), .MAX_INPUTS(512), .STORAGE_REG(1'b1), .MAX_N(512)) h_reg (
    .clk, .rst_n, .finished(fin_b), .checks(cb), .failures(fb), .n_multi_row(mrb),
    .n_single_row(srb), .n_saturated(stb), .n_buffered(bub), .n_back_to_back(bbb)
  );

  softmax_check_harness #(.PA(1), .MAX_INPUTS(64), .STORAGE_REG(1'b0), .MAX_N(64)) h_pa1 (
    .clk, .rst_n, .finished(fin_c), .checks(cc), .failures(fc), .n_multi_row(mrc),
    .n_single_row(src), .n_saturated(stc), .n_buffered(buc), .n_back_to_back(bbc)
  );
  softmax_check_harness #(.PA(32), .MAX_INPUTS(1024), .STORAGE_REG(1'b1), .MAX_N(1024)) h_pa32 (
    .clk, .rst_n, .finished(fin_d), .checks(cd), .failures(fd), .n_multi_row(mrd),
    .n_single_row(srd), .n_saturated(std), .n_buffered(bud), .n_back_to_back(bbd)
  );

  softmax_check_harness #(.PA(16), .MAX_INPUTS(1024), .STORAGE_REG(1'b0), .MAX_N(1024),
                          .PRECISION(softmax_pkg::FLOAT32)) h_fp32 (
    .clk, .rst_n, .finished(fin_e), .checks(ce), .failures(fe), .n_multi_row(mre),
    .n_single_row(sre), .n_saturated(ste), .n_buffered(bue), .n_back_to_back(bbe)
  );

  task automatic need(input string what, input int count);
    checks++;
    $display("mechanism %-24s exercised %0d times", what, count);
    if (count == 0) failures++;
  endtask

  initial begin
    #2_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ca + cb + cc + cd + ce, fa + fb + fc + fd + fe + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin_a && fin_b && fin_c && fin_d && fin_e);
    checks = ca + cb + cc + cd + ce;
    failures = fa + fb + fc + fd + fe;
    need("multi-row operation", mra + mrb + mrc + mrd + mre);
    need("single-row operation", sra + srb + src + srd + sre);
    need("exp argument below -8", sta + stb + stc + std + ste);
    need("internal buffer", bua + bub + buc + bud + bue);
    need("float32 operation", ce > 0 ? mre : 0);
    need("back-to-back start", bba + bbb + bbc + bbd + bbe);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking test of softmax_ctrl. A small model of the datapath answers the controller: it
// raises xmax_valid and sum_valid a random number of cycles after the last read of stages 1 and 2
// and pulses out_last a random time after the last read of stage 3. The test checks that each
// stage issues reads of rows 0 .. G-1 on consecutive cycles, tagged with its stage and with
// rd_last on row G-1; that a stage waits for its trigger; that log_go pulses once, together with
// sum_valid; and that done pulses once, after which the controller is idle. A start with
// num_groups = 0 must be ignored.
module tb_softmax_ctrl;
  import softmax_pkg::*;
  localparam int GW = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          start, xmax_valid, sum_valid, out_last;
  logic [GW-1:0] num_groups;
  logic          clear, rd_en, rd_last, log_go, busy, done;
  logic [GW-2:0] rd_addr;
  stage_e        rd_stage, stage;
  int checks = 0, failures = 0;

  softmax_ctrl #(.GW(GW)) dut (.clk, .rst_n, .start, .num_groups, .xmax_valid, .sum_valid, .out_last,
                               .clear, .rd_en, .rd_addr, .rd_last, .rd_stage, .log_go, .busy, .done, .stage);

  task automatic expect_true(input bit c, input string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // observe one stage's reads; returns at the negedge after the last read
  task automatic check_reads(input int g, input stage_e st);
    for (int r = 0; r < g; r++) begin
      expect_true(rd_en, "read expected");
      expect_true(rd_stage == st, "stage tag");
      expect_true(int'(rd_addr) == r, "row address");
      expect_true(rd_last == (r == g - 1), "rd_last");
      @(negedge clk);
    end
    expect_true(!rd_en, "no read after the last row");
  endtask

  task automatic wait_random(input int lo, input int span);
    int d;
    d = lo + int'($urandom % 32'(span));
    for (int i = 0; i < d; i++) begin
      expect_true(!rd_en && busy && !done, "idle wait inside a stage");
      @(negedge clk);
    end
  endtask

  initial begin
    int g;
    start = 1'b0; num_groups = '0; xmax_valid = 1'b0; sum_valid = 1'b0; out_last = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // num_groups = 0 is ignored
    start = 1'b1; num_groups = '0;
    @(negedge clk);
    start = 1'b0;
    expect_true(!busy, "start with zero rows ignored");
    for (int op = 0; op < 30; op++) begin
      g = 1 + int'($urandom % 32);
      @(negedge clk);
      start = 1'b1; num_groups = GW'(g);
      #1;
      expect_true(clear, "clear with start");
      @(negedge clk);
      start = 1'b0;
      expect_true(busy, "busy after start");
      check_reads(g, ST_MAX);
      wait_random(0, 5);
      xmax_valid = 1'b1;
      @(negedge clk);
      check_reads(g, ST_SUM);
      wait_random(0, 6);
      sum_valid = 1'b1;
      #1;
      expect_true(log_go, "log_go with sum_valid");
      @(negedge clk);
      check_reads(g, ST_OUT);
      wait_random(0, 6);
      out_last = 1'b1;
      @(negedge clk);
      out_last = 1'b0;
      expect_true(done && !busy, "done after the last result");
      @(negedge clk);
      expect_true(!done, "done is a single pulse");
      xmax_valid = 1'b0;
      sum_valid = 1'b0;
    end
    expect_true(log_pulses == 30, "log_go pulsed once per operation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int log_pulses = 0;
  always @(posedge clk) if (log_go) log_pulses++;
endmodule

// Softmax unit: P_M = exp((X_M - X_max) - ln(sum_L exp(X_L - X_max))) over N floating-point
// inputs (float16 by default, float32 with PRECISION = FLOAT32), processed PA at a time in three
// stages.
//   Stage 1  max_block      X_max over all rows.
//   Stage 2  sub_array      X_L - X_max           (block 2)
//            exp_array      exp of the difference (block 3)
//            adder_tree     sum of exponentials   (block 4)
//   Stage 3  log_unit       XLOG = ln(sum)        (block 5)
//            presub_logsub  X_M - X_max - XLOG    (block 6)
//            exp_array      final probabilities   (block 7)
// The inputs sit in a single-port on-chip memory (input_mem) that is read once per stage. With
// STORAGE_REG = 1 the rows read in stage 1 are also written into an internal register buffer
// (input_buffer) and stages 2 and 3 read that buffer instead of the memory. softmax_ctrl
// sequences the stages. The block structure, the stage ordering and the recomputation of
// X_M - X_max in stage 3 follow the source architecture; the host port, the result stream and
// all handshakes are this design's own.
// Interface: while idle the host writes rows (host_we/host_addr/host_wdata; row r holds inputs
// r*PA .. r*PA+PA-1, lane i in bits W*i+W-1:W*i,
// W = 16 or 32). start with num_groups = N/PA (1..MAX_INPUTS/PA)
// runs one softmax; busy is high meanwhile. The results leave as rows on out_valid/out_group/
// out_prob in row order, and done pulses with the cycle after the last row.
// Timing: one row per cycle in every stage. Start to done takes
// 3*N/PA + log2(PA) + floor(log2(PA)/3) + 13 cycles.
module softmax_top
  import softmax_pkg::*;
#(
  parameter int PA          = 4,      // parallelism: lanes processed per cycle (power of 2)
  parameter int MAX_INPUTS  = 4096,   // capacity of the input memory in values
  parameter bit STORAGE_REG = 1'b0,   // 0: re-read the memory in each stage, 1: internal buffer
  parameter precision_e PRECISION = FLOAT16,   // data format of the whole datapath
  localparam int EW   = exp_bits(PRECISION),
  localparam int MW   = frac_bits(PRECISION),
  localparam int W    = 1 + EW + MW,
  localparam int ROWS = MAX_INPUTS / PA,
  localparam int AW   = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           host_we,
  input  logic [AW-1:0]  host_addr,
  input  logic [PA-1:0][W-1:0] host_wdata,
  input  logic           start,
  input  logic [AW:0]    num_groups,
  output logic           busy,
  output logic           done,
  output logic           out_valid,
  output logic [AW-1:0]  out_group,
  output logic [PA-1:0][W-1:0] out_prob
);
  // control
  logic    clear, rd_en, rd_last, log_go, out_last;
  logic [AW-1:0] rd_addr;
  stage_e  rd_stage, stage;
  logic    xmax_valid, sum_valid;
  logic [W-1:0]   xmax, sum, xlog;
  logic    xlog_valid, xlog_ready;

  softmax_ctrl #(.GW(AW + 1)) u_ctrl (
    .clk, .rst_n, .start, .num_groups, .xmax_valid, .sum_valid, .out_last,
    .clear, .rd_en, .rd_addr, .rd_last, .rd_stage, .log_go, .busy, .done, .stage
  );

  // input storage
  logic            mem_re;
  logic [PA-1:0][W-1:0]  mem_rdata, row;
  logic            d_valid, d_last;
  stage_e          d_stage;
  logic [AW-1:0]   d_addr;

  assign mem_re = rd_en && (!STORAGE_REG || rd_stage == ST_MAX);

  input_mem #(.WIDTH(W * PA), .DEPTH(ROWS)) u_mem (
    .clk, .we(host_we && !busy), .re(mem_re), .addr(busy ? rd_addr : host_addr),
    .wdata(host_wdata), .rdata(mem_rdata)
  );

  // read data returns one cycle after the read; its tags are delayed to match
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid <= 1'b0;
      d_last <= 1'b0;
      d_stage <= ST_IDLE;
      d_addr <= '0;
    end else begin
      d_valid <= rd_en;
      d_last <= rd_en && rd_last;
      d_stage <= rd_stage;
      d_addr <= rd_addr;
    end
  end

  if (STORAGE_REG) begin : g_buffer
    logic [PA-1:0][W-1:0] buf_rdata;
    input_buffer #(.WIDTH(W * PA), .DEPTH(ROWS)) u_buf (
      .clk, .we(d_valid && d_stage == ST_MAX), .waddr(d_addr), .wdata(mem_rdata),
      .re(rd_en && rd_stage != ST_MAX), .raddr(rd_addr), .rdata(buf_rdata)
    );
    assign row = (d_stage == ST_MAX) ? mem_rdata : buf_rdata;
  end else begin : g_no_buffer
    assign row = mem_rdata;
  end

  // stage 1: block 1
  max_block #(.PA(PA), .EW(EW), .MW(MW)) u_max (
    .clk, .rst_n, .clear, .in_valid(d_valid && d_stage == ST_MAX), .in_last(d_last),
    .in_data(row), .xmax, .xmax_valid
  );

  // stage 2: blocks 2, 3, 4
  logic           s2_valid, s2_last, e2_valid, e2_last;
  logic [PA-1:0][W-1:0] s2_d, e2_y;

  sub_array #(.PA(PA), .EW(EW), .MW(MW)) u_sub (
    .clk, .rst_n, .in_valid(d_valid && d_stage == ST_SUM), .in_last(d_last), .in_a(row),
    .in_b(xmax), .out_valid(s2_valid), .out_last(s2_last), .out_d(s2_d)
  );

  exp_array #(.PA(PA), .EW(EW), .MW(MW)) u_exp2 (
    .clk, .rst_n, .in_valid(s2_valid), .in_last(s2_last), .in_x(s2_d),
    .out_valid(e2_valid), .out_last(e2_last), .out_y(e2_y)
  );

  adder_tree #(.PA(PA), .EW(EW), .MW(MW)) u_add (
    .clk, .rst_n, .clear, .in_valid(e2_valid), .in_last(e2_last), .in_data(e2_y),
    .sum, .sum_valid
  );

  // stage 3: blocks 5, 6, 7
  log_unit #(.EW(EW), .MW(MW)) u_log (.clk, .rst_n, .in_valid(log_go), .x(sum), .out_valid(xlog_valid), .y(xlog));

  logic           s3_valid, s3_last;
  logic [PA-1:0][W-1:0] s3_d;

  presub_logsub #(.PA(PA), .EW(EW), .MW(MW)) u_sub6 (
    .clk, .rst_n, .in_valid(d_valid && d_stage == ST_OUT), .in_last(d_last), .in_x(row),
    .xmax, .xlog, .out_valid(s3_valid), .out_last(s3_last), .out_d(s3_d)
  );

  exp_array #(.PA(PA), .EW(EW), .MW(MW)) u_exp7 (
    .clk, .rst_n, .in_valid(s3_valid), .in_last(s3_last), .in_x(s3_d),
    .out_valid, .out_last, .out_y(out_prob)
  );

  // row index of the result stream
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_group <= '0;
    else if (clear) out_group <= '0;
    else if (out_valid) out_group <= out_group + 1'b1;
  end

  // stage ordering: differences are formed only against a final maximum, and logsub only
  // against a final logarithm
  assert property (@(posedge clk) disable iff (!rst_n) (d_valid && d_stage == ST_SUM) |-> xmax_valid)
    else $error("stage 2 started before the maximum was final");
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) xlog_ready <= 1'b0;
    else if (clear) xlog_ready <= 1'b0;
    else if (xlog_valid) xlog_ready <= 1'b1;
  end

  assert property (@(posedge clk) disable iff (!rst_n) (d_valid && d_stage == ST_OUT) |=> xlog_ready)
    else $error("logsub used an unfinished logarithm");
endmodule

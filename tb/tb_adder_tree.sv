// Self-checking test of adder_tree (PA = 4): operations of 1 to 40 rows of values in (0, 1].
// The reference repeats the tree's summation order (pairs, then pairs of pairs, then the running
// accumulator), rounding every double-precision addition to float16, so the sum must match bit
// for bit; sum_valid must rise log2(PA) + 1 cycles after the last row.
module tb_adder_tree;
  import fp_ref_pkg::*;
  localparam int PA = 4;
  localparam int LAT = $clog2(PA) + 1;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                clear, in_valid, in_last, sum_valid;
  logic [PA-1:0][15:0] in_data;
  logic [15:0]         sum;
  int checks = 0, failures = 0;

  adder_tree #(.PA(PA)) dut (.clk, .rst_n, .clear, .in_valid, .in_last, .in_data, .sum, .sum_valid);

  function automatic logic [15:0] add16(input logic [15:0] a, input logic [15:0] b);
    return real_to_fp16(fp16_to_real(a) + fp16_to_real(b));
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] acc, rowsum;
    int rows, wait_cycles;
    clear = 1'b0; in_valid = 1'b0; in_last = 1'b0; in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < 60; op++) begin
      rows = 1 + int'($urandom % 40);
      @(negedge clk);
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      acc = 16'h0000;
      for (int r = 0; r < rows; r++) begin
        in_valid = 1'b1;
        in_last = (r == rows - 1);
        for (int i = 0; i < PA; i++) in_data[i] = {1'b0, rand_fp16(5, 14)} & 16'h7fff;
        rowsum = add16(add16(in_data[0], in_data[1]), add16(in_data[2], in_data[3]));
        acc = add16(acc, rowsum);
        @(negedge clk);
      end
      in_valid = 1'b0;
      in_last = 1'b0;
      wait_cycles = 1;
      while (!sum_valid && wait_cycles < 20) begin
        @(negedge clk);
        wait_cycles++;
      end
      checks++;
      if (wait_cycles != LAT) begin
        failures++;
        $display("op %0d: sum_valid after %0d cycles, expected %0d", op, wait_cycles, LAT);
      end
      checks++;
      if (sum != acc) begin
        failures++;
        $display("op %0d: sum %h expected %h", op, sum, acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

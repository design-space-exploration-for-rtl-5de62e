// Self-checking test of max_block at PA = 16, where the comparator tree has a pipeline register
// after its third level. Random rows of float16 values (both signs, wide range) are streamed in
// operations of 1 to 40 rows; the final maximum is compared with a maximum taken over the values
// as reals, and xmax_valid must rise exactly floor(log2(PA)/3) + 1 cycles after the last row.
module tb_max_block;
  import fp_ref_pkg::*;
  localparam int PA = 16;
  localparam int LAT = $clog2(PA) / 3 + 1;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                clear, in_valid, in_last, xmax_valid;
  logic [PA-1:0][15:0] in_data;
  logic [15:0]         xmax;
  int checks = 0, failures = 0;

  max_block #(.PA(PA)) dut (.clk, .rst_n, .clear, .in_valid, .in_last, .in_data, .xmax, .xmax_valid);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real best;
    int  rows, wait_cycles;
    logic [15:0] best_h;
    clear = 1'b0; in_valid = 1'b0; in_last = 1'b0; in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < 60; op++) begin
      rows = 1 + int'($urandom % 40);
      @(negedge clk);
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      best = -1.0e9;
      best_h = '0;
      for (int r = 0; r < rows; r++) begin
        in_valid = 1'b1;
        in_last = (r == rows - 1);
        for (int i = 0; i < PA; i++) begin
          in_data[i] = (op % 3 == 0) ? (rand_fp16(1, 30) | 16'h8000) : rand_fp16(1, 30);
          if (fp16_to_real(in_data[i]) > best) begin
            best = fp16_to_real(in_data[i]);
            best_h = in_data[i];
          end
        end
        @(negedge clk);
      end
      in_valid = 1'b0;
      in_last = 1'b0;
      // the last row was sampled at the previous posedge
      wait_cycles = 1;
      while (!xmax_valid && wait_cycles < 20) begin
        @(negedge clk);
        wait_cycles++;
      end
      checks++;
      if (wait_cycles != LAT) begin
        failures++;
        $display("op %0d: xmax_valid after %0d cycles, expected %0d", op, wait_cycles, LAT);
      end
      checks++;
      if (fp16_to_real(xmax) != best) begin
        failures++;
        $display("op %0d: max %h expected %h", op, xmax, best_h);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

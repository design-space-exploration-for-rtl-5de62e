// Self-checking test of input_mem: fills a scoreboard-tracked memory with random writes, then
// mixes random reads and writes; each read must return the last value written to that address
// one cycle later, and rdata must hold its value while no read is made.
module tb_input_mem;
  localparam int WIDTH = 64, DEPTH = 64;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                     we, re;
  logic [$clog2(DEPTH)-1:0] addr;
  logic [WIDTH-1:0]         wdata, rdata, model [DEPTH], expect_q;
  int checks = 0, failures = 0;

  input_mem #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.clk, .we, .re, .addr, .wdata, .rdata);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; re = 1'b0; addr = '0; wdata = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; addr = a[$clog2(DEPTH)-1:0]; wdata = {$urandom, $urandom};
      model[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if ($urandom % 3 == 0) begin
        we = 1'b1; re = 1'b0; addr = 6'($urandom); wdata = {$urandom, $urandom};
        model[addr] = wdata;
        @(negedge clk);
        we = 1'b0;
      end else begin
        we = 1'b0; re = 1'b1; addr = 6'($urandom);
        expect_q = model[addr];
        @(negedge clk);
        re = 1'b0;
        addr = addr + 6'd1 + 6'($urandom % 60);   // another address, not read
        checks++;
        if (rdata != expect_q) begin
          failures++;
          if (failures < 10) $display("read %0d: got %h expected %h", addr, rdata, expect_q);
        end
        @(negedge clk);
        checks++;
        if (rdata != expect_q) begin
          failures++;
          $display("rdata did not hold");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

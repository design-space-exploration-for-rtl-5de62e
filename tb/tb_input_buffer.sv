// Self-checking test of input_buffer: writes and reads in the same cycles at random addresses;
// each read must return, one cycle later, the value last written before that read's clock edge.
module tb_input_buffer;
  localparam int WIDTH = 64, DEPTH = 32;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                     we, re;
  logic [$clog2(DEPTH)-1:0] waddr, raddr;
  logic [WIDTH-1:0]         wdata, rdata, model [DEPTH], expect_q;
  bit                       written [DEPTH];
  bit                       pending;
  int checks = 0, failures = 0;

  input_buffer #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; re = 1'b0; waddr = '0; raddr = '0; wdata = '0; pending = 1'b0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if (pending) begin
        checks++;
        if (rdata != expect_q) begin
          failures++;
          if (failures < 10) $display("read: got %h expected %h", rdata, expect_q);
        end
      end
      we = 1'($urandom);
      waddr = 5'($urandom);
      wdata = {$urandom, $urandom};
      raddr = 5'($urandom);
      re = written[raddr] && 1'($urandom);
      pending = re;
      expect_q = model[raddr];     // value before this edge's write
      if (we) begin
        model[waddr] = wdata;
        written[waddr] = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

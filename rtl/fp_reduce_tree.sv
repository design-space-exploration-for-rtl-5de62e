// Pipelined binary reduction tree over PA floating-point lanes, shared by the max block
// (comparators) and the adder tree (adders).
// Level l (1..log2(PA)) combines pairs of level l-1; a pipeline register follows level l when
// l is a multiple of REG_EVERY. The max block uses REG_EVERY = 3 ("pipeline registers after every
// 3 comparator levels"), the adder tree REG_EVERY = 1 ("after every adder"). A valid and a last
// flag travel with the data. Latency: floor(log2(PA) / REG_EVERY) cycles; PA = 1 is a wire, and
// clk/rst_n are then unused.
// Interface: in_valid/in_last/in_data in, out_valid/out_last/out_data out, no back-pressure.
module fp_reduce_tree
  import softmax_pkg::*;
#(
  parameter int  PA        = 4,
  parameter int  EW        = 5,
  parameter int  MW        = 10,
  parameter bit  IS_ADD    = 1'b0,   // 0: maximum, 1: sum
  parameter int  REG_EVERY = 3,
  localparam int W = 1 + EW + MW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_last,
  input  logic [PA-1:0][W-1:0] in_data,
  output logic                 out_valid,
  output logic                 out_last,
  output logic [W-1:0]         out_data
);
  localparam int L = $clog2(PA);

  for (genvar l = 0; l <= L; l++) begin : g_lvl
    localparam int NW = PA >> l;
    logic [W-1:0] node [NW];
    logic         v, lst;
    if (l == 0) begin : g_in
      for (genvar i = 0; i < NW; i++) begin : g_lane
        assign node[i] = in_data[i];
      end
      assign v = in_valid;
      assign lst = in_last;
    end else begin : g_op
      logic [W-1:0] res [NW];
      for (genvar i = 0; i < NW; i++) begin : g_node
        if (IS_ADD) begin : g_add
          fp_addsub #(.EW(EW), .MW(MW)) u_add (
            .a(g_lvl[l-1].node[2*i]), .b(g_lvl[l-1].node[2*i+1]), .sub(1'b0), .y(res[i])
          );
        end else begin : g_max
          assign res[i] = fp_gt(32'(g_lvl[l-1].node[2*i+1]), 32'(g_lvl[l-1].node[2*i]), W)
                        ? g_lvl[l-1].node[2*i+1] : g_lvl[l-1].node[2*i];
        end
      end
      if (l % REG_EVERY == 0) begin : g_reg
        always_ff @(posedge clk or negedge rst_n) begin
          if (!rst_n) begin
            v <= 1'b0;
            lst <= 1'b0;
          end else begin
            v <= g_lvl[l-1].v;
            lst <= g_lvl[l-1].v & g_lvl[l-1].lst;
          end
        end
        always_ff @(posedge clk) begin
          if (g_lvl[l-1].v) node <= res;
        end
      end else begin : g_comb
        assign node = res;
        assign v = g_lvl[l-1].v;
        assign lst = g_lvl[l-1].lst;
      end
    end
  end

  assign out_data = g_lvl[L].node[0];
  assign out_valid = g_lvl[L].v;
  assign out_last = g_lvl[L].lst;
endmodule

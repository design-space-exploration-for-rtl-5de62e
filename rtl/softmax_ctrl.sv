// Control logic of the softmax unit: sequences the three stages over num_groups rows of PA inputs.
// Stage 1 reads every row once for the max block; when X_max is final (xmax_valid), stage 2 reads
// every row again for subtract / exponentiate / accumulate; when the sum is final (sum_valid) it
// starts the log unit (log_go) and stage 3 reads every row a third time for presub / logsub /
// exponentiate, finishing when the last result row leaves the pipeline (out_last). The stage
// ordering follows the source architecture ("Stage 2 can only be triggered once the max value is
// found", "Stage 3 ... only when Stage 2 is finished"); the FSM encoding, the handshakes and the
// one-read-per-cycle schedule are this design's own.
// Interface: start is taken in ST_IDLE when num_groups is non-zero, and clear pulses in that cycle.
// Each read carries its row address, the stage it serves and a last-row flag. done pulses for one
// cycle as the operation ends. Timing: N/PA reads per stage, back to back.
module softmax_ctrl
  import softmax_pkg::*;
#(
  parameter int GW = 11   // width of num_groups; row addresses are GW-1 bits
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [GW-1:0] num_groups,
  input  logic          xmax_valid,
  input  logic          sum_valid,
  input  logic          out_last,
  output logic          clear,
  output logic          rd_en,
  output logic [GW-2:0] rd_addr,
  output logic          rd_last,
  output stage_e        rd_stage,
  output logic          log_go,
  output logic          busy,
  output logic          done,
  output stage_e        stage
);
  logic [GW-1:0] groups;
  logic [GW-2:0] cnt;
  logic          reading;

  assign reading = (stage == ST_MAX) || (stage == ST_SUM) || (stage == ST_OUT);
  assign rd_en = reading;
  assign rd_addr = cnt;
  assign rd_last = reading && ({1'b0, cnt} == groups - 1'b1);
  assign rd_stage = stage;
  assign busy = (stage != ST_IDLE);
  assign clear = (stage == ST_IDLE) && start && (num_groups != '0);
  assign log_go = (stage == ST_SUM_WAIT) && sum_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage <= ST_IDLE;
      cnt <= '0;
      groups <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (stage)
        ST_IDLE: begin
          if (clear) begin
            groups <= num_groups;
            cnt <= '0;
            stage <= ST_MAX;
          end
        end
        ST_MAX, ST_SUM, ST_OUT: begin
          cnt <= cnt + 1'b1;
          if (rd_last) begin
            cnt <= '0;
            stage <= stage_e'(stage + 3'd1);   // to the matching *_WAIT state
          end
        end
        ST_MAX_WAIT: if (xmax_valid) stage <= ST_SUM;
        ST_SUM_WAIT: if (sum_valid) stage <= ST_OUT;
        ST_OUT_WAIT: begin
          if (out_last) begin
            done <= 1'b1;
            stage <= ST_IDLE;
          end
        end
        default: stage <= ST_IDLE;
      endcase
    end
  end

  // a row count that the address counter cannot reach would never end a stage
  assert property (@(posedge clk) disable iff (!rst_n) clear |-> (num_groups <= (1 << (GW - 1))))
    else $error("num_groups exceeds the memory depth");
endmodule

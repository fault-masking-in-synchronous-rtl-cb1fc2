// Synchronous NSTAGES-deep pipeline of rising-edge D flip-flops.
//
// All flip-flops share one clock; on each rising edge stage 0 takes d and
// every later stage takes the previous stage's output, so q is d delayed by
// NSTAGES cycles. There is no logic between the stages. This is the
// synchronous reference the asynchronous pipelines are compared with: a
// disturbance on a flip-flop's D input is masked unless it is present while the
// flip-flop samples (latching-window masking). Three stages follow the
// reference circuit; the data width and the synchronous active-high reset are
// this design's choices.
//
// Fault injection (pulse model): while flt_force[i] is 1, flip-flop i sees
// flt_value[i] on its D input instead of the fault-free value. stage_q gives
// every flip-flop's output (stage_q[NSTAGES-1] equals q).
module sync_pipeline #(
  parameter int unsigned NSTAGES = 3,
  parameter int unsigned WIDTH   = 8
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [WIDTH-1:0]              d,
  output logic [WIDTH-1:0]              q,
  input  logic [NSTAGES-1:0]            flt_force,
  input  logic [NSTAGES-1:0][WIDTH-1:0] flt_value,
  output logic [NSTAGES-1:0][WIDTH-1:0] stage_q
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [NSTAGES-1:0][WIDTH-1:0] d_ff;

  for (genvar i = 0; i < NSTAGES; i++) begin : g_stage
    if (i == 0) begin : g_first
      assign d_ff[i] = flt_force[i] ? flt_value[i] : d;
    end else begin : g_next
      assign d_ff[i] = flt_force[i] ? flt_value[i] : stage_q[i-1];
    end

    always_ff @(posedge clk) begin
      if (rst) stage_q[i] <= '0;
      else     stage_q[i] <= d_ff[i];
    end
  end

  assign q = stage_q[NSTAGES-1];
endmodule

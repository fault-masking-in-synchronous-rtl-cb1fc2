// Three fault-injection targets side by side: a 4-phase bundled-data pipeline,
// a 2-phase bundled-data pipeline and a synchronous flip-flop pipeline, each
// three stages deep.
//
// The three designs move data the same way (a FIFO of three storage stages with
// no logic between them) but differ in what decides when a stage stores: a
// Muller C-element handshake, an XNOR/latch transition handshake, or a global
// clock. Comparing how often a short disturbance on a control or data wire
// turns into a wrong event sequence is the purpose of putting them together.
// The pipelines are independent; each keeps its own channel ports, its own
// reset, and its fault-injection and observation ports (see fp_stage, tp_stage
// and sync_pipeline), all brought out unchanged. All parameters are the
// pipelines' defaults.
module fault_masking_top
  import bd_pkg::*;
(
  // 4-phase bundled-data pipeline
  input  logic                fp_rst,
  input  logic                fp_rin,
  output logic                fp_ain,
  input  logic [7:0]          fp_data_in,
  output logic                fp_rout,
  input  logic                fp_aout,
  output logic [7:0]          fp_data_out,
  input  ctrl_vec_t [2:0]     fp_flt_force,
  input  ctrl_vec_t [2:0]     fp_flt_value,
  output ctrl_vec_t [2:0]     fp_sig,
  // 2-phase bundled-data pipeline
  input  logic                tp_rst,
  input  logic                tp_rin,
  output logic                tp_ain,
  input  logic [7:0]          tp_data_in,
  output logic                tp_rout,
  input  logic                tp_aout,
  output logic [7:0]          tp_data_out,
  input  ctrl_vec_t [2:0]     tp_flt_force,
  input  ctrl_vec_t [2:0]     tp_flt_value,
  output ctrl_vec_t [2:0]     tp_sig,
  // synchronous pipeline
  input  logic                sy_clk,
  input  logic                sy_rst,
  input  logic [7:0]          sy_d,
  output logic [7:0]          sy_q,
  input  logic [2:0]          sy_flt_force,
  input  logic [2:0][7:0]     sy_flt_value,
  output logic [2:0][7:0]     sy_stage_q
);
  timeunit 1ps;
  timeprecision 1ps;

  fp_pipeline u_fp (
    .rst(fp_rst), .rin(fp_rin), .ain(fp_ain), .data_in(fp_data_in),
    .rout(fp_rout), .aout(fp_aout), .data_out(fp_data_out),
    .flt_force(fp_flt_force), .flt_value(fp_flt_value), .sig(fp_sig)
  );

  tp_pipeline u_tp (
    .rst(tp_rst), .rin(tp_rin), .ain(tp_ain), .data_in(tp_data_in),
    .rout(tp_rout), .aout(tp_aout), .data_out(tp_data_out),
    .flt_force(tp_flt_force), .flt_value(tp_flt_value), .sig(tp_sig)
  );

  sync_pipeline u_sy (
    .clk(sy_clk), .rst(sy_rst), .d(sy_d), .q(sy_q),
    .flt_force(sy_flt_force), .flt_value(sy_flt_value), .stage_q(sy_stage_q)
  );
endmodule

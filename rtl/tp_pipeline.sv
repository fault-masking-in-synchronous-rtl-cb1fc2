// Linear 2-phase bundled-data pipeline of NSTAGES tp_stage controllers.
//
// Stage i's Rout is stage i+1's Rin, and stage i+1's Ain (its Rout after the
// delay element D) is stage i's Aout; the data latches are chained alongside.
// The input channel Rin/Ain and output channel Rout/Aout use transition
// signalling: every toggle of Rin offers a new data item (data_in valid before
// the toggle and held until Ain toggles), every toggle of Rout delivers one,
// to be answered by a toggle of Aout. With a producer that answers each Ain
// toggle after T_Rin and a consumer that answers each Rout toggle after
// T_Aout, one item takes the slowest of  T_Rin + TD2 + Delta  (input),
// 2 TXNOR + 2 TD2 + Delta  (between stages)  and  T_Aout + TXNOR + TD2
// (output). Three stages and the delay values follow the reference circuit;
// the fault ports and observation vector are those of tp_stage, one entry per
// stage.
module tp_pipeline
  import bd_pkg::*;
#(
  parameter int unsigned NSTAGES  = 3,
  parameter int unsigned WIDTH    = 8,
  parameter int unsigned TXNOR_PS = 130,
  parameter int unsigned TD2_PS   = 2000,
  parameter int unsigned DELTA_PS = 15000
) (
  input  logic                    rst,
  input  logic                    rin,
  output logic                    ain,
  input  logic [WIDTH-1:0]        data_in,
  output logic                    rout,
  input  logic                    aout,
  output logic [WIDTH-1:0]        data_out,
  input  ctrl_vec_t [NSTAGES-1:0] flt_force,
  input  ctrl_vec_t [NSTAGES-1:0] flt_value,
  output ctrl_vec_t [NSTAGES-1:0] sig
);
  timeunit 1ps;
  timeprecision 1ps;

  logic             req [NSTAGES+1];
  logic             ack [NSTAGES+1];
  logic [WIDTH-1:0] dat [NSTAGES+1];

  assign req[0]       = rin;
  assign dat[0]       = data_in;
  assign ack[NSTAGES] = aout;
  assign ain          = ack[0];
  assign rout         = req[NSTAGES];
  assign data_out     = dat[NSTAGES];

  for (genvar i = 0; i < NSTAGES; i++) begin : g_stage
    tp_stage #(
      .WIDTH(WIDTH), .TXNOR_PS(TXNOR_PS), .TD2_PS(TD2_PS), .DELTA_PS(DELTA_PS)
    ) u_stage (
      .rst      (rst),
      .rin      (req[i]),
      .ain      (ack[i]),
      .rout     (req[i+1]),
      .aout     (ack[i+1]),
      .data_in  (dat[i]),
      .data_out (dat[i+1]),
      .flt_force(flt_force[i]),
      .flt_value(flt_value[i]),
      .sig      (sig[i])
    );
  end
endmodule

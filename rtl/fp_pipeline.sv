// Linear 4-phase bundled-data FIFO pipeline of NSTAGES fp_stage controllers.
//
// Stage i's Rout is stage i+1's Rin, and stage i+1's Ain is stage i's Aout;
// the data latches are chained alongside. The pipeline's own Rin/Ain pair is
// the input channel (driven by a producer) and its Rout/Aout pair the output
// channel (answered by a consumer); both use the 4-phase protocol with active
// rising edges, and data_in must be valid when Rin rises and held until Ain
// rises. With a producer that raises or lowers Rin T_Rin after each Ain edge
// and a consumer that copies Rout to Aout after T_Aout, the steady-state cycle
// is set by the slowest of the loops  T_Rin + M + Delta  (input),
// 2M + Delta  (between stages)  and  M + T_Aout  (output), each traversed twice
// per data item. Three stages and the delay values follow the reference
// circuit; the fault ports and observation vector are those of fp_stage, one
// entry per stage.
module fp_pipeline
  import bd_pkg::*;
#(
  parameter int unsigned NSTAGES  = 3,
  parameter int unsigned WIDTH    = 8,
  parameter int unsigned M_PS     = 3000,
  parameter int unsigned DELTA_PS = 13000,
  parameter int unsigned D2_PS    = 1000
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
    fp_stage #(
      .WIDTH(WIDTH), .M_PS(M_PS), .DELTA_PS(DELTA_PS), .D2_PS(D2_PS)
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

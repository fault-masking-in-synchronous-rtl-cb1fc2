// One stage of a 2-phase (transition-signalling) bundled-data pipeline.
//
// A request latch passes the incoming request Rin to the outgoing request Rout
// while the latch control Lt is high, and a data latch on the same Lt holds
// the stage's data. Lt is the XNOR of Rout and the successor's acknowledge
// Aout: it is high (stage empty, latches open) when the two are equal and
// drops as soon as a new request has passed (Rout differs from Aout), closing
// both latches until the successor acknowledges by toggling Aout. Rout also
// passes a delay element D (DELTA_PS) and becomes the acknowledge Ain to the
// predecessor, which gives the successor time to take the data. Delays: the
// XNOR gate TXNOR_PS (130 ps) and the request latch TD2_PS (2 ns) are modelled
// as delay elements at the gate and latch outputs, DELTA_PS defaults to 15 ns;
// these are the values of the reference circuit. Treating the 2 ns as the
// request latch's delay, and the data width, are this design's choices.
//
// Fault injection (pulse model), as in fp_stage: while flt_force[s] is 1,
// signal s is driven to flt_value[s]. Rin is forced at the request latch input,
// Aout at the XNOR input; Rout, Ain and Lt on the stage's own nets. sig returns
// the five signals after fault injection in bd_pkg::ctrl_sig_e order.
module tp_stage
  import bd_pkg::*;
#(
  parameter int unsigned WIDTH    = 8,
  parameter int unsigned TXNOR_PS = 130,
  parameter int unsigned TD2_PS   = 2000,
  parameter int unsigned DELTA_PS = 15000
) (
  input  logic             rst,
  input  logic             rin,
  output logic             ain,
  output logic             rout,
  input  logic             aout,
  input  logic [WIDTH-1:0] data_in,
  output logic [WIDTH-1:0] data_out,
  input  ctrl_vec_t        flt_force,
  input  ctrl_vec_t        flt_value,
  output ctrl_vec_t        sig
);
  timeunit 1ps;
  timeprecision 1ps;

  logic rin_f, aout_f, req_q, rout_raw, xnor_out, lt_raw, lt_f, ain_raw;

  assign rin_f  = flt_force[SIG_RIN]  ? flt_value[SIG_RIN]  : rin;
  assign aout_f = flt_force[SIG_AOUT] ? flt_value[SIG_AOUT] : aout;

  d_latch #(.WIDTH(1), .OPEN_HIGH(1'b1)) u_req (
    .rst(rst), .en(lt_f), .d(rin_f), .q(req_q)
  );
  delay_elem #(.DELAY_PS(TD2_PS)) u_dl (.a(req_q), .y(rout_raw));
  assign rout = flt_force[SIG_ROUT] ? flt_value[SIG_ROUT] : rout_raw;

  assign xnor_out = ~(rout ^ aout_f);
  delay_elem #(.DELAY_PS(TXNOR_PS)) u_dx (.a(xnor_out), .y(lt_raw));
  assign lt_f = flt_force[SIG_LT] ? flt_value[SIG_LT] : lt_raw;

  delay_elem #(.DELAY_PS(DELTA_PS)) u_d (.a(rout), .y(ain_raw));
  assign ain = flt_force[SIG_AIN] ? flt_value[SIG_AIN] : ain_raw;

  d_latch #(.WIDTH(WIDTH), .OPEN_HIGH(1'b1)) u_dat (
    .rst(rst), .en(lt_f), .d(data_in), .q(data_out)
  );

  always_comb begin
    sig           = '0;
    sig[SIG_RIN]  = rin_f;
    sig[SIG_AIN]  = ain;
    sig[SIG_ROUT] = rout;
    sig[SIG_AOUT] = aout_f;
    sig[SIG_LT]   = lt_f;
  end
endmodule

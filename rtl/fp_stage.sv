// One stage of a 4-phase bundled-data micropipeline (simple Muller control).
//
// The control is a C-element whose inputs are the incoming request Rin and the
// inverted acknowledge Aout of the successor. Its output, after the C-element
// delay M_PS, is the outgoing request Rout. Rout passes a delay element
// (DELTA_PS) to become the acknowledge Ain to the predecessor, and Ain passes a
// second delay element (D2_PS) to become the latch control Lt. The data latch
// is transparent while Lt is low and holds while Lt is high. All handshake
// edges are active rising; the falling edges are the return-to-zero phase.
// The three delays default to the values used for the reference circuit
// (M = 3 ns, Delta = 13 ns, D2 = 1 ns); the D2 element between Ain and Lt is
// part of that reference circuit. The data width is this design's choice.
//
// Fault injection (pulse model): for each of the five control signals, while
// flt_force[s] is 1 the signal is driven to flt_value[s] instead of its
// fault-free value. Rin and Aout are forced where they enter this stage's
// C-element; Rout, Ain and Lt are forced on the stage's own nets, so every
// reader of the net sees the fault. sig returns the five signals as seen after
// fault injection, in bd_pkg::ctrl_sig_e order. Leave flt_force at 0 for
// normal operation. rst clears the C-element and the latch.
module fp_stage
  import bd_pkg::*;
#(
  parameter int unsigned WIDTH    = 8,
  parameter int unsigned M_PS     = 3000,
  parameter int unsigned DELTA_PS = 13000,
  parameter int unsigned D2_PS    = 1000
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

  logic rin_f, aout_f, c_out, rout_raw, ain_raw, lt_raw, lt_f;

  assign rin_f  = flt_force[SIG_RIN]  ? flt_value[SIG_RIN]  : rin;
  assign aout_f = flt_force[SIG_AOUT] ? flt_value[SIG_AOUT] : aout;

  muller_c u_c (.rst(rst), .a(rin_f), .b(~aout_f), .c(c_out));

  delay_elem #(.DELAY_PS(M_PS)) u_dm (.a(c_out), .y(rout_raw));
  assign rout = flt_force[SIG_ROUT] ? flt_value[SIG_ROUT] : rout_raw;

  delay_elem #(.DELAY_PS(DELTA_PS)) u_delta (.a(rout), .y(ain_raw));
  assign ain = flt_force[SIG_AIN] ? flt_value[SIG_AIN] : ain_raw;

  delay_elem #(.DELAY_PS(D2_PS)) u_d2 (.a(ain), .y(lt_raw));
  assign lt_f = flt_force[SIG_LT] ? flt_value[SIG_LT] : lt_raw;

  d_latch #(.WIDTH(WIDTH), .OPEN_HIGH(1'b0)) u_lat (
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

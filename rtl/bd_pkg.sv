// Shared definitions for the bundled-data pipeline stages.
//
// Every asynchronous stage exposes the same five handshake-level signals, both
// for observation (the event trace that fault analysis compares) and for fault
// injection. ctrl_sig_e names the bit positions of that five-bit vector; the
// order Rin, Ain, Rout, Aout, Lt is the one used for state listings of a stage.
// Delays throughout the asynchronous models are in picoseconds (timeunit 1ps).
package bd_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned NSIG = 5;

  typedef enum int unsigned {
    SIG_RIN  = 0,  // request into the stage
    SIG_AIN  = 1,  // acknowledge from the stage back to its predecessor
    SIG_ROUT = 2,  // request from the stage to its successor
    SIG_AOUT = 3,  // acknowledge from the successor into the stage
    SIG_LT   = 4   // latch control of the stage
  } ctrl_sig_e;

  typedef logic [NSIG-1:0] ctrl_vec_t;
endpackage

// Behavioural model of a matched delay line (not synthesizable logic).
//
// In silicon a bundled-data delay element is a chain of buffers sized for the
// process; here it is a pure transport delay: every change of a reappears on y
// DELAY_PS picoseconds later, and pulses shorter than the delay are passed, not
// filtered. It also stands for the lumped gate delay of a C-element, an XNOR or
// a latch where a stage needs one. The input value at time zero is forwarded
// as well, so y is valid DELAY_PS after start-up; hold the surrounding reset
// at least that long.
module delay_elem #(
  parameter int unsigned DELAY_PS = 1000
) (
  input  logic a,
  output logic y
);
  timeunit 1ps;
  timeprecision 1ps;

  // One child process per input change, each carrying its own copy of the
  // value, so that several edges can be in flight inside the line at once.
  always begin
    fork
      begin : in_flight
        automatic logic v = a;
        #(DELAY_PS);
        y = v;
      end
    join_none
    @(a);
  end
endmodule

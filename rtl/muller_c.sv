// Muller C-element with asynchronous reset.
//
// The output takes the common value of the two inputs when they agree and
// holds its previous value while they differ; this state-holding behaviour is
// what makes the element the masking point of a Muller pipeline (a glitch on
// one input is ignored unless the other input already has the glitch's value).
// It is written as a level-sensitive latch whose enable is "inputs equal" and
// whose data is input a: the latch inferred here is the intended storage, not
// an accident. rst forces the output low (all handshake wires start at 0).
// Timing: zero delay; the gate delay of a stage is modelled separately by a
// delay element at the C-element output.
module muller_c (
  input  logic rst,
  input  logic a,
  input  logic b,
  output logic c
);
  timeunit 1ps;
  timeprecision 1ps;

  always_latch begin
    if (rst)         c = 1'b0;
    else if (a == b) c = a;
  end
endmodule

// Level-sensitive D-latch, WIDTH bits, with asynchronous reset.
//
// Transparent while en equals OPEN_HIGH, holding otherwise. The 4-phase
// pipeline uses it with OPEN_HIGH = 0 (open while the latch control Lt is low),
// the 2-phase pipeline with OPEN_HIGH = 1 (open while Lt is high) for both its
// request latch and its data latch. rst clears the stored value. The latch is
// the intended storage element of these self-timed stages. Zero delay; any
// latch delay a stage needs is added by a delay element. Verilator's lint
// reports "no latches detected" for the open-low instance inside fp_stage;
// the block does hold its value while closed (the testbench checks both
// polarities), so the report stands as a false alarm of the lint's latch
// detection.
module d_latch #(
  parameter int unsigned WIDTH     = 8,
  parameter bit          OPEN_HIGH = 1'b1
) (
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  timeunit 1ps;
  timeprecision 1ps;

  logic open_now;

  assign open_now = (en == OPEN_HIGH);

  always_latch begin
    if (rst)           q = '0;
    else if (open_now) q = d;
  end
endmodule

// Self-checking testbench for tp_stage (one 2-phase bundled-data stage).
// The testbench plays predecessor and successor by hand. It checks the exact
// delays Rin toggle -> Rout toggle (request latch, 2 ns), Rout -> Lt falling
// (XNOR, 130 ps), Rout -> Ain (delay element, 15 ns) and Aout toggle -> Lt
// rising; that a second request waits while Lt is low; that the data latch
// follows Lt; and the pulse fault ports: a Lt pulse in the idle stage is
// masked, a Rin pulse in the idle stage passes as a Rout pulse and is not
// stored.
module tb_tp_stage;
  import bd_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned TX = 130, TL = 2000, DL = 15000;

  logic       rst, rin, aout, ain, rout;
  logic [7:0] din, dout;
  ctrl_vec_t  ff, fv, sig;
  int checks = 0, failures = 0;
  time t0;

  tp_stage #(.WIDTH(8), .TXNOR_PS(TX), .TD2_PS(TL), .DELTA_PS(DL)) dut (
    .rst(rst), .rin(rin), .ain(ain), .rout(rout), .aout(aout),
    .data_in(din), .data_out(dout), .flt_force(ff), .flt_value(fv), .sig(sig)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  task automatic at(input time dt);
    #(t0 + dt - $time);
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; rin = 0; aout = 0; din = 8'h00; ff = '0; fv = '0;
    #50_000;
    rst = 0;
    #20_000;
    check(rout == 0 && ain == 0 && sig[SIG_LT] == 1, "idle: Rout=0, Ain=0, Lt=1");

    // first request: Rin toggles 0 -> 1
    din = 8'ha5; rin = 1; t0 = $time;
    at(500);            check(dout == 8'ha5, "data latch transparent while Lt high");
    at(TL - 1);         check(rout == 0, "Rout not before latch delay");
    at(TL + 1);         check(rout == 1, "Rout toggles after latch delay");
    at(TL + TX - 1);    check(sig[SIG_LT] == 1, "Lt not before XNOR delay");
    at(TL + TX + 1);    check(sig[SIG_LT] == 0, "Lt falls XNOR delay after Rout");
    at(TL + DL - 1);    check(ain == 0, "Ain not before Delta");
    at(TL + DL + 1);    check(ain == 1, "Ain toggles Delta after Rout");
    din = 8'h3c;
    #1000;              check(dout == 8'ha5, "data latch holds while Lt low");

    // second request while the stage is full: must wait
    rin = 0;
    #20_000;            check(rout == 1, "second request held while Lt low");

    // successor acknowledges: Lt rises, second request passes, Lt falls again
    aout = 1; t0 = $time;
    at(TX - 1);         check(sig[SIG_LT] == 0, "Lt not before XNOR delay");
    at(TX + 1);         check(sig[SIG_LT] == 1, "Lt rises XNOR delay after Aout");
    #1;                 check(dout == 8'h3c, "new data passes");
    at(TX + TL + 1);    check(rout == 0, "held request passes");
    at(2 * TX + TL + 1); check(sig[SIG_LT] == 0, "Lt falls again");
    #30_000 aout = 0;
    #30_000;            check(rout == 0 && ain == 0 && sig[SIG_LT] == 1, "idle again");

    // fault on Lt in the idle stage: masked (Rin equals Rout)
    ff[SIG_LT] = 1; fv[SIG_LT] = 0;
    #500 ff[SIG_LT] = 0;
    #30_000;            check(rout == 0 && ain == 0 && sig[SIG_LT] == 1, "Lt pulse masked when idle");

    // fault on Rin in the idle stage: passes through as a Rout pulse, not stored
    ff[SIG_RIN] = 1; fv[SIG_RIN] = 1; t0 = $time;
    #500 ff[SIG_RIN] = 0;
    at(TL + 250);       check(rout == 1, "Rin pulse appears on Rout");
    at(TL + 1000);      check(rout == 0, "Rout pulse ends");
    at(TL + DL + 250);  check(ain == 1, "Rout pulse reaches Ain");
    #30_000;            check(rout == 0 && ain == 0 && sig[SIG_LT] == 1, "not stored");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for fp_stage (one 4-phase Muller pipeline stage).
// The testbench plays predecessor and successor by hand. It checks the exact
// delays Rin+ -> Rout+ (M = 3 ns), Rout -> Ain (Delta = 13 ns) and Ain -> Lt
// (D2 = 1 ns); the C-element behaviour (Rout rises only with Rin high and Aout
// low, falls only with Rin low and Aout high, holds otherwise); the latch
// (transparent while Lt is low, holding while Lt is high); and the pulse fault
// ports: a pulse forced on Rout is passed to Ain and Lt, a pulse on Rin is
// stored by the C-element when Aout is low and masked when Aout is high.
module tb_fp_stage;
  import bd_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned M = 3000, DL = 13000, D2 = 1000;

  logic       rst, rin, aout, ain, rout;
  logic [7:0] din, dout;
  ctrl_vec_t  ff, fv, sig;
  int checks = 0, failures = 0;
  time t0;

  fp_stage #(.WIDTH(8), .M_PS(M), .DELTA_PS(DL), .D2_PS(D2)) dut (
    .rst(rst), .rin(rin), .ain(ain), .rout(rout), .aout(aout),
    .data_in(din), .data_out(dout), .flt_force(ff), .flt_value(fv), .sig(sig)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  // wait until t0 + dt (absolute schedule relative to the last stimulus)
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
    check(rout == 0 && ain == 0 && sig[SIG_LT] == 0, "reset state all zero");

    // Rin+ with Aout low: Rout+ after M, Ain+ after M+Delta, Lt+ after M+Delta+D2
    din = 8'ha5; rin = 1; t0 = $time;
    at(1000);          check(dout == 8'ha5, "latch transparent while Lt low");
    at(M - 1);         check(rout == 0, "Rout not before M");
    at(M + 1);           check(rout == 1, "Rout+ at M");
    at(M + DL - 1);    check(ain == 0, "Ain not before M+Delta");
    at(M + DL + 1);      check(ain == 1, "Ain+ at M+Delta");
    at(M + DL + D2 - 1); check(sig[SIG_LT] == 0, "Lt not before M+Delta+D2");
    at(M + DL + D2 + 1); check(sig[SIG_LT] == 1, "Lt+ at M+Delta+D2");
    #1 din = 8'h3c;
    #1000;             check(dout == 8'ha5, "latch holds while Lt high");

    // Rin- with Aout still low: C-element holds
    rin = 0;
    #20_000;           check(rout == 1, "C-element holds with Rin low, Aout low");
    // Aout+ : Rout- after M, then Ain-, Lt-, latch reopens
    aout = 1; t0 = $time;
    at(M - 1);         check(rout == 1, "Rout- not before M");
    at(M + 1);           check(rout == 0, "Rout- at M");
    at(M + DL + 1);      check(ain == 0, "Ain- at M+Delta");
    at(M + DL + D2 + 1); check(sig[SIG_LT] == 0, "Lt- at M+Delta+D2");
    #1;                check(dout == 8'h3c, "latch reopens and passes new data");

    // Rin+ while Aout high: no Rout+ until Aout-
    #20_000 rin = 1;
    #20_000;           check(rout == 0, "C-element holds with Rin high, Aout high");
    aout = 0; t0 = $time;
    at(M + 1);           check(rout == 1, "Rout+ M after Aout-");
    // return to idle: Rin-, Aout+, Aout-
    #30_000 rin = 0; aout = 1;
    #30_000 aout = 0;
    #30_000;           check(rout == 0 && ain == 0 && sig[SIG_LT] == 0, "back to idle");

    // fault on Rout: 500 ps pulse reaches Ain after Delta and Lt after Delta+D2
    ff[SIG_ROUT] = 1; fv[SIG_ROUT] = 1; t0 = $time;
    #500 ff[SIG_ROUT] = 0;
    at(DL + 250);      check(ain == 1, "Rout pulse seen on Ain");
    at(DL + D2 + 250); check(sig[SIG_LT] == 1, "Rout pulse seen on Lt");
    at(DL + D2 + 1000); check(ain == 0 && sig[SIG_LT] == 0, "pulse has passed");
    check(rout == 0, "Rout pulse not stored");

    // fault on Rin while Aout low: C-element captures it (not masked)
    #30_000;
    ff[SIG_RIN] = 1; fv[SIG_RIN] = 1; t0 = $time;
    #500 ff[SIG_RIN] = 0;
    at(M + 1);           check(rout == 1, "Rin pulse stored by C-element when Aout low");
    at(M + DL + 1);      check(ain == 1, "stored Rin pulse becomes Ain+");
    // recover: successor acknowledges the spurious token
    #20_000 aout = 1;
    #30_000 aout = 0;
    #30_000;           check(rout == 0, "recovered");

    // fault on Rin while Aout high: masked by the C-element
    aout = 1;
    #30_000;
    ff[SIG_RIN] = 1; fv[SIG_RIN] = 1;
    #500 ff[SIG_RIN] = 0;
    #20_000;           check(rout == 0 && ain == 0, "Rin pulse masked when Aout high");
    aout = 0;
    #30_000;           check(rout == 0, "still idle");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

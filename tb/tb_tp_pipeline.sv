// Self-checking testbench for tp_pipeline (three-stage 2-phase pipeline).
// A producer toggles Rin T_Rin after each Ain toggle (new data with every Rin
// toggle) and a consumer toggles Aout T_Aout after each Rout toggle, checking
// that the data items come out complete and in order. For three input/output
// timings the steady-state time for two items at the middle stage (between
// every second Rout toggle) is compared with the value expected from the loop
// delays: 2 * max(T_Rin + TD2 + Delta, 2 TXNOR + 2 TD2 + Delta,
// T_Aout + TXNOR + TD2). With TXNOR = 130 ps, TD2 = 2 ns, Delta = 15 ns this is
// 44.26 ns for 3/20 ns and 64.26 ns for 3/30 ns (the cycle lengths that the
// reference state durations add up to) and 50 ns for the input-limited
// 8/18 ns case. The middle stage's Rout -> Ain delay (Delta) and Rout -> Lt
// falling delay (TXNOR) are checked on every item.
// Assertions check the handshake rules at every edge of every stage.
module tb_tp_pipeline;
  import bd_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned TX = 130, TL = 2000, DL = 15000;

  logic                  rst, rin, ain, rout, aout, run;
  logic [7:0]            din, dout, exp_d;
  ctrl_vec_t [2:0]       ff, fv, sig;
  int checks = 0, failures = 0;
  int unsigned t_rin, t_aout;
  int n_out;
  time tog_t[$];
  time t_rout2;

  tp_pipeline dut (
    .rst(rst), .rin(rin), .ain(ain), .data_in(din), .rout(rout), .aout(aout),
    .data_out(dout), .flt_force(ff), .flt_value(fv), .sig(sig)
  );
  // Handshake rules, checked on every stage: an output request may change only
  // when the output channel allows it (afterwards Rout and Aout differ), and an
  // acknowledge only answers a pending request (afterwards Rin and Ain agree).
  // For 2-phase handshakes this means that Rout toggles only while the output channel is
  // idle and Ain toggles only while a request is pending.
  int n_hs = 0;
  for (genvar s = 0; s < 3; s++) begin : g_hs
    always @(sig[s][SIG_ROUT]) if (!rst) begin
      #1;
      n_hs++;
      assert (sig[s][SIG_ROUT] != sig[s][SIG_AOUT])
        else begin failures++; $display("FAIL stage %0d: Rout changed while the output channel was busy", s); end
    end
    always @(sig[s][SIG_AIN]) if (!rst) begin
      #1;
      n_hs++;
      assert (sig[s][SIG_AIN] == sig[s][SIG_RIN])
        else begin failures++; $display("FAIL stage %0d: Ain changed without a pending request", s); end
    end
  end


  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  // producer: the next request is the inverse of the last acknowledge
  initial begin
    rin = 0;
    forever begin
      @(ain or run);
      fork
        begin
          automatic logic v = run & ~ain;
          #(t_rin);
          rin = v;
        end
      join_none
    end
  end
  always @(rin) if (run) din <= din + 8'd1;

  // consumer: acknowledge each Rout toggle after T_Aout; check data order
  initial begin
    aout = 0;
    forever begin
      @(rout or run);
      fork
        begin
          automatic logic v = run & rout;
          #(t_aout);
          aout = v;
        end
      join_none
    end
  end
  always @(rout) if (run) begin
    n_out++;
    checks++;
    if (dout !== exp_d) begin failures++; $display("FAIL data %h expected %h", dout, exp_d); end
    exp_d <= exp_d + 8'd1;
  end

  // middle-stage timing observers
  always @(sig[1][SIG_ROUT]) if (run) begin
    t_rout2 = $time;
    tog_t.push_back($time);
  end
  always @(sig[1][SIG_AIN]) if (run) begin
    checks++;
    if ($time - t_rout2 != DL) begin failures++; $display("FAIL Delta at %0t", $time); end
  end
  always @(negedge sig[1][SIG_LT]) if (run) begin
    checks++;
    if ($time - t_rout2 != TX) begin failures++; $display("FAIL XNOR delay at %0t", $time); end
  end

  task automatic run_case(input int unsigned tr, input int unsigned ta);
    time per, exp_per, lim;
    t_rin = tr; t_aout = ta;
    run = 0; rst = 1; din = 0; exp_d = 8'd1; n_out = 0;
    #100_000;
    tog_t.delete();
    rst = 0;
    #10_000;
    run = 1;
    #4_000_000;
    exp_per = 2 * (tr + TL + DL);
    lim = 2 * (2 * TX + 2 * TL + DL); if (lim > exp_per) exp_per = lim;
    lim = 2 * (ta + TX + TL);         if (lim > exp_per) exp_per = lim;
    check(tog_t.size() > 60, "enough items");
    for (int i = tog_t.size() - 20; i < tog_t.size(); i++) begin
      per = tog_t[i] - tog_t[i-2];
      checks++;
      if (per != exp_per) begin
        failures++;
        $display("FAIL T_Rin=%0d T_Aout=%0d cycle %0t expected %0t", tr, ta, per, exp_per);
      end
    end
    checks++;
    if (n_out > tog_t.size() || n_out + 1 < tog_t.size()) begin
      failures++; $display("FAIL item count %0d vs %0d", n_out, tog_t.size());
    end
    $display("T_Rin=%0d ps T_Aout=%0d ps: two-item cycle %0t ps, %0d items", tr, ta, per, n_out);
    run = 0;
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ff = '0; fv = '0; run = 0; rst = 1; t_rin = 3000; t_aout = 20000;
    run_case(3000, 20000);
    run_case(3000, 30000);
    run_case(8000, 18000);
    checks += n_hs;
    check(n_hs > 0, "handshake rules exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

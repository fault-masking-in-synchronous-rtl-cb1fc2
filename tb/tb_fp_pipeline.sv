// Self-checking testbench for fp_pipeline (three-stage 4-phase pipeline).
// A producer answers each Ain edge after T_Rin (Rin = not Ain, new data with
// every Rin rise) and a consumer copies Rout to Aout after T_Aout, checking
// that the data items come out complete and in order. For four input/output
// timings the steady-state cycle of the middle stage (time between its Rout
// rising edges) is compared with the cycle expected from the loop delays:
// 2 * max(T_Rin + M + Delta, 2M + Delta, M + T_Aout). With M = 3 ns,
// Delta = 13 ns, D2 = 1 ns these are 42 ns (4/18 ns), 82 ns (4/38 ns),
// 82 ns (25/17 ns) and 82 ns (25/26 ns), the cycle lengths that the state
// durations of the reference simulations add up to. In every run the middle
// stage's Rout -> Ain delay (Delta), Ain -> Lt delay (D2) and the C-element
// delay (from the later of Rin rising and Aout falling to Rout rising, M) are
// checked as well.
// Assertions check the handshake rules at every edge of every stage.
module tb_fp_pipeline;
  import bd_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned M = 3000, DL = 13000, D2 = 1000;

  logic                  rst, rin, ain, rout, aout, run;
  logic [7:0]            din, dout, exp_d;
  ctrl_vec_t [2:0]       ff, fv, sig;
  int checks = 0, failures = 0;
  int unsigned t_rin, t_aout;
  int n_out;
  time rise_t[$];
  time t_rin2_up, t_aout2_dn, t_rout2, t_ain2;

  fp_pipeline dut (
    .rst(rst), .rin(rin), .ain(ain), .data_in(din), .rout(rout), .aout(aout),
    .data_out(dout), .flt_force(ff), .flt_value(fv), .sig(sig)
  );
  // Handshake rules, checked on every stage: an output request may change only
  // when the output channel allows it (afterwards Rout and Aout differ), and an
  // acknowledge only answers a pending request (afterwards Rin and Ain agree).
  // For 4-phase handshakes this means that Rout rises only
  // with Aout low and falls only with Aout high, and Ain follows Rin.
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

  // producer: Rin follows the inverse of Ain after T_Rin
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
  always @(posedge rin) din <= din + 8'd1;

  // consumer: Aout follows Rout after T_Aout; check data order
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
  always @(posedge rout) if (run) begin
    n_out++;
    checks++;
    if (dout !== exp_d) begin failures++; $display("FAIL data %h expected %h", dout, exp_d); end
    exp_d <= exp_d + 8'd1;
  end

  // middle-stage timing observers
  always @(posedge sig[1][SIG_RIN])  t_rin2_up  = $time;
  always @(negedge sig[1][SIG_AOUT]) t_aout2_dn = $time;
  always @(posedge sig[1][SIG_ROUT]) if (run) begin
    t_rout2 = $time;
    rise_t.push_back($time);
    checks++;
    if ($time - ((t_rin2_up > t_aout2_dn) ? t_rin2_up : t_aout2_dn) != M) begin
      failures++; $display("FAIL C-element delay at %0t", $time);
    end
  end
  always @(posedge sig[1][SIG_AIN]) if (run) begin
    t_ain2 = $time;
    checks++;
    if ($time - t_rout2 != DL) begin failures++; $display("FAIL Delta at %0t", $time); end
  end
  always @(posedge sig[1][SIG_LT]) if (run) begin
    checks++;
    if ($time - t_ain2 != D2) begin failures++; $display("FAIL D2 at %0t", $time); end
  end

  task automatic run_case(input int unsigned tr, input int unsigned ta);
    time per, exp_per, lim;
    t_rin = tr; t_aout = ta;
    run = 0; rst = 1; din = 0; exp_d = 8'd1; n_out = 0;
    #100_000;
    rise_t.delete();
    t_rin2_up = 0; t_aout2_dn = 0;
    rst = 0;
    #10_000;
    run = 1;
    #4_000_000;
    exp_per = 2 * (tr + M + DL);
    lim = 2 * (2 * M + DL);     if (lim > exp_per) exp_per = lim;
    lim = 2 * (M + ta);         if (lim > exp_per) exp_per = lim;
    check(rise_t.size() > 30, "enough cycles");
    for (int i = rise_t.size() - 10; i < rise_t.size(); i++) begin
      per = rise_t[i] - rise_t[i-1];
      checks++;
      if (per != exp_per) begin
        failures++;
        $display("FAIL T_Rin=%0d T_Aout=%0d cycle %0t expected %0t", tr, ta, per, exp_per);
      end
    end
    checks++;
    if (n_out > rise_t.size() || n_out + 1 < rise_t.size()) begin failures++; $display("FAIL item count %0d vs %0d", n_out, rise_t.size()); end
    $display("T_Rin=%0d ps T_Aout=%0d ps: cycle %0t ps, %0d items", tr, ta, per, n_out);
    run = 0;
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ff = '0; fv = '0; run = 0; rst = 1; t_rin = 4000; t_aout = 18000;
    run_case(4000, 18000);
    run_case(4000, 38000);
    run_case(25000, 17000);
    run_case(25000, 26000);
    checks += n_hs;
    check(n_hs > 0, "handshake rules exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// End-to-end fault-injection testbench for fault_masking_top.
//
// It repeats the golden-run experiment for each of the three pipelines at
// their default parameters:
//  * Asynchronous pipelines: a producer and a consumer with fixed response
//    delays T_Rin / T_Aout keep data flowing; the five control signals of the
//    middle stage (Rin, Ain, Rout, Aout, Lt) are recorded as an event trace.
//    Every run starts from reset, so all runs share the same timeline.
//    1. Golden run without a fault; one steady-state cycle of the middle stage
//       (Rout rising to Rout rising) is cut into its states.
//    2. Methodical injection: in the middle of every state a pulse fault
//       (signal forced to its inverse for W_PS) is put on each of the five
//       signals in turn; b_i = number of signals whose fault is not masked.
//       This gives the expected failure probability
//       f = sum_i (b_i / 5) * (t_i / T), t_i the state duration, T the cycle.
//    3. Random injection: N_INJ faults, each in its own run, on a random signal
//       at a uniformly random time inside that cycle. The count of unmasked
//       faults must lie within 4 sigma (binomial, plus a 3 % model allowance)
//       of N_INJ * f.
//    A fault counts as masked when deleting the first differing trace entry
//    and the one after it leaves the faulty trace equal to the golden trace
//    (the last few entries, cut off by the end of the run, are not compared).
//  * Synchronous pipeline: a pulse of width T_WIN (10 ns, standing for the
//    setup-plus-hold window) forces the middle flip-flop's D input to the
//    inverse of its value at a uniformly random time in a clock period; the
//    fault propagates when the sampled stage outputs differ from the golden
//    run. The count must match N_INJ * min(1, T_WIN / T_clk) within 4 sigma.
// Operating points: the 4-phase pipeline at DIFF = 1..50 ns with input faster
// than output (T_Rin = 4 ns, T_Aout = 17 ns + DIFF) and with output faster
// (T_Aout = 17 ns, T_Rin = 4 ns + DIFF) plus 25/17 ns; the 2-phase pipeline at
// diff = T_Rin - T_Aout + Delta = -12, -2, 3, 7, 10 ns; the synchronous
// pipeline at T_clk = 10..110 ns. These follow the sweeps of the reference
// study; the T_Rin/T_Aout pairs chosen for each DIFF are this testbench's.
// Each mechanism (masked and unmasked faults in each pipeline, data delivered
// in order) must occur at least once. The pulse width W_PS of the
// asynchronous faults is a choice of this testbench.
module tb_fault_masking_top;
  import bd_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int  N_INJ  = 500;
  localparam time W_PS   = 500;
  localparam time T_WARM = 600_000;
  localparam time T_OBS  = 1_500_000;
  localparam time T_WIN  = 10_000;
  localparam int  FP_DIFF[8] = '{1, 2, 5, 10, 20, 30, 40, 50};

  typedef struct packed { ctrl_vec_t v; time t; } ev_t;

  // DUT connections
  logic fp_rst, fp_rin, fp_ain, fp_rout, fp_aout;
  logic [7:0] fp_din, fp_dout;
  ctrl_vec_t [2:0] fp_ff, fp_fv, fp_sig;
  logic tp_rst, tp_rin, tp_ain, tp_rout, tp_aout;
  logic [7:0] tp_din, tp_dout;
  ctrl_vec_t [2:0] tp_ff, tp_fv, tp_sig;
  logic sy_clk, sy_rst;
  logic [7:0] sy_d, sy_q;
  logic [2:0] sy_ff;
  logic [2:0][7:0] sy_fv, sy_sq;

  fault_masking_top dut (
    .fp_rst(fp_rst), .fp_rin(fp_rin), .fp_ain(fp_ain), .fp_data_in(fp_din),
    .fp_rout(fp_rout), .fp_aout(fp_aout), .fp_data_out(fp_dout),
    .fp_flt_force(fp_ff), .fp_flt_value(fp_fv), .fp_sig(fp_sig),
    .tp_rst(tp_rst), .tp_rin(tp_rin), .tp_ain(tp_ain), .tp_data_in(tp_din),
    .tp_rout(tp_rout), .tp_aout(tp_aout), .tp_data_out(tp_dout),
    .tp_flt_force(tp_ff), .tp_flt_value(tp_fv), .tp_sig(tp_sig),
    .sy_clk(sy_clk), .sy_rst(sy_rst), .sy_d(sy_d), .sy_q(sy_q),
    .sy_flt_force(sy_ff), .sy_flt_value(sy_fv), .sy_stage_q(sy_sq)
  );

  int checks = 0, failures = 0;
  int n_fp_masked = 0, n_fp_bad = 0, n_tp_masked = 0, n_tp_bad = 0;
  int n_sy_masked = 0, n_sy_bad = 0, n_fp_items = 0, n_tp_items = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  // ---------------------------------------------------------------- async environment
  logic run, rec, sel_tp, faulty_run;
  int unsigned fp_t_rin, fp_t_aout, tp_t_rin, tp_t_aout;
  logic [7:0] fp_exp, tp_exp;
  time t_start;
  ev_t trace[$];

  // 4-phase producer (Rin = not Ain after T_Rin) and consumer (Aout = Rout after T_Aout)
  initial begin
    fp_rin = 0;
    forever begin
      @(fp_ain or run);
      fork begin automatic logic v = run & ~fp_ain; #(fp_t_rin); fp_rin = v; end join_none
    end
  end
  initial begin
    fp_aout = 0;
    forever begin
      @(fp_rout or run);
      fork begin automatic logic v = run & fp_rout; #(fp_t_aout); fp_aout = v; end join_none
    end
  end
  always @(posedge fp_rin) fp_din <= fp_din + 8'd1;
  always @(posedge fp_rout) if (run && !faulty_run) begin
    checks++;
    if (fp_dout !== fp_exp) begin failures++; $display("FAIL 4-phase data %h expected %h", fp_dout, fp_exp); end
    else n_fp_items++;
    fp_exp <= fp_exp + 8'd1;
  end

  // 2-phase producer and consumer (same rules on transitions)
  initial begin
    tp_rin = 0;
    forever begin
      @(tp_ain or run);
      fork begin automatic logic v = run & ~tp_ain; #(tp_t_rin); tp_rin = v; end join_none
    end
  end
  initial begin
    tp_aout = 0;
    forever begin
      @(tp_rout or run);
      fork begin automatic logic v = run & tp_rout; #(tp_t_aout); tp_aout = v; end join_none
    end
  end
  always @(tp_rin) if (run) tp_din <= tp_din + 8'd1;
  always @(tp_rout) if (run && !faulty_run) begin
    checks++;
    if (tp_dout !== tp_exp) begin failures++; $display("FAIL 2-phase data %h expected %h", tp_dout, tp_exp); end
    else n_tp_items++;
    tp_exp <= tp_exp + 8'd1;
  end

  // trace of the middle stage
  always @(fp_sig[1]) if (rec && !sel_tp) trace.push_back('{fp_sig[1], $time - t_start});
  always @(tp_sig[1]) if (rec &&  sel_tp) trace.push_back('{tp_sig[1], $time - t_start});

  function automatic ctrl_vec_t mid_sig();
    return sel_tp ? tp_sig[1] : fp_sig[1];
  endfunction

  // one run from reset; optionally a pulse fault on signal s at time t_inj
  task automatic async_run(input bit inj, input int s, input time t_inj);
    ctrl_vec_t fv;
    run = 0; rec = 0; faulty_run = inj;
    fp_rst = 1; tp_rst = 1; fp_ff = '0; tp_ff = '0; fp_fv = '0; tp_fv = '0;
    #100_000;
    fp_din = 0; tp_din = 0; fp_exp = 8'd1; tp_exp = 8'd1;
    trace.delete();
    fp_rst = 0; tp_rst = 0;
    #10_000;
    t_start = $time; rec = 1; run = 1;
    if (inj) begin
      #(t_start + t_inj - $time);
      fv = '0;
      fv[s] = ~mid_sig()[s];
      if (sel_tp) begin tp_fv[1] = fv; tp_ff[1][s] = 1'b1; end
      else        begin fp_fv[1] = fv; fp_ff[1][s] = 1'b1; end
      #(W_PS);
      fp_ff = '0; tp_ff = '0;
    end
    #(t_start + T_OBS - $time);
    rec = 0; run = 0;
  endtask

  function automatic bit is_masked(const ref ev_t g[$], const ref ev_t f[$]);
    int len = g.size() - 8;
    int i = 0;
    while (i < len && i < f.size() && g[i].v == f[i].v) i++;
    if (i >= len) return 1'b1;
    for (int j = i; j < len; j++) begin
      if (j + 2 >= f.size()) return 1'b0;
      if (f[j + 2].v != g[j].v) return 1'b0;
    end
    return 1'b1;
  endfunction

  task automatic async_experiment(input bit two_phase, input int unsigned tr, input int unsigned ta,
                                  input string side, input int diff);
    ev_t golden[$];
    int k0, k1, nbad, bad_state;
    time tcyc, tinj;
    real f, e, sigma;
    string name;
    sel_tp = two_phase;
    name = two_phase ? "2-phase" : "4-phase";
    if (two_phase) begin tp_t_rin = tr; tp_t_aout = ta; end
    else           begin fp_t_rin = tr; fp_t_aout = ta; end
    // 1. golden run
    async_run(1'b0, 0, 0);
    golden = trace;
    k0 = -1; k1 = -1;
    for (int k = 1; k < golden.size(); k++) begin
      if (golden[k].t >= T_WARM && golden[k].v[SIG_ROUT] && !golden[k-1].v[SIG_ROUT]) begin
        if (k0 < 0) k0 = k;
        else if (k1 < 0) k1 = k;
      end
    end
    check(k0 > 0 && k1 > k0, "golden run reaches steady state");
    if (k0 <= 0 || k1 <= k0) return;
    tcyc = golden[k1].t - golden[k0].t;
    // 2. methodical injection: every state, every signal
    f = 0.0;
    for (int k = k0; k < k1; k++) begin
      time d = golden[k+1].t - golden[k].t;
      if (d == 0) continue;
      bad_state = 0;
      for (int s = 0; s < NSIG; s++) begin
        async_run(1'b1, s, golden[k].t + d / 2);
        if (!is_masked(golden, trace)) bad_state++;
      end
      f += (real'(bad_state) / NSIG) * (real'(d) / real'(tcyc));
      $display("  %s state %05b  duration %6d ps  bad signals %0d", name, golden[k].v, d, bad_state);
    end
    // 3. random injection
    nbad = 0;
    for (int n = 0; n < N_INJ; n++) begin
      tinj = golden[k0].t + time'($urandom_range(int'(tcyc) - 1));
      async_run(1'b1, int'($urandom_range(NSIG - 1)), tinj);
      if (is_masked(golden, trace)) begin
        if (two_phase) n_tp_masked++; else n_fp_masked++;
      end else begin
        nbad++;
        if (two_phase) n_tp_bad++; else n_fp_bad++;
      end
    end
    e = N_INJ * f;
    sigma = $sqrt(N_INJ * f * (1.0 - f));
    $display("%s %s DIFF=%0d ns, T_Rin=%0d T_Aout=%0d ps: cycle %0d ps, f=%f, expected %0.1f, simulated %0d of %0d",
             name, side, diff, tr, ta, tcyc, f, e, nbad, N_INJ);
    checks++;
    if ((real'(nbad) - e) > 4.0 * sigma + 0.03 * N_INJ || (e - real'(nbad)) > 4.0 * sigma + 0.03 * N_INJ) begin
      failures++;
      $display("FAIL %s: simulated count far from the probability model", name);
    end
  endtask

  // ---------------------------------------------------------------- synchronous pipeline
  time t_clk;
  logic sy_rec;
  logic [2:0][7:0] sy_hist[$];

  always @(posedge sy_clk) if (sy_rec) sy_hist.push_back(sy_sq);

  // one run from reset with its own clock, so every run has the same timeline;
  // optionally a pulse fault on the middle flip-flop's D input at t_inj into
  // clock period 10
  task automatic sync_run(input bit inj, input time t_inj);
    time t0;
    sy_clk = 0; sy_rst = 1; sy_ff = '0; sy_fv = '0; sy_d = 0; sy_rec = 0;
    sy_hist.delete();
    #1000;
    t0 = $time;
    fork
      begin : clock_and_data
        for (int c = 0; c < 20; c++) begin
          #(t_clk / 2) sy_clk = 1;
          if (c == 1) begin #1 sy_rst = 0; sy_rec = 1; end
          #(t_clk / 2 - ((c == 1) ? 1 : 0)) sy_clk = 0;
          sy_d = sy_d + 8'd37;
        end
      end
      begin : injector
        if (inj) begin
          #(t0 + 10 * t_clk + t_inj - $time);
          sy_fv[1] = ~sy_sq[0];
          sy_ff[1] = 1'b1;
          #(T_WIN);
          sy_ff = '0;
        end
      end
    join
    sy_rec = 0;
  endtask

  task automatic sync_experiment(input time tc);
    logic [2:0][7:0] golden[$];
    int nbad = 0;
    real p, e, sigma;
    t_clk = tc;
    sync_run(1'b0, 0);
    golden = sy_hist;
    for (int n = 0; n < N_INJ; n++) begin
      sync_run(1'b1, time'($urandom_range(int'(tc) - 1)));
      if (sy_hist == golden) n_sy_masked++;
      else begin nbad++; n_sy_bad++; end
    end
    p = (T_WIN >= tc) ? 1.0 : real'(T_WIN) / real'(tc);
    e = N_INJ * p;
    sigma = $sqrt(N_INJ * p * (1.0 - p));
    $display("synchronous T_clk=%0d ps: P_fail=%f, expected %0.1f, simulated %0d of %0d", tc, p, e, nbad, N_INJ);
    checks++;
    if ((real'(nbad) - e) > 4.0 * sigma + 1.0 || (e - real'(nbad)) > 4.0 * sigma + 1.0) begin
      failures++;
      $display("FAIL synchronous: simulated count far from T_win / T_clk");
    end
  endtask

  // ---------------------------------------------------------------- watchdog and sequence
  initial begin
    #(64'd200_000_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run = 0; rec = 0; sel_tp = 0; faulty_run = 0; sy_rec = 0; t_clk = 20_000;
    fp_t_rin = 4000; fp_t_aout = 18000; tp_t_rin = 3000; tp_t_aout = 20000;
    // 4-phase, input faster than output: DIFF = T_Aout - Delta - T_Rin (ns)
    foreach (FP_DIFF[i]) async_experiment(1'b0, 4000, 17000 + 1000 * FP_DIFF[i], "in<out", FP_DIFF[i]);
    // 4-phase, output faster than input: DIFF = T_Rin + Delta - T_Aout (ns)
    foreach (FP_DIFF[i]) async_experiment(1'b0, 4000 + 1000 * FP_DIFF[i], 17000, "out<in", FP_DIFF[i]);
    async_experiment(1'b0, 25000, 17000, "out<in", 21);
    // 2-phase: diff = T_Rin - T_Aout + Delta (ns), T_Aout >= T_xnor + T_D2 + Delta
    async_experiment(1'b1, 3000, 30000, "in<out", -12);
    async_experiment(1'b1, 3000, 20000, "in<out", -2);
    async_experiment(1'b1, 3000, 15000, "out<in", 3);
    async_experiment(1'b1, 10000, 18000, "out<in", 7);
    async_experiment(1'b1, 13000, 18000, "out<in", 10);
    for (int c = 1; c <= 11; c++) sync_experiment(c * 10_000);
    $display("mechanisms: 4-phase masked %0d unmasked %0d, 2-phase masked %0d unmasked %0d, sync masked %0d propagated %0d, items 4-phase %0d 2-phase %0d",
             n_fp_masked, n_fp_bad, n_tp_masked, n_tp_bad, n_sy_masked, n_sy_bad, n_fp_items, n_tp_items);
    check(n_fp_masked > 0, "4-phase: some faults masked");
    check(n_fp_bad    > 0, "4-phase: some faults unmasked");
    check(n_tp_masked > 0, "2-phase: some faults masked");
    check(n_tp_bad    > 0, "2-phase: some faults unmasked");
    check(n_sy_masked > 0, "synchronous: some faults masked");
    check(n_sy_bad    > 0, "synchronous: some faults propagated");
    check(n_fp_items  > 0, "4-phase: data delivered in order");
    check(n_tp_items  > 0, "2-phase: data delivered in order");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

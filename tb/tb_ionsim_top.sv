// tb_ionsim_top: end-to-end test of the simulator at its default size (one
// AMPA and one NMDA channel, maximum-speed mapping, ITER = 16).
//
// A presynaptic event (rising ENABLE) starts a run of 5000 time stamps with
// AMPA t_peak = 600 steps and NMDA tau_1 = 600, tau_2 = 50 steps. Every
// published step is checked: the time stamp sequence, both channel currents
// against real-arithmetic references evaluated at the voltage the channels
// saw, the membrane update against the leak/charge equation, and the step
// period of 1 + nmda_max_latency + memb_latency cycles. Halfway through, the channel
// parameters are changed at run time. ENABLE is then dropped (the run must
// stop) and raised again (t must restart at 0 with V reloaded).
// Mechanisms counted, each of which must occur: restarts, stops, run-time
// parameter changes, steps in which the NMDA rise term exp(-t/tau_2) has
// underflowed to zero, and steps in which both channels ran in parallel.
module tb_ionsim_top;
  import ionsim_pkg::*;
  import tb_util_pkg::*;

  localparam int ITER   = 16;
  localparam int PERIOD = 1 + nmda_max_latency(ITER) + memb_latency(1'b0);
  localparam int NSTEP  = 5000;

  logic        clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  ampa_param_t ampa_p [1];
  nmda_param_t nmda_p [1];
  memb_param_t memb_p;
  logic        running, sample_valid;
  tstamp_t     sample_t;
  fx_t         v_m;
  fx_t         i_ampa [1];
  fx_t         i_nmda [1];

  int  checks = 0, failures = 0;
  int  n_restart = 0, n_stop = 0, n_param = 0, n_underflow = 0, n_parallel = 0;
  real lsb = 1.0 / (2.0 ** FRAC);

  always #5 clk = ~clk;

  ionsim_top dut (.clk, .rst_n, .enable, .ampa_p, .nmda_p, .memb_p, .running,
                  .sample_valid, .sample_t, .v_m, .i_ampa, .i_nmda);

  initial begin
    #10_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Run n steps from the current state; expect time stamps from t0.
  task automatic run_steps(input int n, input int t0, input fx_t v_start, input int change_at);
    fx_t v_prev;
    int  got, cyc, last_cyc;
    real ra, ta, rn, tn, vr;
    v_prev   = v_start;
    got      = 0;
    cyc      = 0;
    last_cyc = -1;
    while (got < n) begin
      @(negedge clk);
      cyc++;
      if (cyc > 200 * n) begin check(1'b0, "run stalled"); return; end
      if (sample_valid) begin
        check(int'(sample_t) == t0 + got, $sformatf("time stamp %0d, expected %0d", sample_t, t0 + got));
        if (last_cyc >= 0)
          check(cyc - last_cyc == PERIOD, $sformatf("step period %0d, expected %0d", cyc - last_cyc, PERIOD));
        last_cyc = cyc;
        ampa_ref(t0 + got, v_prev, ampa_p[0], ra, ta);
        nmda_ref(t0 + got, v_prev, nmda_p[0], rn, tn);
        check(rabs(from_fx(i_ampa[0]) - ra) <= ta,
              $sformatf("t=%0d AMPA %f, expected %f", t0 + got, from_fx(i_ampa[0]), ra));
        check(rabs(from_fx(i_nmda[0]) - rn) <= tn,
              $sformatf("t=%0d NMDA %f, expected %f", t0 + got, from_fx(i_nmda[0]), rn));
        vr = memb_ref(v_prev, memb_p, from_fx(i_ampa[0]) + from_fx(i_nmda[0]));
        check(rabs(from_fx(v_m) - vr) <= 1.01 * lsb,
              $sformatf("t=%0d V %f, expected %f", t0 + got, from_fx(v_m), vr));
        if (real'(t0 + got) * from_fx(nmda_p[0].inv_tau2) > 13.0) n_underflow++;
        if (i_ampa[0] != '0 && i_nmda[0] != '0) n_parallel++;
        v_prev = v_m;
        got++;
        if (got == change_at) begin
          ampa_p[0].g_const = to_fx(0.02);
          nmda_p[0].g_n     = to_fx(2.5);
          n_param++;
        end
      end
    end
  endtask

  initial begin
    ampa_p[0].inv_tpeak = to_fx(1.0 / 600.0);
    ampa_p[0].g_const   = to_fx(0.01);
    ampa_p[0].e_rev     = to_fx(0.0);
    nmda_p[0].inv_tau1  = to_fx(1.0 / 600.0);
    nmda_p[0].inv_tau2  = to_fx(1.0 / 50.0);
    nmda_p[0].eta       = to_fx(1.0 / 3.57);
    nmda_p[0].mg        = to_fx(1.0);
    nmda_p[0].gamma     = to_fx(0.062);
    nmda_p[0].g_n       = to_fx(1.0);
    nmda_p[0].e_rev     = to_fx(0.0);
    memb_p.k_leak       = to_fx(0.002);
    memb_p.k_cap        = to_fx(0.0002);
    memb_p.v_rest       = to_fx(-70.0);
    memb_p.v_init       = to_fx(-70.0);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    check(!running && !sample_valid, "idle after reset");

    // presynaptic event: full run with a parameter change halfway
    enable = 1'b1;
    n_restart++;
    run_steps(NSTEP, 0, to_fx(-70.0), NSTEP / 2);

    // stop
    enable = 1'b0;
    repeat (2 * PERIOD) @(negedge clk);
    check(!running, "still running after enable fell");
    if (!running) n_stop++;
    begin
      int extra = 0;
      repeat (3 * PERIOD) begin @(negedge clk); if (sample_valid) extra++; end
      check(extra == 0, "samples after stop");
    end

    // second event: restart from t = 0 and the initial voltage
    memb_p.v_init = to_fx(-60.0);
    enable = 1'b1;
    n_restart++;
    run_steps(200, 0, to_fx(-60.0), -1);
    enable = 1'b0;
    repeat (2 * PERIOD) @(negedge clk);

    $display("mechanisms: restarts=%0d stops=%0d param_changes=%0d exp_underflow_steps=%0d parallel_steps=%0d",
             n_restart, n_stop, n_param, n_underflow, n_parallel);
    check(n_restart >= 2, "no restart");
    check(n_stop >= 1, "no stop");
    check(n_param >= 1, "no run-time parameter change");
    check(n_underflow >= 1, "no exp underflow");
    check(n_parallel >= 1, "no step with both channels active");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

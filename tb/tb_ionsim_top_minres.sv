// tb_ionsim_top_minres: end-to-end test of the simulator built with the
// minimum-resource channel blocks (MIN_RES = 1) and two channels of each
// kind with different time constants.
//
// A run of 1000 time stamps is started by a rising ENABLE; every published
// step is checked against real-arithmetic references for all four currents
// and the membrane update, and the step period must be
// 1 + nmda_min_latency + memb_latency cycles. A second run after a restart checks that t
// and V start over. Mechanisms counted, each of which must occur: restarts,
// stops, and steps in which all four channels delivered a non-zero current.
module tb_ionsim_top_minres;
  import ionsim_pkg::*;
  import tb_util_pkg::*;

  localparam int ITER   = 16;
  localparam int NA     = 2;
  localparam int NN     = 2;
  localparam int PERIOD = 1 + nmda_min_latency(ITER) + memb_latency(1'b1);

  logic        clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  ampa_param_t ampa_p [NA];
  nmda_param_t nmda_p [NN];
  memb_param_t memb_p;
  logic        running, sample_valid;
  tstamp_t     sample_t;
  fx_t         v_m;
  fx_t         i_ampa [NA];
  fx_t         i_nmda [NN];

  int  checks = 0, failures = 0;
  int  n_restart = 0, n_stop = 0, n_parallel = 0;
  real lsb = 1.0 / (2.0 ** FRAC);

  always #5 clk = ~clk;

  ionsim_top #(.N_AMPA(NA), .N_NMDA(NN), .ITER(ITER), .MIN_RES(1'b1)) dut (
    .clk, .rst_n, .enable, .ampa_p, .nmda_p, .memb_p, .running,
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

  task automatic run_steps(input int n, input fx_t v_start);
    fx_t v_prev;
    int  got, cyc, last_cyc, nz;
    real r, tl, isum, vr;
    v_prev   = v_start;
    got      = 0;
    cyc      = 0;
    last_cyc = -1;
    while (got < n) begin
      @(negedge clk);
      cyc++;
      if (cyc > 200 * n) begin check(1'b0, "run stalled"); return; end
      if (sample_valid) begin
        check(int'(sample_t) == got, $sformatf("time stamp %0d, expected %0d", sample_t, got));
        if (last_cyc >= 0)
          check(cyc - last_cyc == PERIOD, $sformatf("step period %0d, expected %0d", cyc - last_cyc, PERIOD));
        last_cyc = cyc;
        isum = 0.0;
        nz   = 0;
        for (int k = 0; k < NA; k++) begin
          ampa_ref(got, v_prev, ampa_p[k], r, tl);
          check(rabs(from_fx(i_ampa[k]) - r) <= tl,
                $sformatf("t=%0d AMPA%0d %f, expected %f", got, k, from_fx(i_ampa[k]), r));
          isum += from_fx(i_ampa[k]);
          if (i_ampa[k] != '0) nz++;
        end
        for (int k = 0; k < NN; k++) begin
          nmda_ref(got, v_prev, nmda_p[k], r, tl);
          check(rabs(from_fx(i_nmda[k]) - r) <= tl,
                $sformatf("t=%0d NMDA%0d %f, expected %f", got, k, from_fx(i_nmda[k]), r));
          isum += from_fx(i_nmda[k]);
          if (i_nmda[k] != '0) nz++;
        end
        vr = memb_ref(v_prev, memb_p, isum);
        check(rabs(from_fx(v_m) - vr) <= 1.01 * lsb,
              $sformatf("t=%0d V %f, expected %f", got, from_fx(v_m), vr));
        if (nz == NA + NN) n_parallel++;
        v_prev = v_m;
        got++;
      end
    end
  endtask

  initial begin
    for (int k = 0; k < NA; k++) begin
      ampa_p[k].inv_tpeak = to_fx(1.0 / (100.0 + 500.0 * k));
      ampa_p[k].g_const   = to_fx(0.01);
      ampa_p[k].e_rev     = to_fx(0.0);
    end
    for (int k = 0; k < NN; k++) begin
      nmda_p[k].inv_tau1  = to_fx(1.0 / (300.0 + 600.0 * k));
      nmda_p[k].inv_tau2  = to_fx(1.0 / 40.0);
      nmda_p[k].eta       = to_fx(1.0 / 3.57);
      nmda_p[k].mg        = to_fx(1.0 + k);
      nmda_p[k].gamma     = to_fx(0.062);
      nmda_p[k].g_n       = to_fx(1.5);
      nmda_p[k].e_rev     = to_fx(0.0);
    end
    memb_p.k_leak = to_fx(0.002);
    memb_p.k_cap  = to_fx(0.0001);
    memb_p.v_rest = to_fx(-65.0);
    memb_p.v_init = to_fx(-65.0);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);

    enable = 1'b1;
    n_restart++;
    run_steps(1000, to_fx(-65.0));
    enable = 1'b0;
    repeat (2 * PERIOD) @(negedge clk);
    check(!running, "still running after enable fell");
    if (!running) n_stop++;

    memb_p.v_init = to_fx(-75.0);
    enable = 1'b1;
    n_restart++;
    run_steps(50, to_fx(-75.0));
    enable = 1'b0;
    repeat (2 * PERIOD) @(negedge clk);

    $display("mechanisms: restarts=%0d stops=%0d all_channels_active_steps=%0d",
             n_restart, n_stop, n_parallel);
    check(n_restart >= 2, "no restart");
    check(n_stop >= 1, "no stop");
    check(n_parallel >= 1, "no step with all channels active");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

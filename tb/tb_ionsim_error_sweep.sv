// tb_ionsim_error_sweep: accuracy sweep of the default simulator under
// voltage clamp (k_leak = k_cap = 0, so V stays at -70 mV).
//
// For each AMPA peak time t_peak and, at the same time, each NMDA decay time
// constant tau_1 in {100, 200, 400, 600, 800, 1000, 1200} steps
// (tau_2 = 50 steps), a run of 5000 time stamps is started by a rising ENABLE
// and every current is compared with a double-precision evaluation of the
// same model. The normalised error of a run is the mean of
// |I_hw - I_ref| / max|I_ref| over the 5000 stamps; it is printed for both
// channels and must stay below 1e-3. Every stamp must also be within the
// per-sample error bound of the Q15.16 datapath.
module tb_ionsim_error_sweep;
  import ionsim_pkg::*;
  import tb_util_pkg::*;

  localparam int NSTEP = 5000;
  localparam int NT    = 7;
  localparam real TAUS [NT] = '{100.0, 200.0, 400.0, 600.0, 800.0, 1000.0, 1200.0};

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

  initial begin
    real ea [NSTEP], en [NSTEP];
    real ra, ta, rn, tn, pa, pn, sa, sn;
    int  got;
    ampa_p[0].g_const   = to_fx(0.01);
    ampa_p[0].e_rev     = to_fx(0.0);
    nmda_p[0].inv_tau2  = to_fx(1.0 / 50.0);
    nmda_p[0].eta       = to_fx(1.0 / 3.57);
    nmda_p[0].mg        = to_fx(1.0);
    nmda_p[0].gamma     = to_fx(0.062);
    nmda_p[0].g_n       = to_fx(1.0);
    nmda_p[0].e_rev     = to_fx(0.0);
    memb_p.k_leak       = '0;
    memb_p.k_cap        = '0;
    memb_p.v_rest       = to_fx(-70.0);
    memb_p.v_init       = to_fx(-70.0);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int s = 0; s < NT; s++) begin
      ampa_p[0].inv_tpeak = to_fx(1.0 / TAUS[s]);
      nmda_p[0].inv_tau1  = to_fx(1.0 / TAUS[s]);
      repeat (5) @(negedge clk);
      enable = 1'b1;
      got = 0; pa = 0.0; pn = 0.0;
      while (got < NSTEP) begin
        @(negedge clk);
        if (sample_valid) begin
          ampa_ref(got, v_m, ampa_p[0], ra, ta);
          nmda_ref(got, v_m, nmda_p[0], rn, tn);
          checks++;
          if (rabs(from_fx(i_ampa[0]) - ra) > ta || rabs(from_fx(i_nmda[0]) - rn) > tn) begin
            failures++;
            if (failures < 10) $display("t=%0d out of bound", got);
          end
          ea[got] = rabs(from_fx(i_ampa[0]) - ra);
          en[got] = rabs(from_fx(i_nmda[0]) - rn);
          if (rabs(ra) > pa) pa = rabs(ra);
          if (rabs(rn) > pn) pn = rabs(rn);
          got++;
        end
      end
      enable = 1'b0;
      while (running) @(negedge clk);
      sa = 0.0; sn = 0.0;
      for (int k = 0; k < NSTEP; k++) begin sa += ea[k] / pa; sn += en[k] / pn; end
      sa = sa / NSTEP; sn = sn / NSTEP;
      $display("tau %6.0f: AMPA peak %9.4f normalised error %e | NMDA peak %8.4f normalised error %e",
               TAUS[s], pa, sa, pn, sn);
      checks++;
      if (sa > 1.0e-3 || sn > 1.0e-3) begin failures++; $display("normalised error too large"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

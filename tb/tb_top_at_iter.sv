// tb_top_at_iter: measurement harness used by tb_ionsim_top_iter. It holds
// one default-structure simulator (one AMPA and one NMDA channel, maximum
// speed mapping) built with the given number of factoring steps ITER, runs
// it for NSTEP time stamps from the rising edge of enable, and measures:
//   - the step period in cycles, which must equal
//     1 + nmda_max_latency(ITER) + memb_latency(0);
//   - the mean error of each current against the same model evaluated in
//     double precision from the hardware's own V of the previous step,
//     normalised to the largest reference current of the run.
// Results are on the output ports once finished is high. Parameters are
// fixed inside (t_peak = tau_1 = 400, tau_2 = 40), with the membrane leak
// and capacitance terms active.
module tb_top_at_iter
  import ionsim_pkg::*;
  import tb_util_pkg::*;
#(
  parameter int ITER  = 16,
  parameter int NSTEP = 1000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  output logic finished,
  output int   steps,
  output int   period_errors,
  output real  err_ampa,
  output real  err_nmda
);
  localparam int PERIOD = 1 + nmda_max_latency(ITER) + memb_latency(1'b0);

  ampa_param_t ampa_p [1];
  nmda_param_t nmda_p [1];
  memb_param_t memb_p;
  logic        running, sample_valid;
  tstamp_t     sample_t;
  fx_t         v_m;
  fx_t         i_ampa [1];
  fx_t         i_nmda [1];

  ionsim_top #(.N_AMPA(1), .N_NMDA(1), .ITER(ITER)) dut (
    .clk, .rst_n, .enable, .ampa_p, .nmda_p, .memb_p, .running,
    .sample_valid, .sample_t, .v_m, .i_ampa, .i_nmda);

  always_comb begin
    ampa_p[0].inv_tpeak = to_fx(1.0 / 400.0);
    ampa_p[0].g_const   = to_fx(0.01);
    ampa_p[0].e_rev     = to_fx(0.0);
    nmda_p[0].inv_tau1  = to_fx(1.0 / 400.0);
    nmda_p[0].inv_tau2  = to_fx(1.0 / 40.0);
    nmda_p[0].eta       = to_fx(1.0 / 3.57);
    nmda_p[0].mg        = to_fx(1.0);
    nmda_p[0].gamma     = to_fx(0.062);
    nmda_p[0].g_n       = to_fx(1.5);
    nmda_p[0].e_rev     = to_fx(0.0);
    memb_p.k_leak       = to_fx(0.002);
    memb_p.k_cap        = to_fx(0.0001);
    memb_p.v_rest       = to_fx(-65.0);
    memb_p.v_init       = to_fx(-65.0);
  end

  initial begin
    real sa, sn, pa, pn, ra, rn, tl;
    fx_t v_prev;
    int  cyc, last_cyc;
    finished = 1'b0;
    steps = 0; period_errors = 0;
    err_ampa = 0.0; err_nmda = 0.0;
    sa = 0.0; sn = 0.0; pa = 0.0; pn = 0.0;
    v_prev = to_fx(-65.0);
    cyc = 0; last_cyc = -1;
    @(posedge enable);
    while (steps < NSTEP) begin
      @(negedge clk);
      cyc++;
      if (sample_valid) begin
        if (int'(sample_t) != steps) period_errors++;
        if (last_cyc >= 0 && cyc - last_cyc != PERIOD) period_errors++;
        last_cyc = cyc;
        ampa_ref(steps, v_prev, ampa_p[0], ra, tl);
        nmda_ref(steps, v_prev, nmda_p[0], rn, tl);
        sa += rabs(from_fx(i_ampa[0]) - ra);
        sn += rabs(from_fx(i_nmda[0]) - rn);
        if (rabs(ra) > pa) pa = rabs(ra);
        if (rabs(rn) > pn) pn = rabs(rn);
        v_prev = v_m;
        steps++;
      end
    end
    err_ampa = sa / NSTEP / pa;
    err_nmda = sn / NSTEP / pn;
    finished = 1'b1;
  end
endmodule

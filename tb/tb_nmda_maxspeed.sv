// tb_nmda_maxspeed: self-checking test of the maximum-speed NMDA channel.
// Random time stamps, voltages and parameter sets (with tau_1 > tau_2) are
// applied; each current is compared with
//   g_n (V - E) / (1 + eta [Mg] exp(-gamma V)) * (exp(-t/tau_1) - exp(-t/tau_2))
// in real arithmetic, with a tolerance derived from the rounding of the
// Q15.16 intermediate values. The start-to-done latency must be
// 3 T_mul + T_div + T_exp + T_add and the result must hold after done.
module tb_nmda_maxspeed;
  import ionsim_pkg::*;
  import tb_util_pkg::*;

  localparam int ITER = 16;
  localparam int LAT  = nmda_max_latency(ITER);

  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  tstamp_t     t = '0;
  fx_t         v = '0, i_out;
  nmda_param_t p = '0;
  logic        busy, done;
  int          checks = 0, failures = 0;
  real         lsb = 1.0 / (2.0 ** FRAC);

  always #5 clk = ~clk;

  nmda_maxspeed #(.ITER(ITER)) dut (.clk, .rst_n, .start, .t, .v, .p, .busy, .done, .i_out);

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input int tt, input real vv, input real tau1, input real tau2,
                         input real mg, input real gn);
    int  cyc;
    real ref_v, p4, p5, p9, p10, q, tol, vq;
    @(negedge clk);
    t = tstamp_t'(tt); v = to_fx(vv);
    p.inv_tau1 = to_fx(1.0 / tau1); p.inv_tau2 = to_fx(1.0 / tau2);
    p.eta = to_fx(1.0 / 3.57); p.mg = to_fx(mg); p.gamma = to_fx(0.062);
    p.g_n = to_fx(gn); p.e_rev = to_fx(0.0);
    start = 1'b1;
    vq  = from_fx(v);
    p4  = $exp(-real'(tt) * from_fx(p.inv_tau1));
    p5  = $exp(-real'(tt) * from_fx(p.inv_tau2));
    p9  = p4 - p5;
    p10 = 1.0 + from_fx(p.eta) * from_fx(p.mg) * $exp(-from_fx(p.gamma) * vq);
    q   = from_fx(p.g_n) * (vq - from_fx(p.e_rev)) / p10;
    ref_v = clip(q * p9);
    @(negedge clk);
    start = 1'b0;
    v = '0; p = '0; t = '0;     // inputs are only sampled at start
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != LAT) begin failures++; $display("latency %0d, expected %0d", cyc, LAT); end
    // P4 and P5 are rounded to an LSB (plus the exp error) before they are
    // scaled by the quotient; the quotient carries its own relative error
    tol = (rabs(q) + 1.0) * (4.0 * lsb + 1.0e-4 * (p4 + p5)) + 3.0e-4 * rabs(ref_v) + 2.0 * lsb;
    checks++;
    if (rabs(from_fx(i_out) - ref_v) > tol) begin
      failures++;
      $display("t=%0d V=%f: I=%f, expected %f", tt, vv, from_fx(i_out), ref_v);
    end
    @(negedge clk);
    checks++;
    if (rabs(from_fx(i_out) - ref_v) > tol) begin failures++; $display("result not held"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_one(0, -70.0, 600.0, 50.0, 1.0, 1.0);
    run_one(100, -70.0, 600.0, 50.0, 1.0, 1.0);
    run_one(100, -20.0, 600.0, 50.0, 1.0, 1.0);
    run_one(4000, -90.0, 600.0, 50.0, 2.0, 5.0);
    for (int n = 0; n < 200; n++) begin
      real tau1;
      tau1 = 50.0 + 2000.0 * real'($urandom_range(0, 100000)) / 1.0e5;
      run_one(int'($urandom_range(0, 4000)),
              -90.0 + 120.0 * real'($urandom_range(0, 100000)) / 1.0e5,
              tau1,
              tau1 / (1.5 + 8.5 * real'($urandom_range(0, 100000)) / 1.0e5),
              0.5 + 1.5 * real'($urandom_range(0, 100000)) / 1.0e5,
              0.5 + 4.5 * real'($urandom_range(0, 100000)) / 1.0e5);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

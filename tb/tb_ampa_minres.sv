// tb_ampa_minres: self-checking test of the minimum-resource AMPA channel.
// Random time stamps, voltages and parameter sets (plus t = 0 and the
// conductance peak t = t_peak) are applied; each current is compared with
// g_const * t * exp(-t / t_peak) * (V - E) evaluated in real arithmetic, with
// a tolerance derived from the rounding of the Q15.16 intermediate values.
// The start-to-done latency must be 4 T_mul + T_exp and the result must hold
// after done.
module tb_ampa_minres;
  import ionsim_pkg::*;
  import tb_util_pkg::*;

  localparam int ITER = 16;
  localparam int LAT  = ampa_min_latency(ITER);

  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  tstamp_t     t = '0;
  fx_t         v = '0, i_out;
  ampa_param_t p = '0;
  logic        busy, done;
  int          checks = 0, failures = 0;
  real         lsb = 1.0 / (2.0 ** FRAC);

  always #5 clk = ~clk;

  ampa_minres #(.ITER(ITER)) dut (.clk, .rst_n, .start, .t, .v, .p, .busy, .done, .i_out);

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input int tt, input real vv, input real tpk, input real gc, input real er);
    int  cyc;
    real ref_v, p2, p3, tol;
    @(negedge clk);
    t = tstamp_t'(tt); v = to_fx(vv);
    p.inv_tpeak = to_fx(1.0 / tpk); p.g_const = to_fx(gc); p.e_rev = to_fx(er);
    start = 1'b1;
    p3    = from_fx(v) - from_fx(p.e_rev);
    p2    = from_fx(p.g_const) * real'(tt);
    ref_v = from_fx(p.g_const) * real'(tt) * $exp(-real'(tt) * from_fx(p.inv_tpeak)) * p3;
    @(negedge clk);
    start = 1'b0;
    v = '0; p = '0; t = '0;     // inputs are only sampled at start
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != LAT) begin failures++; $display("latency %0d, expected %0d", cyc, LAT); end
    ref_v = clip(ref_v);
    // exp(.) is rounded to one LSB before it is scaled by P2 * P3
    tol = lsb * (rabs(p2 * p3) + 2.0 * rabs(p3) + 2.0) + 2.0e-4 * rabs(ref_v);
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
    run_one(0, -70.0, 600.0, 0.01, 0.0);
    run_one(600, -70.0, 600.0, 0.01, 0.0);
    run_one(1, -65.0, 20.0, 0.5, 0.0);
    run_one(5000, -70.0, 600.0, 0.01, 0.0);
    for (int n = 0; n < 200; n++)
      run_one(int'($urandom_range(0, 4000)),
              -90.0 + 120.0 * real'($urandom_range(0, 100000)) / 1.0e5,
              5.0 + 2000.0 * real'($urandom_range(0, 100000)) / 1.0e5,
              0.001 + 0.05 * real'($urandom_range(0, 100000)) / 1.0e5,
              -10.0 + 20.0 * real'($urandom_range(0, 100000)) / 1.0e5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

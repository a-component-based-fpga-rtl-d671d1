// tb_membrane_integrator_minres: self-checking test of the membrane register and
// its update. Loads V with v_init, then runs a sequence of steps with random
// channel currents and parameters; after each, V must equal
//   V - k_leak (V - V_rest) - k_cap * sum(I)
// computed in real arithmetic from the previous V (within the rounding of
// the two products), and done must come memb_latency(MIN_RES) cycles after start.
// MIN_RES selects the mapping under test; tb_membrane_integrator_minres_minres
// runs the same checks on the minimum-resource mapping.
// One step saturates the sum of the currents and V.
module tb_membrane_integrator_minres;
  import ionsim_pkg::*;
  import tb_util_pkg::*;

  localparam int N = 3;
  localparam bit MIN_RES = 1'b1;

  logic        clk = 1'b0, rst_n = 1'b0, init = 1'b0, start = 1'b0;
  memb_param_t mp = '0;
  fx_t         i_ch [N];
  fx_t         v;
  logic        busy, done;
  int          checks = 0, failures = 0;
  real         lsb = 1.0 / (2.0 ** FRAC);

  always #5 clk = ~clk;

  membrane_integrator #(.N(N), .MIN_RES(MIN_RES)) dut (.clk, .rst_n, .init, .start, .mp, .i_ch, .v, .busy, .done);

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input real kl, input real kc, input real vr, input real i0,
                      input real i1, input real i2);
    int  cyc;
    real v0, isum, ref_v;
    @(negedge clk);
    mp.k_leak = to_fx(kl); mp.k_cap = to_fx(kc); mp.v_rest = to_fx(vr);
    i_ch[0] = to_fx(i0); i_ch[1] = to_fx(i1); i_ch[2] = to_fx(i2);
    v0   = from_fx(v);
    isum = clip(from_fx(i_ch[0]) + from_fx(i_ch[1]) + from_fx(i_ch[2]));
    ref_v = clip(v0 - clip(from_fx(mp.k_leak) * clip(v0 - from_fx(mp.v_rest)))
                    - clip(from_fx(mp.k_cap) * isum));
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int k = 0; k < N; k++) i_ch[k] = '0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != memb_latency(MIN_RES)) begin
      failures++; $display("latency %0d, expected %0d", cyc, memb_latency(MIN_RES));
    end
    checks++;
    if (rabs(from_fx(v) - ref_v) > 1.01 * lsb) begin
      failures++;
      $display("V=%f, expected %f", from_fx(v), ref_v);
    end
  endtask

  initial begin
    for (int k = 0; k < N; k++) i_ch[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    mp.v_init = to_fx(-70.0);
    init = 1'b1; @(negedge clk); init = 1'b0;
    checks++;
    if (v != to_fx(-70.0)) begin failures++; $display("init failed"); end
    // pure leak towards rest
    step(0.1, 0.01, -65.0, 0.0, 0.0, 0.0);
    // inward current depolarises
    step(0.01, 0.05, -65.0, -100.0, -20.0, 0.0);
    for (int n = 0; n < 300; n++)
      step(0.2 * real'($urandom_range(0, 100000)) / 1.0e5,
           0.1 * real'($urandom_range(0, 100000)) / 1.0e5,
           -80.0 + 20.0 * real'($urandom_range(0, 100000)) / 1.0e5,
           -200.0 + 400.0 * real'($urandom_range(0, 100000)) / 1.0e5,
           -200.0 + 400.0 * real'($urandom_range(0, 100000)) / 1.0e5,
           -200.0 + 400.0 * real'($urandom_range(0, 100000)) / 1.0e5);
    // saturating sum and voltage
    step(0.0, 1.0, 0.0, -30000.0, -30000.0, -30000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

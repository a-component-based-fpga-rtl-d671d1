// tb_div_factoring: self-checking test of the division component.
// Divides signed numerators by positive denominators spread over the whole
// Q15.16 range (small and large, exactly 1, powers of two, random), compares
// each quotient with real division, checks saturation on overflow and on a
// zero denominator, and checks the start-to-done latency of ITER + 2 cycles.
module tb_div_factoring;
  import ionsim_pkg::*;
  import tb_util_pkg::*;

  localparam int ITER = 16;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  fx_t  num = '0, den = '0, q;
  logic busy, done;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  div_factoring #(.ITER(ITER)) dut (.clk, .rst_n, .start, .num, .den, .busy, .done, .q);

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input fx_t n, input fx_t d);
    int  cyc;
    real ref_v, got, tol;
    @(negedge clk);
    num = n; den = d; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != div_latency(ITER)) begin
      failures++;
      $display("latency %0d, expected %0d", cyc, div_latency(ITER));
    end
    if (d <= 0) ref_v = (n < 0) ? from_fx(FX_MIN) : from_fx(FX_MAX);
    else        ref_v = clip(from_fx(n) / from_fx(d));
    got = from_fx(q);
    tol = 3.0 / (2.0 ** FRAC) + 6.0e-5 * rabs(ref_v);
    checks++;
    if (rabs(got - ref_v) > tol) begin
      failures++;
      $display("%f / %f = %f, expected %f", from_fx(n), from_fx(d), got, ref_v);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_one(FX_ONE, FX_ONE);
    run_one(to_fx(-70.0), to_fx(1.0));
    run_one(to_fx(-70.0), to_fx(22.6));
    run_one(to_fx(1.0), to_fx(3.0));
    run_one(to_fx(100.0), to_fx(0.25));
    run_one(to_fx(-5.5), to_fx(1.9999));
    run_one(to_fx(3.0), to_fx(0.001));
    run_one(to_fx(20000.0), to_fx(0.1));
    run_one(to_fx(7.0), '0);
    run_one(to_fx(-7.0), '0);
    run_one(FX_MAX, FX_MAX);
    run_one(FX_MIN, to_fx(2.0));
    for (int n = 0; n < 300; n++) begin
      real a, b;
      a = -200.0 + 400.0 * real'($urandom_range(0, 1000000)) / 1.0e6;
      b = 2.0 ** (-6.0 + 16.0 * real'($urandom_range(0, 1000000)) / 1.0e6);
      run_one(to_fx(a), to_fx(b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

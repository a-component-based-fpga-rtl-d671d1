// tb_exp_factoring: self-checking test of the exponentiation component.
// Drives arguments across the whole range (integer parts from below the
// underflow limit to above the overflow limit, exact integers, fractions
// close to 0 and 1, random values), compares each result with $exp of the
// same argument, and checks the start-to-done latency of ITER + 3 cycles.
module tb_exp_factoring;
  import ionsim_pkg::*;
  import tb_util_pkg::*;

  localparam int ITER = 16;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  fx_t  x = '0, y;
  logic busy, done;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  exp_factoring #(.ITER(ITER)) dut (.clk, .rst_n, .start, .x, .busy, .done, .y);

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input fx_t arg);
    int  cyc;
    real ref_v, got, tol;
    @(negedge clk);
    x = arg; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != exp_latency(ITER)) begin
      failures++;
      $display("latency %0d, expected %0d", cyc, exp_latency(ITER));
    end
    ref_v = clip($exp(from_fx(arg)));
    got   = from_fx(y);
    tol   = 3.0 / (2.0 ** FRAC) + 5.0e-5 * ref_v;
    checks++;
    if (rabs(got - ref_v) > tol) begin
      failures++;
      $display("exp(%f) = %f, expected %f", from_fx(arg), got, ref_v);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_one('0);
    run_one(FX_ONE);
    run_one(-FX_ONE);
    run_one(to_fx(0.5));
    run_one(to_fx(-0.5));
    run_one(to_fx(0.99998));
    run_one(to_fx(-0.00002));
    run_one(to_fx(1.38));
    run_one(to_fx(-3.0));
    run_one(to_fx(-11.5));
    run_one(to_fx(-12.3));
    run_one(to_fx(-20.0));
    run_one(to_fx(10.4));
    run_one(to_fx(11.2));
    run_one(to_fx(4.34));
    for (int n = 0; n < 300; n++)
      run_one(to_fx(-14.0 + 25.0 * real'($urandom_range(0, 1000000)) / 1.0e6));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

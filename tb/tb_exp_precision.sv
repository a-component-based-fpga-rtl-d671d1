// tb_exp_precision: accuracy of the exponential unit against its resolution
// and number of factoring steps. Four instances evaluate the same 2000
// random arguments in (0, 1.38], the input domain of the factoring method:
// 16 fractional bits with ITER = 14 and 16 (the system word), and 20
// fractional bits with ITER = 18 and 20 (a stand-alone wider unit). Each
// instance sees the argument rounded down to its own resolution, and is
// compared with e^x in double precision for that argument. The mean and
// standard deviation of the relative error |y - e^x| / e^x are printed.
//
// Checks: the mean error stays below a bound set by the step count and the
// output rounding (5e-5, 1.5e-5, 5e-6, 1.5e-6 in the order above), more
// steps or bits never make it worse, and every result takes exactly
// ITER + 3 cycles.
module tb_exp_precision;
  import ionsim_pkg::*;
  import tb_util_pkg::*;

  localparam int NS = 2000;
  localparam int NU = 4;
  localparam int ITERS [NU] = '{14, 16, 18, 20};
  localparam int FRACS [NU] = '{16, 16, 20, 20};
  localparam real BOUND [NU] = '{5.0e-5, 1.5e-5, 5.0e-6, 1.5e-6};

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic signed [35:0] x20 = '0, y20 [2];
  fx_t  x16, y16 [2];
  logic [NU-1:0] busy, done;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  assign x16 = fx_t'(x20 >>> 4);

  exp_factoring #(.ITER(14)) u0 (.clk, .rst_n, .start, .x(x16), .busy(busy[0]), .done(done[0]), .y(y16[0]));
  exp_factoring #(.ITER(16)) u1 (.clk, .rst_n, .start, .x(x16), .busy(busy[1]), .done(done[1]), .y(y16[1]));
  exp_factoring #(.ITER(18), .FRAC_X(20)) u2 (.clk, .rst_n, .start, .x(x20), .busy(busy[2]), .done(done[2]), .y(y20[0]));
  exp_factoring #(.ITER(20), .FRAC_X(20)) u3 (.clk, .rst_n, .start, .x(x20), .busy(busy[3]), .done(done[3]), .y(y20[1]));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real res_of(int u);
    if (u < 2) return real'(y16[u]) / 65536.0;
    return real'(y20[u-2]) / 1048576.0;
  endfunction

  initial begin
    real s [NU], q [NU], m [NU], sd [NU], xr, r, e;
    int  lat [NU];
    bit  seen [NU];
    for (int u = 0; u < NU; u++) begin s[u] = 0.0; q[u] = 0.0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      x20 = 36'($urandom_range(16, 1447034));       // (0, 1.38] in 2^-20 steps
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      for (int u = 0; u < NU; u++) seen[u] = 1'b0;
      for (int c = 1; c <= 30; c++) begin
        for (int u = 0; u < NU; u++)
          if (done[u]) begin seen[u] = 1'b1; lat[u] = c; end
        @(negedge clk);
      end
      for (int u = 0; u < NU; u++) begin
        checks++;
        if (!seen[u] || lat[u] != exp_latency(ITERS[u])) begin
          failures++;
          $display("unit %0d: latency %0d, expected %0d", u, lat[u], exp_latency(ITERS[u]));
        end
        xr = (FRACS[u] == 16) ? real'(x16) / 65536.0 : real'(x20) / 1048576.0;
        r  = $exp(xr);
        e  = rabs(res_of(u) - r) / r;
        s[u] += e;  q[u] += e * e;
      end
    end
    for (int u = 0; u < NU; u++) begin
      m[u]  = s[u] / NS;
      sd[u] = $sqrt(q[u] / NS - m[u] * m[u]);
      $display("%0d fractional bits, ITER %0d: mean relative error %e, std %e",
               FRACS[u], ITERS[u], m[u], sd[u]);
      checks++;
      if (m[u] > BOUND[u]) begin failures++; $display("  above bound %e", BOUND[u]); end
      if (u > 0) begin
        checks++;
        if (m[u] >= m[u-1]) begin failures++; $display("  no gain over the previous unit"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

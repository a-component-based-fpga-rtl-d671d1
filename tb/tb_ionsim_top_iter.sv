// tb_ionsim_top_iter: the simulator at reduced precision. Three copies of
// the default simulator structure are built with 8, 12 and 16 factoring
// steps (ITER), the step counts that match 8-, 12- and 16-bit results, and
// run side by side for 1000 time stamps on the same parameters. For each
// copy the step period must be 1 + nmda_max_latency(ITER) + 3 cycles, the
// mean normalised current error must stay below about 2^-ITER times a small
// factor, and it must shrink as ITER grows. The word format stays Q15.16 in
// all three; only the iteration counts of the exponential and divider units
// change. Printed: cycles per step and the normalised errors.
module tb_ionsim_top_iter;
  import ionsim_pkg::*;

  localparam int NU = 3;
  localparam int ITERS [NU] = '{8, 12, 16};

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  logic [NU-1:0] fin;
  int   steps [NU], perr [NU];
  real  ea [NU], en [NU];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar u = 0; u < NU; u++) begin : g_u
    tb_top_at_iter #(.ITER(ITERS[u]), .NSTEP(1000)) h (
      .clk, .rst_n, .enable, .finished(fin[u]), .steps(steps[u]),
      .period_errors(perr[u]), .err_ampa(ea[u]), .err_nmda(en[u]));
  end

  initial begin
    #10_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    enable = 1'b1;
    wait (&fin);
    repeat (2) @(negedge clk);
    for (int u = 0; u < NU; u++) begin
      $display("ITER %0d: %0d cycles per step, AMPA error %e, NMDA error %e",
               ITERS[u], 1 + nmda_max_latency(ITERS[u]) + memb_latency(1'b0), ea[u], en[u]);
      check(steps[u] == 1000, $sformatf("ITER %0d: %0d steps", ITERS[u], steps[u]));
      check(perr[u] == 0, $sformatf("ITER %0d: %0d time stamp or period errors", ITERS[u], perr[u]));
      check(ea[u] < 2.0 * 2.0 ** (-ITERS[u]) + 2.0e-5,
            $sformatf("ITER %0d: AMPA error %e", ITERS[u], ea[u]));
      check(en[u] < 2.0 * 2.0 ** (-ITERS[u]) + 2.0e-5,
            $sformatf("ITER %0d: NMDA error %e", ITERS[u], en[u]));
      if (u > 0) begin
        check(ea[u] < ea[u-1], $sformatf("ITER %0d: AMPA error not smaller", ITERS[u]));
        check(en[u] < en[u-1], $sformatf("ITER %0d: NMDA error not smaller", ITERS[u]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

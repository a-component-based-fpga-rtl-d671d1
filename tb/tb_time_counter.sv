// tb_time_counter: self-checking test of the time base. Checks that a rising
// ENABLE edge clears t and raises start_req, that ack clears the request,
// that each tick advances t by exactly one, that a level (not an edge) of
// ENABLE does not restart the count, that a new edge restarts it from zero
// and that t holds at its maximum instead of wrapping.
module tb_time_counter;
  import ionsim_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0, enable = 1'b0, ack = 1'b0, tick = 1'b0;
  tstamp_t t;
  logic    start_req, run;
  int      checks = 0, failures = 0;

  always #5 clk = ~clk;

  time_counter dut (.clk, .rst_n, .enable, .ack, .tick, .t, .start_req, .run);

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(input int et, input logic ereq, input string what);
    checks++;
    if (int'(t) != et || start_req !== ereq) begin
      failures++;
      $display("%s: t=%0d req=%0b, expected t=%0d req=%0b", what, t, start_req, et, ereq);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_state(0, 1'b0, "after reset");
    // run some ticks before any enable: t counts but no request
    tick = 1'b1; repeat (5) @(negedge clk); tick = 1'b0;
    expect_state(5, 1'b0, "ticks without enable");
    enable = 1'b1;
    @(negedge clk);
    expect_state(0, 1'b1, "enable edge");
    checks++; if (!run) begin failures++; $display("run low while enabled"); end
    @(negedge clk);
    expect_state(0, 1'b1, "request held until ack");
    ack = 1'b1; @(negedge clk); ack = 1'b0;
    expect_state(0, 1'b0, "request cleared by ack");
    for (int k = 1; k <= 37; k++) begin
      tick = 1'b1; @(negedge clk); tick = 1'b0;
      expect_state(k, 1'b0, "tick");
      @(negedge clk);
      expect_state(k, 1'b0, "no tick");
    end
    enable = 1'b0;
    @(negedge clk);
    checks++; if (run) begin failures++; $display("run high while disabled"); end
    expect_state(37, 1'b0, "enable low keeps t");
    enable = 1'b1;
    @(negedge clk);
    expect_state(0, 1'b1, "second edge restarts");
    ack = 1'b1; @(negedge clk); ack = 1'b0;
    tick = 1'b1;
    repeat ((1 << TW) + 10) @(negedge clk);
    tick = 1'b0;
    expect_state((1 << TW) - 1, 1'b0, "saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

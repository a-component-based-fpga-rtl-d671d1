// tb_fx_mul: self-checking test of the multiplication component. Random and
// corner-case Q15.16 operands are multiplied; each product is compared with
// the rounded real product (saturated at the word limits) one cycle after
// in_valid, and out_valid must follow in_valid by exactly one cycle.
module tb_fx_mul;
  import ionsim_pkg::*;
  import tb_util_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  fx_t  a = '0, b = '0, p;
  logic out_valid;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  fx_mul dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .p);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input real ra, input real rb);
    real ref_v;
    @(negedge clk);
    a = to_fx(ra); b = to_fx(rb); in_valid = 1'b1;
    ref_v = clip(from_fx(a) * from_fx(b));
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (!out_valid || rabs(from_fx(p) - ref_v) > 0.51 / (2.0 ** FRAC)) begin
      failures++;
      $display("%f * %f = %f (valid %0b), expected %f", from_fx(a), from_fx(b),
               from_fx(p), out_valid, ref_v);
    end
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("out_valid held too long"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_one(1.0, 1.0);
    run_one(-70.0, 0.062);
    run_one(-3.5, -2.25);
    run_one(1000.0, 1000.0);
    run_one(-1000.0, 1000.0);
    run_one(0.0001, 0.0001);
    for (int n = 0; n < 400; n++)
      run_one(-300.0 + 600.0 * real'($urandom_range(0, 1000000)) / 1.0e6,
              -300.0 + 600.0 * real'($urandom_range(0, 1000000)) / 1.0e6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

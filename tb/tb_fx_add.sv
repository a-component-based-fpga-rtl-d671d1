// tb_fx_add: self-checking test of the addition/subtraction component.
// Random and corner-case operands are added and subtracted; each result is
// compared with the exact real result (saturated at the word limits) one
// cycle after in_valid.
module tb_fx_add;
  import ionsim_pkg::*;
  import tb_util_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, sub = 1'b0;
  fx_t  a = '0, b = '0, s;
  logic out_valid;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  fx_add dut (.clk, .rst_n, .in_valid, .a, .b, .sub, .out_valid, .s);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input fx_t ra, input fx_t rb, input logic rs);
    real ref_v;
    @(negedge clk);
    a = ra; b = rb; sub = rs; in_valid = 1'b1;
    ref_v = clip(rs ? from_fx(a) - from_fx(b) : from_fx(a) + from_fx(b));
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (!out_valid || from_fx(s) != ref_v) begin
      failures++;
      $display("%f %s %f = %f, expected %f", from_fx(a), rs ? "-" : "+", from_fx(b),
               from_fx(s), ref_v);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_one(to_fx(-70.0), to_fx(0.0), 1'b1);
    run_one(to_fx(-70.0), to_fx(-65.0), 1'b1);
    run_one(FX_MAX, FX_ONE, 1'b0);
    run_one(FX_MIN, FX_ONE, 1'b1);
    run_one(FX_MIN, FX_MAX, 1'b0);
    for (int n = 0; n < 400; n++)
      run_one(fx_t'($urandom), fx_t'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// fx_mul: the multiplication component (the "times" operator of the
// component-based framework).
//
// Multiplies two Q15.16 words, rounds the 64-bit product to nearest at the
// 16th fractional bit and saturates it to the Q15.16 range. The product is
// registered: p is valid one clock after in_valid (latency T_mul = 1). On an
// FPGA the product maps onto one embedded multiplier; its rounding,
// saturation and one-cycle latency are this design's choice.
//
// Ports: in_valid with a, b in; out_valid with p one cycle later.
module fx_mul
  import ionsim_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  fx_t  a,
  input  fx_t  b,
  output logic out_valid,
  output fx_t  p
);
  logic signed [2*W-1:0] prod, rnd;

  always_comb begin
    prod = 64'(a) * 64'(b);
    rnd  = (prod + (64'sd1 <<< (FRAC - 1))) >>> FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) p <= fx_sat(rnd);
    end
  end
endmodule

// fx_add: the addition/subtraction component (the "plus" operator of the
// component-based framework).
//
// Computes a + b, or a - b when sub is set, on Q15.16 words with saturation,
// and registers the result: s is valid one clock after in_valid (latency
// T_add = 1). Saturation and the one-cycle latency are this design's choice.
//
// Ports: in_valid with a, b, sub in; out_valid with s one cycle later.
module fx_add
  import ionsim_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  fx_t  a,
  input  fx_t  b,
  input  logic sub,
  output logic out_valid,
  output fx_t  s
);
  logic signed [2*W-1:0] sum;

  always_comb sum = sub ? (64'(a) - 64'(b)) : (64'(a) + 64'(b));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      s         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) s <= fx_sat(sum);
    end
  end
endmodule

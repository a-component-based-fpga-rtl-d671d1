// div_factoring: the division component, q = num / den for Q15.16 words,
// den > 0.
//
// The denominator is first normalised by its leading one to xn = den / 2^p in
// [1, 2). Division then runs by multiplicative normalisation (the factoring
// method): in each step, with shift i, the candidate a = x - x * 2^-i is
// formed by a shift and a subtraction; if a is still at least 1 it replaces x
// and the partial result y is scaled the same way, y <- y - y * 2^-i. x is
// driven towards 1 from above, so y, which started at |num|, converges to
// |num| / xn.
//
// One pass over i = 1 .. n cannot bring every xn in [1, 2) down to 1: i = 1
// never applies there, and a factor (1 - 2^-i) removes slightly more than all
// later factors together, so a greedy pass stalls for xn above about 1.73.
// The shifts i = 2 .. ITER/2 are therefore each tried twice, then
// i = ITER/2 + 1 .. ITER + 1 once; the residual x - 1 ends below about 2^-ITER
// (3 ITER / 2 - 1 steps). The quotient is y shifted back by the
// normalisation exponent, rounded to the nearest LSB, given the sign of num
// and saturated.
//
// The factoring recurrence follows the method; the repeated shifts, the
// leading-one normalisation, the sign handling, G guard bits and the rule
// for den <= 0 (the result saturates with the sign of num) are this design's
// choices. The
// acceptance test is "a >= 1"; it keeps x = 1 exactly when a step lands there.
//
// Timing: start is sampled in one cycle; done pulses, with q valid and held,
// div_latency(ITER) = 3 ITER / 2 + 1 cycles later (load and normalise,
// 3 ITER / 2 - 1 steps, denormalise). busy is high in between; start is
// ignored while busy.
module div_factoring
  import ionsim_pkg::*;
#(
  parameter int ITER = 16   // sets the precision: about 2^-ITER relative
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  num,
  input  fx_t  den,
  output logic busy,
  output logic done,
  output fx_t  q
);
  localparam int G  = 4;
  localparam int XF = FRAC + G;          // fractional bits of x
  localparam int XW = XF + 2;            // x in [1, 2)
  localparam int YW = 64;

  typedef enum logic [1:0] {S_IDLE, S_STEP, S_OUT} state_t;

  state_t                  state;
  logic [XW-1:0]           xr;
  logic [YW-1:0]           yr;
  logic [$clog2(ITER+2)-1:0] i;
  logic                    rep;          // second try of the same shift
  logic [4:0]              pos;          // leading-one position of den
  logic                    neg, bad;

  // leading-one detection and normalisation of the denominator
  logic [4:0]              lead;
  logic [W+XF-1:0]         xwide;
  always_comb begin
    lead = '0;
    for (int b = 0; b < W - 1; b++)
      if (den[b]) lead = 5'(b);
    xwide = ({{XF{1'b0}}, den} << XF) >> lead;
  end

  logic [W-1:0] mag;
  always_comb mag = num[W-1] ? W'(-num) : W'(num);

  // one factoring step
  logic [XW-1:0] cand;
  logic          take;
  always_comb begin
    cand = xr - (xr >> i);
    take = cand >= (XW'(1) << XF);
  end

  // denormalise: quotient = y * 2^-(G + pos - FRAC)
  int            sh;
  logic [YW-1:0] qmag;
  always_comb begin
    sh = G + int'(pos) - FRAC;
    if (sh > 0) qmag = (yr + (YW'(1) << (sh - 1))) >> sh;
    else        qmag = yr << (-sh);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      xr    <= '0;
      yr    <= '0;
      i     <= '0;
      rep   <= 1'b0;
      pos   <= '0;
      neg   <= 1'b0;
      bad   <= 1'b0;
      done  <= 1'b0;
      q     <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          xr    <= XW'(xwide);
          yr    <= YW'(mag) << G;
          pos   <= lead;
          neg   <= num[W-1];
          bad   <= den[W-1] || (den == '0);
          i     <= ($clog2(ITER+2))'(2);
          rep   <= 1'b0;
          state <= S_STEP;
        end
        S_STEP: begin
          if (take) begin
            xr <= cand;
            yr <= yr - (yr >> i);
          end
          if (int'(i) <= ITER / 2 && !rep) begin
            rep <= 1'b1;
          end else begin
            rep <= 1'b0;
            i   <= i + 1'b1;
          end
          if (int'(i) == ITER + 1) state <= S_OUT;
        end
        S_OUT: begin
          if (bad || qmag > YW'(FX_MAX)) q <= neg ? FX_MIN : FX_MAX;
          else                           q <= neg ? -fx_t'(qmag) : fx_t'(qmag);
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule

// exp_factoring: the exponentiation component, e^x for a signed fixed-point
// x with FRAC_X fractional bits (Q15.16 by default, the system word format).
//
// The argument is split into its integer part I = floor(x) and its fraction
// f = x - I, so that e^x = e^I * e^f. For a negative argument x = -A-B this is
// the rearrangement e^(-A-1) * e^(1-B) of the factoring method: the integer
// factor is read from a small table of e^k and applied with one multiply, and
// the fraction is expanded by additive normalisation (the factoring
// algorithm): starting from y = 1, each step j compares the residual with
// ln(1 + 2^-j) from a table; if it is at least that large, the constant is
// subtracted and y grows by y * 2^-j, a shift and an add. After the steps the
// residual is below about 2^-ITER and y is e^f.
//
// The factoring steps use j = 1 .. ITER as the method prescribes, preceded
// by one j = 0 step (factor 2): the fraction can be as large as 1, beyond
// what the j >= 1 factors alone reach (their product is about 2.38). G guard
// bits are carried in the residual and in y. Both tables are computed at
// elaboration from $ln and $exp. Outside the table range the result
// saturates to the largest word (I > IMAX) or is zero (I < IMIN), where e^x
// is below half an output LSB.
//
// FRAC_X sets the fractional bits of x and y; the 16 integer bits (sign
// included) stay as in the system word. The channel blocks use the default;
// other values serve for stand-alone precision studies of the method at
// wider or narrower resolutions.
//
// Timing: start is sampled in one cycle; done pulses, with y valid and held,
// exp_latency(ITER) = ITER + 3 cycles later (load, ITER + 1 factoring steps, final
// multiply). busy is high in between; start is ignored while busy.
module exp_factoring
  import ionsim_pkg::*;
#(
  parameter int ITER   = 16,    // factoring steps after the j = 0 step
  parameter int FRAC_X = FRAC,  // fractional bits of x and y
  localparam int XW    = W - FRAC + FRAC_X
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [XW-1:0] x,
  output logic                 busy,
  output logic                 done,
  output logic signed [XW-1:0] y
);
  localparam int G    = 4;
  localparam int XF   = FRAC_X + G;    // fractional bits of residual and y
  localparam int TF   = 32;            // fractional bits of the e^k table
  // below e^IMIN the result rounds to zero: IMIN = floor(-(FRAC_X + 1) ln 2)
  localparam int IMIN = int'($floor(-(FRAC_X + 1) * $ln(2.0)));
  localparam int IMAX = 10;            // e^(IMAX+1) is beyond the 15 integer bits
  localparam logic signed [XW-1:0] YMAX = {1'b0, {(XW-1){1'b1}}};
  localparam int NE   = IMAX - IMIN + 1;
  localparam int EW   = 48;            // e^IMAX * 2^TF < 2^47
  localparam int YW   = XF + 2;        // y < e < 4
  localparam int PW   = EW + YW;

  typedef logic [XF:0]   lnv_t;
  typedef logic [EW-1:0] ev_t;

  // ln(1 + 2^-j), j = 0 .. ITER, rounded to XF fractional bits.
  function automatic lnv_t ln_entry(input int j);
    return lnv_t'(longint'($ln(1.0 + 2.0 ** (-j)) * (2.0 ** XF) + 0.5));
  endfunction

  // e^k, k = IMIN .. IMAX, rounded to TF fractional bits.
  function automatic ev_t e_entry(input int k);
    return ev_t'(longint'($exp(real'(k)) * (2.0 ** TF) + 0.5));
  endfunction

  typedef lnv_t ln_tab_t [ITER+1];
  typedef ev_t  e_tab_t  [NE];

  function automatic ln_tab_t make_ln_tab();
    ln_tab_t tab;
    for (int j = 0; j <= ITER; j++) tab[j] = ln_entry(j);
    return tab;
  endfunction

  function automatic e_tab_t make_e_tab();
    e_tab_t tab;
    for (int k = 0; k < NE; k++) tab[k] = e_entry(k + IMIN);
    return tab;
  endfunction

  localparam ln_tab_t LN_TAB = make_ln_tab();
  localparam e_tab_t  E_TAB  = make_e_tab();

  typedef enum logic [1:0] {S_IDLE, S_STEP, S_MUL} state_t;

  state_t                 state;
  logic [XF:0]            resid;     // remaining fraction
  logic [YW-1:0]          yacc;      // partial product, Q2.XF
  logic [$clog2(ITER+1)-1:0] j;
  logic [$clog2(NE)-1:0]  eidx;
  logic                   under, over;

  // range reduction of the incoming argument
  logic signed [XW-FRAC_X-1:0] ipart;
  always_comb ipart = x[XW-1:FRAC_X];

  // one factoring step
  logic [XF:0]   diff;
  logic          take;
  always_comb begin
    diff = resid - LN_TAB[j];
    take = resid >= LN_TAB[j];
  end

  // final multiply by e^I, rounded to FRAC_X fractional bits
  logic [PW-1:0] prod, rnd;
  always_comb begin
    prod = PW'(E_TAB[eidx]) * PW'(yacc);
    rnd  = (prod + (PW'(1) << (TF + XF - FRAC_X - 1))) >> (TF + XF - FRAC_X);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      resid <= '0;
      yacc  <= '0;
      j     <= '0;
      eidx  <= '0;
      under <= 1'b0;
      over  <= 1'b0;
      done  <= 1'b0;
      y     <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          resid <= {1'b0, x[FRAC_X-1:0], {G{1'b0}}};
          yacc  <= YW'(1) << XF;
          j     <= '0;
          under <= int'(ipart) < IMIN;
          over  <= int'(ipart) > IMAX;
          eidx  <= ($clog2(NE))'(int'(ipart) - IMIN);
          state <= S_STEP;
        end
        S_STEP: begin
          if (take) begin
            resid <= diff;
            yacc  <= yacc + (yacc >> j);
          end
          j <= j + 1'b1;
          if (int'(j) == ITER) state <= S_MUL;
        end
        S_MUL: begin
          if (under)                 y <= '0;
          else if (over)             y <= YMAX;
          else if (rnd > PW'(YMAX))  y <= YMAX;
          else                       y <= XW'(rnd);
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule

// ionsim_pkg: number formats, parameter records and helpers shared by the
// ion-channel simulator.
//
// Every quantity (membrane voltage, currents, conductance scale factors,
// reciprocal time constants) is a signed two's-complement fixed-point word of
// W = 32 bits with FRAC = 16 fractional bits (Q15.16). The 16-bit fraction is
// the 16-bit resolution the component-based simulator is evaluated at; the 15
// integer bits are this design's choice, sized for millivolt voltages and
// exponentials up to e^10. The time stamp t is an unsigned integer count of
// simulation steps, TW = 15 bits wide so that it converts to Q15.16 without
// overflow.
//
// The channel parameters are run-time inputs, not elaboration constants, so
// they can be changed while the simulator runs (a dynamic-clamp requirement).
package ionsim_pkg;

  localparam int W    = 32;  // word length of every fixed-point value
  localparam int FRAC = 16;  // fractional bits
  localparam int TW   = 15;  // time-stamp width (steps)

  typedef logic signed [W-1:0] fx_t;
  typedef logic [TW-1:0]       tstamp_t;

  localparam fx_t FX_ONE = fx_t'(1) <<< FRAC;
  localparam fx_t FX_MAX = {1'b0, {(W-1){1'b1}}};
  localparam fx_t FX_MIN = {1'b1, {(W-1){1'b0}}};

  // AMPA synapse, Eq. (3) with Eq. (1):
  //   I = g_const * t * exp(-t * inv_tpeak) * (V - e_rev)
  typedef struct packed {
    fx_t inv_tpeak;  // 1 / t_peak, per step
    fx_t g_const;    // scale of the alpha function
    fx_t e_rev;      // reversal potential, mV
  } ampa_param_t;

  // NMDA synapse, Eq. (4) with Eq. (1):
  //   I = g_n * (V - e_rev) / (1 + eta*mg*exp(-gamma*V))
  //       * (exp(-t*inv_tau1) - exp(-t*inv_tau2))
  typedef struct packed {
    fx_t inv_tau1;   // 1 / tau_1, per step
    fx_t inv_tau2;   // 1 / tau_2, per step
    fx_t eta;        // Mg block constant, per mM
    fx_t mg;         // extracellular [Mg2+], mM
    fx_t gamma;      // voltage sensitivity of the block, per mV
    fx_t g_n;        // maximal conductance
    fx_t e_rev;      // reversal potential, mV
  } nmda_param_t;

  // Membrane, Eq. (2) integrated with forward Euler over one step dt:
  //   V <- V - k_leak*(V - v_rest) - k_cap*sum(I)
  typedef struct packed {
    fx_t k_leak;     // g_leak * dt / C_m
    fx_t k_cap;      // dt / C_m
    fx_t v_rest;     // resting potential, mV
    fx_t v_init;     // V at t = 0, mV
  } memb_param_t;

  // Saturate a wide signed value to a fixed-point word.
  function automatic fx_t fx_sat(input logic signed [2*W-1:0] v);
    if (v > 64'(signed'(FX_MAX)))      return FX_MAX;
    else if (v < 64'(signed'(FX_MIN))) return FX_MIN;
    else                                return fx_t'(v);
  endfunction

  // Latencies of the components in clock cycles, from the cycle that starts
  // an operation to the cycle in which its result is valid.
  localparam int T_MUL = 1;
  localparam int T_ADD = 1;
  function automatic int exp_latency(input int iter);
    return iter + 3;
  endfunction
  function automatic int div_latency(input int iter);
    return iter + iter / 2 + 1;
  endfunction

  // Latencies of the channel and membrane blocks, as laid out in their
  // schedules: the sums of the component latencies on the critical path.
  function automatic int ampa_max_latency(input int iter);
    return 3*T_MUL + exp_latency(iter);
  endfunction
  function automatic int ampa_min_latency(input int iter);
    return 4*T_MUL + exp_latency(iter);
  endfunction
  function automatic int nmda_max_latency(input int iter);
    return 3*T_MUL + div_latency(iter) + exp_latency(iter) + T_ADD;
  endfunction
  function automatic int nmda_min_latency(input int iter);
    return 7*T_MUL + div_latency(iter) + 3*exp_latency(iter) + 3*T_ADD;
  endfunction
  function automatic int memb_latency(input bit min_res);
    return min_res ? 2*T_MUL + 3*T_ADD : T_MUL + 2*T_ADD;
  endfunction

  // Time stamp as a fixed-point number of steps.
  function automatic fx_t fx_from_time(input tstamp_t t);
    return fx_t'({1'b0, t}) <<< FRAC;
  endfunction

endpackage

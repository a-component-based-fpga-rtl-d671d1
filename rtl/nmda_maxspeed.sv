// nmda_maxspeed: NMDA synaptic current, maximum-speed mapping.
//
// Evaluates the dual-exponential, magnesium-blocked NMDA current
//   I = g_n (V - E) / (1 + eta [Mg] exp(-gamma V))
//       * (exp(-t / tau_1) - exp(-t / tau_2))
// as independent processes run side by side, in four waves:
//   1. -t/tau_1, -t/tau_2, eta*[Mg], -gamma*V on four multipliers; V - E on
//      an adder
//   2. P4 = exp(-t/tau_1), P5 = exp(-t/tau_2), P7 = exp(-gamma V) on three
//      exponential units
//   3. P6*P7 and P11 = g_n*(V - E) on two multipliers, P9 = P4 - P5 on the
//      second adder; then P10 = P6*P7 + 1 on the first adder
//   4. P11 / P10 on the divider, then I = (P11/P10) * P9 on a multiplier
// That is the 4 multipliers + divider + 3 exp + 2 adders budget and the
// 3 T_mul + T_div + T_exp + T_add delay of the maximum-speed mapping.
// Intermediate values stay in the components' held output registers until
// consumed. Which multiplier is reused for which product is this design's
// choice. tau_1 is the slower time constant, so P9 >= 0 for t >= 0.
//
// Interface: start (one cycle) samples t, v and p; done pulses with i_out
// valid nmda_max_latency(ITER) = 5 ITER / 2 + 8 cycles later, and i_out holds
// until the next result. start is ignored while busy.
module nmda_maxspeed
  import ionsim_pkg::*;
#(
  parameter int ITER = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  tstamp_t     t,
  input  fx_t         v,
  input  nmda_param_t p,
  output logic        busy,
  output logic        done,
  output fx_t         i_out
);
  typedef enum logic [2:0] {S_IDLE, S_W1, S_EXP, S_W3, S_ONE, S_DIV, S_FIN} state_t;
  state_t state;
  fx_t    gn_r;

  logic       m_v  [4];
  fx_t        m_a  [4], m_b [4], m_p [4];
  logic       m_ov [4];
  logic       a_v  [2], a_sub [2], a_ov [2];
  fx_t        a_a  [2], a_b [2], a_s [2];
  logic       e_start;
  fx_t        e_x  [3], e_y [3];
  logic       e_busy [3], e_done [3];
  logic       d_start, d_busy, d_done;
  fx_t        d_q;

  for (genvar k = 0; k < 4; k++) begin : g_mul
    fx_mul u_mul (.clk, .rst_n, .in_valid(m_v[k]), .a(m_a[k]), .b(m_b[k]),
                  .out_valid(m_ov[k]), .p(m_p[k]));
  end
  for (genvar k = 0; k < 2; k++) begin : g_add
    fx_add u_add (.clk, .rst_n, .in_valid(a_v[k]), .a(a_a[k]), .b(a_b[k]), .sub(a_sub[k]),
                  .out_valid(a_ov[k]), .s(a_s[k]));
  end
  for (genvar k = 0; k < 3; k++) begin : g_exp
    exp_factoring #(.ITER(ITER)) u_exp (.clk, .rst_n, .start(e_start), .x(e_x[k]),
                  .busy(e_busy[k]), .done(e_done[k]), .y(e_y[k]));
  end
  div_factoring #(.ITER(ITER)) u_div (.clk, .rst_n, .start(d_start), .num(m_p[3]),
                  .den(a_s[0]), .busy(d_busy), .done(d_done), .q(d_q));

  assign e_x[0] = m_p[0];
  assign e_x[1] = m_p[1];
  assign e_x[2] = m_p[3];

  logic go;
  always_comb begin
    go = (state == S_IDLE) && start;
    for (int k = 0; k < 4; k++) begin m_v[k] = 1'b0; m_a[k] = '0; m_b[k] = '0; end
    for (int k = 0; k < 2; k++) begin a_v[k] = 1'b0; a_a[k] = '0; a_b[k] = '0; a_sub[k] = 1'b0; end
    e_start = (state == S_W1) && m_ov[0];
    d_start = (state == S_ONE) && a_ov[0];
    unique case (state)
      S_IDLE: if (start) begin
        m_v[0] = 1'b1;  m_a[0] = -fx_from_time(t);  m_b[0] = p.inv_tau1;
        m_v[1] = 1'b1;  m_a[1] = -fx_from_time(t);  m_b[1] = p.inv_tau2;
        m_v[2] = 1'b1;  m_a[2] = p.eta;             m_b[2] = p.mg;
        m_v[3] = 1'b1;  m_a[3] = -p.gamma;          m_b[3] = v;
        a_v[0] = 1'b1;  a_a[0] = v;  a_b[0] = p.e_rev;  a_sub[0] = 1'b1;
      end
      S_EXP: if (e_done[0]) begin
        m_v[2] = 1'b1;  m_a[2] = m_p[2];  m_b[2] = e_y[2];            // P6 * P7
        m_v[3] = 1'b1;  m_a[3] = gn_r;    m_b[3] = a_s[0];            // P11
        a_v[1] = 1'b1;  a_a[1] = e_y[0];  a_b[1] = e_y[1];  a_sub[1] = 1'b1;  // P9
      end
      S_W3: if (m_ov[2]) begin
        a_v[0] = 1'b1;  a_a[0] = m_p[2];  a_b[0] = FX_ONE;            // P10
      end
      S_DIV: if (d_done) begin
        m_v[0] = 1'b1;  m_a[0] = d_q;     m_b[0] = a_s[1];            // result
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      gn_r  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (go) begin gn_r <= p.g_n; state <= S_W1; end
        S_W1:   if (m_ov[0])   state <= S_EXP;
        S_EXP:  if (e_done[0]) state <= S_W3;
        S_W3:   if (m_ov[2])   state <= S_ONE;
        S_ONE:  if (a_ov[0])   state <= S_DIV;
        S_DIV:  if (d_done)    state <= S_FIN;
        S_FIN:  if (m_ov[0])   state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  fx_t i_hold;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    i_hold <= '0;
    else if (done) i_hold <= m_p[0];
  end

  assign done  = (state == S_FIN) && m_ov[0];
  assign i_out = done ? m_p[0] : i_hold;
  assign busy  = (state != S_IDLE);

  // Handshake rules: the exponential units and the divider ignore start
  // while busy, so the sequencer must never issue one then.
  for (genvar k = 0; k < 3; k++) begin : g_exp_chk
    a_exp_free: assert property (@(posedge clk) disable iff (!rst_n) e_start |-> !e_busy[k]);
  end
  a_div_free: assert property (@(posedge clk) disable iff (!rst_n) d_start |-> !d_busy);
endmodule

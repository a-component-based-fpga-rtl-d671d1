// nmda_minres: NMDA synaptic current, minimum-resource mapping.
//
// Same function as nmda_maxspeed,
//   I = g_n (V - E) / (1 + eta [Mg] exp(-gamma V))
//       * (exp(-t / tau_1) - exp(-t / tau_2)),
// on one multiplier, one adder, one exponential unit and one divider, used
// strictly one operation at a time in this order:
//   -t/tau_1, exp -> P4;  -t/tau_2, exp -> P5;  -gamma V, exp -> P7;
//   eta*[Mg] -> P6;  P6*P7;  +1 -> P10;  V - E -> P8;  g_n*P8 -> P11;
//   P11 / P10;  P4 - P5 -> P9;  (P11/P10) * P9
// Seven products, three sums, three exponentials and one division give the
// 7 T_mul + T_div + 3 T_exp + 3 T_add delay of the minimum-resource mapping.
// Each operation is issued in the cycle the previous one delivers, reading
// that result straight from the component's output register; values needed
// later are kept in a handful of registers. The order of the operations is
// this design's choice.
//
// Interface: start (one cycle) samples t, v and p; done pulses with i_out
// valid nmda_min_latency(ITER) = 9 ITER / 2 + 20 cycles later, and i_out holds
// until the next result. start is ignored while busy.
module nmda_minres
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
  typedef enum logic [3:0] {
    S_IDLE, S_M1, S_E1, S_M2, S_E2, S_M3, S_E3, S_M4, S_M5,
    S_A1, S_A2, S_M6, S_D, S_A3, S_M7
  } state_t;
  state_t state;

  nmda_param_t p_r;
  tstamp_t     t_r;
  fx_t         v_r, p4_r, p5_r, p7_r, p10_r;

  logic m_v, a_v, a_sub, e_start, d_start;
  fx_t  m_a, m_b, a_a, a_b;
  logic m_ov, a_ov, e_busy, e_done, d_busy, d_done;
  fx_t  m_p, a_s, e_y, d_q;

  fx_mul u_mul (.clk, .rst_n, .in_valid(m_v), .a(m_a), .b(m_b), .out_valid(m_ov), .p(m_p));
  fx_add u_add (.clk, .rst_n, .in_valid(a_v), .a(a_a), .b(a_b), .sub(a_sub),
                .out_valid(a_ov), .s(a_s));
  exp_factoring #(.ITER(ITER)) u_exp (.clk, .rst_n, .start(e_start), .x(m_p),
                .busy(e_busy), .done(e_done), .y(e_y));
  div_factoring #(.ITER(ITER)) u_div (.clk, .rst_n, .start(d_start), .num(m_p), .den(p10_r),
                .busy(d_busy), .done(d_done), .q(d_q));

  // completion of the operation in flight
  logic fin;
  always_comb begin
    unique case (state)
      S_IDLE:                         fin = start;
      S_E1, S_E2, S_E3:               fin = e_done;
      S_A1, S_A2, S_A3:               fin = a_ov;
      S_D:                            fin = d_done;
      default:                        fin = m_ov;
    endcase
  end

  // issue of the next operation, in the cycle the current one completes
  always_comb begin
    m_v = 1'b0;  m_a = '0;  m_b = '0;
    a_v = 1'b0;  a_a = '0;  a_b = '0;  a_sub = 1'b0;
    e_start = 1'b0;
    d_start = 1'b0;
    if (fin) begin
      unique case (state)
        S_IDLE: begin m_v = 1'b1; m_a = -fx_from_time(t);   m_b = p.inv_tau1; end
        S_M1:   e_start = 1'b1;
        S_E1:   begin m_v = 1'b1; m_a = -fx_from_time(t_r); m_b = p_r.inv_tau2; end
        S_M2:   e_start = 1'b1;
        S_E2:   begin m_v = 1'b1; m_a = -p_r.gamma;         m_b = v_r; end
        S_M3:   e_start = 1'b1;
        S_E3:   begin m_v = 1'b1; m_a = p_r.eta;            m_b = p_r.mg; end
        S_M4:   begin m_v = 1'b1; m_a = m_p;                m_b = p7_r; end
        S_M5:   begin a_v = 1'b1; a_a = m_p;                a_b = FX_ONE; end
        S_A1:   begin a_v = 1'b1; a_a = v_r;  a_b = p_r.e_rev;  a_sub = 1'b1; end
        S_A2:   begin m_v = 1'b1; m_a = p_r.g_n;            m_b = a_s; end
        S_M6:   d_start = 1'b1;
        S_D:    begin a_v = 1'b1; a_a = p4_r; a_b = p5_r;   a_sub = 1'b1; end
        S_A3:   begin m_v = 1'b1; m_a = d_q;                m_b = a_s; end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      p_r   <= '0;
      t_r   <= '0;
      v_r   <= '0;
      p4_r  <= '0;
      p5_r  <= '0;
      p7_r  <= '0;
      p10_r <= '0;
    end else if (fin) begin
      unique case (state)
        S_IDLE: begin p_r <= p; t_r <= t; v_r <= v; state <= S_M1; end
        S_M1:   state <= S_E1;
        S_E1:   begin p4_r <= e_y; state <= S_M2; end
        S_M2:   state <= S_E2;
        S_E2:   begin p5_r <= e_y; state <= S_M3; end
        S_M3:   state <= S_E3;
        S_E3:   begin p7_r <= e_y; state <= S_M4; end
        S_M4:   state <= S_M5;
        S_M5:   state <= S_A1;
        S_A1:   begin p10_r <= a_s; state <= S_A2; end
        S_A2:   state <= S_M6;
        S_M6:   state <= S_D;
        S_D:    state <= S_A3;
        S_A3:   state <= S_M7;
        S_M7:   state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  fx_t i_hold;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    i_hold <= '0;
    else if (done) i_hold <= m_p;
  end

  assign done  = (state == S_M7) && m_ov;
  assign i_out = done ? m_p : i_hold;
  assign busy  = (state != S_IDLE);

  // Handshake rules: the exponential unit and the divider ignore start while
  // busy, so the sequencer must never issue one then.
  a_exp_free: assert property (@(posedge clk) disable iff (!rst_n) e_start |-> !e_busy);
  a_div_free: assert property (@(posedge clk) disable iff (!rst_n) d_start |-> !d_busy);
endmodule

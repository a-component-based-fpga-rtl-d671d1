// ampa_minres: AMPA synaptic current, minimum-resource mapping.
//
// Same function as ampa_maxspeed,
//   I = g_const * t * exp(-t / t_peak) * (V - E),
// but with a single multiplier that is time-shared by all four products, run
// strictly one after another:
//   -t * inv_tpeak  ->  g_const * t  ->  exp(.)  ->  P1 * P2  ->  (.) * P3
// The subtraction V - E runs on the adder during the first product. Two
// registers keep the exponent argument and P2 while the multiplier is reused.
// This is the multiplier + exp + adder budget and the 4 T_mul + T_exp delay
// of the minimum-resource mapping; the exact order of the products is this
// design's choice.
//
// Interface: start (one cycle) samples t, v and p; done pulses with i_out
// valid ampa_min_latency(ITER) = ITER + 7 cycles later, and i_out holds until
// the next result. start is ignored while busy.
module ampa_minres
  import ionsim_pkg::*;
#(
  parameter int ITER = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  tstamp_t     t,
  input  fx_t         v,
  input  ampa_param_t p,
  output logic        busy,
  output logic        done,
  output fx_t         i_out
);
  typedef enum logic [2:0] {S_IDLE, S_M1, S_M2, S_EXP, S_M3, S_M4} state_t;
  state_t state;

  fx_t     x_r, p2_r, gc_r;
  tstamp_t t_r;

  logic m_v, a_v, e_start;
  fx_t  m_a, m_b;
  logic m_ov, a_ov, e_busy, e_done;
  fx_t  m_p, a_s, e_y;

  fx_mul u_mul (.clk, .rst_n, .in_valid(m_v), .a(m_a), .b(m_b), .out_valid(m_ov), .p(m_p));
  fx_add u_add (.clk, .rst_n, .in_valid(a_v), .a(v), .b(p.e_rev), .sub(1'b1),
                .out_valid(a_ov), .s(a_s));
  exp_factoring #(.ITER(ITER)) u_exp (.clk, .rst_n, .start(e_start), .x(x_r),
                .busy(e_busy), .done(e_done), .y(e_y));

  logic go;
  always_comb begin
    go      = (state == S_IDLE) && start;
    a_v     = go;
    e_start = (state == S_M2) && m_ov;
    m_v     = 1'b0;  m_a = '0;  m_b = '0;
    unique case (state)
      S_IDLE: if (start) begin m_v = 1'b1; m_a = -fx_from_time(t); m_b = p.inv_tpeak; end
      S_M1:   if (m_ov)  begin m_v = 1'b1; m_a = gc_r;   m_b = fx_from_time(t_r); end
      S_EXP:  if (e_done) begin m_v = 1'b1; m_a = e_y;   m_b = p2_r; end
      S_M3:   if (m_ov)  begin m_v = 1'b1; m_a = m_p;    m_b = a_s;  end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      x_r   <= '0;
      p2_r  <= '0;
      gc_r  <= '0;
      t_r   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (go) begin
          t_r   <= t;
          gc_r  <= p.g_const;
          state <= S_M1;
        end
        S_M1:  if (m_ov)   begin x_r  <= m_p; state <= S_M2;  end
        S_M2:  if (m_ov)   begin p2_r <= m_p; state <= S_EXP; end
        S_EXP: if (e_done) state <= S_M3;
        S_M3:  if (m_ov)   state <= S_M4;
        S_M4:  if (m_ov)   state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  fx_t i_hold;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    i_hold <= '0;
    else if (done) i_hold <= m_p;
  end

  assign done  = (state == S_M4) && m_ov;
  assign i_out = done ? m_p : i_hold;
  assign busy  = (state != S_IDLE);

  // Handshake rule: the exponential unit ignores start while busy, so the
  // sequencer must never issue one then.
  a_exp_free: assert property (@(posedge clk) disable iff (!rst_n) e_start |-> !e_busy);
endmodule

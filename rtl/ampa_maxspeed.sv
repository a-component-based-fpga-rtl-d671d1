// ampa_maxspeed: AMPA synaptic current, maximum-speed mapping.
//
// Evaluates I = g_const * t * exp(-t / t_peak) * (V - E) (alpha-function
// conductance times driving force) as three independent processes followed
// by two products:
//   P1 = exp(-t * inv_tpeak) || P2 = g_const * t || P3 = V - E
//   I  = (P1 * P2) * P3
// Two multipliers run the two products of the first stage side by side,
// together with the adder; the exponential unit then turns the first product
// into P1; the same two multipliers then form P1*P2 and the final product.
// That is the 2 multipliers + exp + adder budget and the 3 T_mul + T_exp delay
// of the maximum-speed mapping. Intermediate values are read from the
// components' held output registers, so no extra storage is needed.
//
// Interface: start (one cycle) samples t, v and the parameter record p;
// done pulses with i_out valid ampa_max_latency(ITER) = ITER + 6 cycles
// later, and i_out holds until the next result. start is ignored while busy.
module ampa_maxspeed
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
  typedef enum logic [1:0] {S_IDLE, S_MUL1, S_EXP, S_PROD} state_t;
  state_t state;
  logic   last;               // S_PROD: second product under way

  logic m0_v, m1_v, a0_v, e_start;
  fx_t  m0_a, m0_b, m1_a, m1_b;
  logic m0_ov, m1_ov, a0_ov, e_busy, e_done;
  fx_t  m0_p, m1_p, a0_s, e_y;

  fx_mul u_mul0 (.clk, .rst_n, .in_valid(m0_v), .a(m0_a), .b(m0_b), .out_valid(m0_ov), .p(m0_p));
  fx_mul u_mul1 (.clk, .rst_n, .in_valid(m1_v), .a(m1_a), .b(m1_b), .out_valid(m1_ov), .p(m1_p));
  fx_add u_add0 (.clk, .rst_n, .in_valid(a0_v), .a(v), .b(p.e_rev), .sub(1'b1),
                 .out_valid(a0_ov), .s(a0_s));
  exp_factoring #(.ITER(ITER)) u_exp (.clk, .rst_n, .start(e_start), .x(m0_p),
                 .busy(e_busy), .done(e_done), .y(e_y));

  logic go;
  always_comb begin
    go      = (state == S_IDLE) && start;
    m0_v    = 1'b0;  m0_a = '0;  m0_b = '0;
    m1_v    = 1'b0;  m1_a = '0;  m1_b = '0;
    a0_v    = go;
    e_start = (state == S_MUL1) && m0_ov;
    if (go) begin
      // stage 1: -t / t_peak and g_const * t in parallel, V - E on the adder
      m0_v = 1'b1;  m0_a = -fx_from_time(t);  m0_b = p.inv_tpeak;
      m1_v = 1'b1;  m1_a = p.g_const;         m1_b = fx_from_time(t);
    end else if (state == S_EXP && e_done) begin
      // P1 * P2
      m0_v = 1'b1;  m0_a = e_y;  m0_b = m1_p;
    end else if (state == S_PROD && !last && m0_ov) begin
      // (P1 * P2) * P3
      m1_v = 1'b1;  m1_a = m0_p;  m1_b = a0_s;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      last  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (go) state <= S_MUL1;
        S_MUL1: if (m0_ov) state <= S_EXP;
        S_EXP:  if (e_done) begin state <= S_PROD; last <= 1'b0; end
        S_PROD: begin
          if (m1_v) last <= 1'b1;
          if (last && m1_ov) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  fx_t i_hold;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    i_hold <= '0;
    else if (done) i_hold <= m1_p;
  end

  assign done  = (state == S_PROD) && last && m1_ov;
  assign i_out = done ? m1_p : i_hold;
  assign busy  = (state != S_IDLE);

  // Handshake rule: the exponential unit ignores start while busy, so the
  // sequencer must never issue one then.
  a_exp_free: assert property (@(posedge clk) disable iff (!rst_n) e_start |-> !e_busy);
endmodule

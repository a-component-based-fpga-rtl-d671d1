// membrane_integrator: the membrane register R and its update (the leak, the
// net channel current and the 1/s accumulator).
//
// Holds the membrane voltage V and advances it by one forward-Euler step of
// the membrane equation C_m dV/dt = -g_leak (V - V_rest) - sum(I):
//   V <- V - k_leak (V - V_rest) - k_cap * sum(I),
// with k_leak = g_leak dt / C_m and k_cap = dt / C_m supplied at run time.
// The N channel currents are summed (with saturation) as they are sampled.
//
// MIN_RES = 0, maximum-speed mapping (2 multipliers, 3 adders, delay
// T_mul + 2 T_add):
//   1. V - V_rest on an adder
//   2. k_leak * (V - V_rest) and k_cap * sum(I) on two multipliers
//   3. the accumulator subtracts both products from V (two adders)
// MIN_RES = 1, minimum-resource mapping (1 multiplier, 1 adder, delay
// 2 T_mul + 3 T_add), one operation at a time:
//   V - V_rest;  k_leak * (.);  k_cap * sum(I);  sum of the two products;
//   then the accumulator subtracts that sum from V
// In both mappings the accumulator is register R with its own subtractor,
// written in the cycle its operands arrive.
//
// The currents follow I = g (V - E), positive when flowing out of the cell,
// so they are subtracted; the leak and accumulator structure and the two
// operator budgets follow the design; the sign convention, the Euler scaling,
// the order of operations and the saturation are this design's choices.
//
// Interface: init (when idle) loads V with v_init. start (one cycle) samples
// the currents i_ch and the parameters; done pulses memb_latency(MIN_RES)
// cycles later (3 or 5), in the first cycle v shows the new value. start and
// init are ignored while busy.
module membrane_integrator
  import ionsim_pkg::*;
#(
  parameter int N       = 2,     // number of channel currents summed
  parameter bit MIN_RES = 1'b0   // 1: one multiplier and one adder, time-shared
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        start,
  input  memb_param_t mp,
  input  fx_t         i_ch [N],
  output fx_t         v,
  output logic        busy,
  output logic        done
);
  fx_t kl_r, kc_r, isum_r;

  // net membrane current, saturated
  logic signed [2*W-1:0] isum_w;
  always_comb begin
    isum_w = '0;
    for (int k = 0; k < N; k++) isum_w = isum_w + 64'(i_ch[k]);
  end

  if (!MIN_RES) begin : g_max
    typedef enum logic [1:0] {S_IDLE, S_SUB, S_MUL} state_t;
    state_t state;

    logic go;
    assign go = (state == S_IDLE) && start;

    logic a_ov, m0_ov, m1_ov, m_go;
    fx_t  a_s, m0_p, m1_p;

    fx_add u_add (.clk, .rst_n, .in_valid(go), .a(v), .b(mp.v_rest), .sub(1'b1),
                  .out_valid(a_ov), .s(a_s));
    assign m_go = (state == S_SUB) && a_ov;
    fx_mul u_mul0 (.clk, .rst_n, .in_valid(m_go), .a(kl_r), .b(a_s),    .out_valid(m0_ov), .p(m0_p));
    fx_mul u_mul1 (.clk, .rst_n, .in_valid(m_go), .a(kc_r), .b(isum_r), .out_valid(m1_ov), .p(m1_p));

    // accumulator: V - leak - charge (the two products arrive together)
    logic signed [2*W-1:0] v_next;
    always_comb v_next = 64'(v) - 64'(m0_p) - 64'(m1_p);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        state  <= S_IDLE;
        v      <= '0;
        kl_r   <= '0;
        kc_r   <= '0;
        isum_r <= '0;
        done   <= 1'b0;
      end else begin
        done <= 1'b0;
        unique case (state)
          S_IDLE: begin
            if (go) begin
              kl_r   <= mp.k_leak;
              kc_r   <= mp.k_cap;
              isum_r <= fx_sat(isum_w);
              state  <= S_SUB;
            end else if (init) begin
              v <= mp.v_init;
            end
          end
          S_SUB: if (a_ov) state <= S_MUL;
          S_MUL: if (m0_ov && m1_ov) begin
            v     <= fx_sat(v_next);
            done  <= 1'b1;
            state <= S_IDLE;
          end
          default: state <= S_IDLE;
        endcase
      end
    end

    assign busy = (state != S_IDLE);
  end else begin : g_min
    typedef enum logic [2:0] {S_IDLE, S_SUB, S_ML, S_MC, S_ADD} state_t;
    state_t state;

    logic m_v, a_v, a_sub, m_ov, a_ov, fin;
    fx_t  m_a, m_b, a_a, a_b, m_p, a_s, leak_r;

    fx_mul u_mul (.clk, .rst_n, .in_valid(m_v), .a(m_a), .b(m_b), .out_valid(m_ov), .p(m_p));
    fx_add u_add (.clk, .rst_n, .in_valid(a_v), .a(a_a), .b(a_b), .sub(a_sub),
                  .out_valid(a_ov), .s(a_s));

    // completion of the operation in flight, and issue of the next one
    always_comb begin
      unique case (state)
        S_IDLE:             fin = start;
        S_ML, S_MC:         fin = m_ov;
        default:            fin = a_ov;
      endcase
      m_v = 1'b0;  m_a = '0;  m_b = '0;
      a_v = 1'b0;  a_a = '0;  a_b = '0;  a_sub = 1'b0;
      if (fin) begin
        unique case (state)
          S_IDLE: begin a_v = 1'b1; a_a = v;      a_b = mp.v_rest; a_sub = 1'b1; end
          S_SUB:  begin m_v = 1'b1; m_a = kl_r;   m_b = a_s;    end
          S_ML:   begin m_v = 1'b1; m_a = kc_r;   m_b = isum_r; end
          S_MC:   begin a_v = 1'b1; a_a = leak_r; a_b = m_p;    end
          default: ;
        endcase
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        state  <= S_IDLE;
        v      <= '0;
        kl_r   <= '0;
        kc_r   <= '0;
        isum_r <= '0;
        leak_r <= '0;
        done   <= 1'b0;
      end else begin
        done <= 1'b0;
        if (state == S_IDLE && !start && init) v <= mp.v_init;
        if (fin) begin
          unique case (state)
            S_IDLE: begin
              kl_r   <= mp.k_leak;
              kc_r   <= mp.k_cap;
              isum_r <= fx_sat(isum_w);
              state  <= S_SUB;
            end
            S_SUB: state <= S_ML;
            S_ML:  begin leak_r <= m_p; state <= S_MC; end
            S_MC:  state <= S_ADD;
            S_ADD: begin v <= fx_sat(64'(v) - 64'(a_s)); done <= 1'b1; state <= S_IDLE; end
            default: state <= S_IDLE;
          endcase
        end
      end
    end

    assign busy = (state != S_IDLE);
  end
endmodule

// ionsim_top: real-time simulator of a membrane patch with N_AMPA AMPA and
// N_NMDA NMDA synaptic ion channels.
//
// A rising edge of enable (a presynaptic event) sets t = 0 and loads the
// membrane voltage V with its initial value. The simulator then repeats one
// step per time stamp for as long as enable stays high:
//   1. every channel block starts at once with the same t and V and computes
//      its current I = g(t, V) (V - E) in parallel with the others;
//   2. when all have finished, the membrane integrator sums the currents and
//      updates V with the leak and the accumulated charge;
//   3. the step is published (sample_valid, with t, V and every current) and
//      the time counter advances.
// MIN_RES selects the channel mapping: 0 (default) the maximum-speed blocks,
// in which independent operations run on their own components, 1 the
// minimum-resource blocks, which share one component of each kind, for the
// channels and the membrane update alike. All model parameters are inputs
// and may be changed between steps.
//
// Timing per step: one cycle to start the channels, the slowest channel's
// latency (NMDA: 5 ITER / 2 + 8 cycles with the maximum-speed mapping,
// 9 ITER / 2 + 20 with the minimum-resource one; the integrator starts in
// the cycle the last channel finishes) and memb_latency (3 or 5 cycles):
// 52 cycles at the defaults, 98 with MIN_RES = 1.
//
// The data flow (parallel channels, summation, leak, accumulator and
// register R, edge-started counter) follows the design; the step handshake
// between the blocks is this design's choice.
module ionsim_top
  import ionsim_pkg::*;
#(
  parameter int N_AMPA  = 1,
  parameter int N_NMDA  = 1,
  parameter int ITER    = 16,
  parameter bit MIN_RES = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  ampa_param_t ampa_p [N_AMPA],
  input  nmda_param_t nmda_p [N_NMDA],
  input  memb_param_t memb_p,
  output logic        running,
  output logic        sample_valid,
  output tstamp_t     sample_t,
  output fx_t         v_m,
  output fx_t         i_ampa [N_AMPA],
  output fx_t         i_nmda [N_NMDA]
);
  localparam int NCH = N_AMPA + N_NMDA;

  typedef enum logic [1:0] {S_IDLE, S_CH_START, S_CH_WAIT, S_MEM} state_t;
  state_t state;

  tstamp_t t;
  logic    start_req, run, ack, tick;
  logic    ch_start, m_init, m_start, m_busy, m_done;
  logic    ch_done [NCH];
  logic    ch_busy [NCH];
  logic    got     [NCH];
  fx_t     i_ch    [NCH];
  logic    all_got;

  time_counter u_time (.clk, .rst_n, .enable, .ack, .tick, .t, .start_req, .run);

  for (genvar k = 0; k < N_AMPA; k++) begin : g_ampa
    if (MIN_RES) begin : g_min
      ampa_minres #(.ITER(ITER)) u_ch (.clk, .rst_n, .start(ch_start), .t, .v(v_m),
        .p(ampa_p[k]), .busy(ch_busy[k]), .done(ch_done[k]), .i_out(i_ch[k]));
    end else begin : g_max
      ampa_maxspeed #(.ITER(ITER)) u_ch (.clk, .rst_n, .start(ch_start), .t, .v(v_m),
        .p(ampa_p[k]), .busy(ch_busy[k]), .done(ch_done[k]), .i_out(i_ch[k]));
    end
    assign i_ampa[k] = i_ch[k];
  end

  for (genvar k = 0; k < N_NMDA; k++) begin : g_nmda
    if (MIN_RES) begin : g_min
      nmda_minres #(.ITER(ITER)) u_ch (.clk, .rst_n, .start(ch_start), .t, .v(v_m),
        .p(nmda_p[k]), .busy(ch_busy[N_AMPA+k]), .done(ch_done[N_AMPA+k]),
        .i_out(i_ch[N_AMPA+k]));
    end else begin : g_max
      nmda_maxspeed #(.ITER(ITER)) u_ch (.clk, .rst_n, .start(ch_start), .t, .v(v_m),
        .p(nmda_p[k]), .busy(ch_busy[N_AMPA+k]), .done(ch_done[N_AMPA+k]),
        .i_out(i_ch[N_AMPA+k]));
    end
    assign i_nmda[k] = i_ch[N_AMPA+k];
  end

  membrane_integrator #(.N(NCH), .MIN_RES(MIN_RES)) u_memb (.clk, .rst_n, .init(m_init), .start(m_start),
    .mp(memb_p), .i_ch, .v(v_m), .busy(m_busy), .done(m_done));

  always_comb begin
    all_got = 1'b1;
    for (int k = 0; k < NCH; k++) all_got &= got[k] | ch_done[k];
  end

  assign ack          = (state == S_IDLE) && start_req;
  assign m_init       = ack;
  assign ch_start     = (state == S_CH_START);
  assign m_start      = (state == S_CH_WAIT) && all_got;
  assign tick         = (state == S_MEM) && m_done;
  assign sample_valid = tick;
  assign sample_t     = t;
  assign running      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      for (int k = 0; k < NCH; k++) got[k] <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE:     if (ack) state <= S_CH_START;
        S_CH_START: begin
          for (int k = 0; k < NCH; k++) got[k] <= 1'b0;
          state <= S_CH_WAIT;
        end
        S_CH_WAIT: begin
          for (int k = 0; k < NCH; k++) if (ch_done[k]) got[k] <= 1'b1;
          if (all_got) state <= S_MEM;
        end
        S_MEM: if (m_done) state <= (run && !start_req) ? S_CH_START : S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Handshake rules: a step starts only when every channel block and the
  // integrator are idle, since they ignore start while busy.
  for (genvar k = 0; k < NCH; k++) begin : g_chk
    a_ch_free: assert property (@(posedge clk) disable iff (!rst_n) ch_start |-> !ch_busy[k]);
  end
  a_memb_free: assert property (@(posedge clk) disable iff (!rst_n) m_start |-> !m_busy);
endmodule

// time_counter: the simulation time base.
//
// A rising edge of the external ENABLE input defines t = 0: it clears the
// time stamp and raises start_req, which stays up until the step sequencer
// accepts it with ack. Each tick (one completed simulation step) advances t
// by one; t stops at its largest value instead of wrapping. run follows
// ENABLE and tells the sequencer whether to go on with the next step.
//
// Using an edge-triggered counter as the time base follows the design; that
// it advances once per completed step (rather than once per clock), holds at
// its maximum and hands the start over with a request/acknowledge pair are
// this design's choices.
//
// Timing: t changes on the clock edge after tick; start_req rises on the
// clock edge after ENABLE is first seen high, and falls the edge after ack.
module time_counter
  import ionsim_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    enable,
  input  logic    ack,
  input  logic    tick,
  output tstamp_t t,
  output logic    start_req,
  output logic    run
);
  logic enable_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable_q  <= 1'b0;
      t         <= '0;
      start_req <= 1'b0;
    end else begin
      enable_q <= enable;
      if (enable && !enable_q) begin
        t         <= '0;
        start_req <= 1'b1;
      end else begin
        if (ack) start_req <= 1'b0;
        if (tick && t != '1) t <= t + 1'b1;
      end
    end
  end

  assign run = enable;
endmodule

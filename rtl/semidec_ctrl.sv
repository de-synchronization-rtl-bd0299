// Semi-decoupled four-phase latch controller for de-synchronization.
//
// One controller drives the enable of one latch group and talks four-phase
// handshakes with its neighbours: ri/ai with the controllers of the latches
// that feed it, ro/ao with those it feeds. Two state-holding nodes make it up:
//   * state (1 = latch closed): rises (latch closes) when the delayed request
//     is high and ro is low; falls (latch opens) when the delayed request is
//     low and both ro and ao are high, i.e. the value now held has been
//     offered to every successor and every successor has closed on it (ao
//     alone is not enough: a joined acknowledge can still be high from the
//     previous value);
//   * ro (request to successors): rises when the latch is closed and ao is
//     low (every successor has opened), falls when the latch has opened.
// The acknowledge to predecessors is ai = state and the latch enable is
// en = ~state, so the latch is transparent while en is high.
// The incoming request passes through an asymmetric matched delay
// (matched_delay). Its falling edge follows a predecessor opening, so it
// carries the logic delay: the latch opens only once the new data has crossed
// the logic. Its rising edge follows a predecessor closing and sets the
// minimum width of the enable pulse.
// Even controllers reset to en=1 (transparent), ro=0; odd controllers reset
// to en=0 (opaque, the datapath latch holds its reset value), ai=1, ro=0.
// The published circuit closes the latch on the request alone, relying on the
// timing assumption that ro falls before the next request rises. Here ro
// falls as soon as the latch opens, so ro is low whenever a request can close
// the latch; the condition is written out in full anyway and costs nothing.
// Assertions check the four-phase rules on both channels: ri rises only while
// ai is low and falls only while ai is high; ao rises only while ro is high
// and falls only while ro is low. The state nodes are C-elements written as
// latches (intended), and the loop between them is the controller's feedback
// (intended).
// Interface: rst (active high), tap (delay tap), ri, ai, ro, ao, en.
module semidec_ctrl #(
  parameter bit  ODD       = 1'b0,
  parameter real T_RISE_NS = 1.0,
  parameter real T_FALL_NS = 2.0
) (
  input  logic       rst,
  input  logic [1:0] tap,
  input  logic       ri,
  output logic       ai,
  output logic       ro,
  input  logic       ao,
  output logic       en
);
  timeunit 1ns; timeprecision 1ps;

  logic ri_d;    // request after the matched delay
  logic state;   // 1: latch closed, holding data

  matched_delay #(.T_RISE_NS(T_RISE_NS), .T_FALL_NS(T_FALL_NS)) u_delay (
    .in(ri), .tap(tap), .out(ri_d)
  );

  always_latch begin
    if (rst)               state = ODD;
    else if (ri_d && !ro)  state = 1'b1;
    else if (!ri_d && ro && ao) state = 1'b0;
  end

  always_latch begin
    if (rst)               ro = 1'b0;
    else if (state && !ao) ro = 1'b1;
    else if (!state && ao) ro = 1'b0;
  end

  assign ai = state;
  assign en = ~state;

  // Four-phase handshake rules of the neighbours. With zero-delay gates a
  // cause and its effect share a time step, so each rule looks at the side
  // where the other signal cannot have reacted yet: a change of ri reaches
  // ai only through the matched delay, so ri is checked against the current
  // ai; ro reacts at once to ao, so ao is checked against ro as sampled just
  // before the edge.
  always @(posedge ri) if (!rst)
    a_ri_rise: assert (!ai) else $error("semidec_ctrl: request rose before the previous acknowledge fell");
  always @(negedge ri) if (!rst)
    a_ri_fall: assert (ai) else $error("semidec_ctrl: request fell before it was acknowledged");
  a_ao_rise: assert property (@(posedge ao) disable iff (rst) ro)
    else $error("semidec_ctrl: acknowledge rose without a request");
  a_ao_fall: assert property (@(negedge ao) disable iff (rst) !ro)
    else $error("semidec_ctrl: acknowledge fell while the request was high");
endmodule

// Latch controller with the most concurrent de-synchronization protocol.
//
// It follows only the three ordering rules of de-synchronization, for every
// latch A and each latch B that A feeds:
//   A+ and A- alternate;
//   B- comes after the A+ that brings B its next value;
//   the next A+ comes after B- has taken the current value.
// Nothing else is ordered. A latch opens as soon as all of its successors
// have taken its previous value, even before its own new input has arrived,
// so data can ripple through several open latches in a row. The semi-
// decoupled controller (semidec_ctrl) adds more orderings than these.
//
// Signalling is two-phase (transition) rather than four-phase. Each toggle
// of ro is one event and each toggle of ai is one event:
//   ro toggles once the latch is open and its inputs carry this round's data
//      (the joined, delayed request ri_d has arrived), so the latch output is
//      now the value it is about to store;
//   ai toggles when the latch closes (A-), telling predecessors that the
//      value they offered has been taken.
// An odd latch expects its inputs to be one event ahead of its own captures,
// and an even latch does not, hence the ODD terms below:
//   open  (en 0->1) when closed, ai == ro, and (ao ^ ro) == ODD
//   valid (ro flip) when open, ro == ai, and (ri_d ^ ai) == ODD
//   close (en 1->0) when open, ro != ai, and the minimum pulse has elapsed
//   then  ai := ro
// Several predecessors or successors are joined with C-elements, as for the
// four-phase controllers. With transition signalling a C-element output
// flips exactly when all of its inputs have flipped. All joins reset to 0.
// The protocol is from the de-synchronization model. The transition
// encoding and the data-valid event that paces ro are this design's own.
//
// Timing: ri passes through a symmetric matched delay (T_LOGIC_NS on both
// edges), because each edge announces new data. en passes through a second
// delay (T_PULSE_NS on the rising edge) that sets the minimum pulse width.
// Both use the shared tap select.
// Reset (rst high): even latches open (ODD = 0), odd latches closed; ro, ai 0.
// The three state elements are asynchronous set/reset latches built from
// logic with feedback. Simulators report them as latches and combinational
// loops. They are intended.
module desync_model_ctrl #(
  parameter bit  ODD        = 1'b0,
  parameter real T_LOGIC_NS = 2.0,
  parameter real T_PULSE_NS = 1.0
) (
  input  logic       rst,
  input  logic [1:0] tap,
  input  logic       ri,   // joined request from the predecessors (transition)
  output logic       ai,   // acknowledge to the predecessors (toggles on close)
  output logic       ro,   // request to the successors (toggles on valid data)
  input  logic       ao,   // joined acknowledge from the successors
  output logic       en    // latch enable, high = transparent
);
  timeunit 1ns; timeprecision 1ps;

  logic ri_d, en_d;

  matched_delay #(.T_RISE_NS(T_LOGIC_NS), .T_FALL_NS(T_LOGIC_NS)) u_logic_delay (
    .in(ri), .tap(tap), .out(ri_d));
  matched_delay #(.T_RISE_NS(T_PULSE_NS), .T_FALL_NS(0.0)) u_pulse_delay (
    .in(en), .tap(tap), .out(en_d));

  always_latch begin
    if (rst) en = ~ODD;
    else if (!en && (ai == ro) && ((ao ^ ro) == ODD)) en = 1'b1;
    else if (en && en_d && (ro != ai)) en = 1'b0;
  end

  always_latch begin
    if (rst) ro = 1'b0;
    else if (en && (ro == ai) && ((ri_d ^ ai) == ODD)) ro = ~ai;
  end

  always_latch begin
    if (rst) ai = 1'b0;
    else if (!en && (ai != ro)) ai = ro;
  end

  // Handshake rules: an edge on ri or ao is always the one this controller
  // is waiting for, never a second event before it has answered the first.
  // ri is checked just after its edge (ai only changes before it, never in
  // reaction to it); ao is checked on the values sampled just before its
  // edge, because this controller may reopen and flip ro in zero time.
  always @(ri) if (!rst) a_ri_expected: assert ((ri ^ ai) == ODD)
    else $error("request event arrived before the previous one was taken");
  a_ao_expected: assert property (@(ao) disable iff (rst) (ao ^ ro) != ODD)
    else $error("acknowledge event without an offered value");
endmodule

// Matched delay line with four taps (behavioural model).
//
// This is a BEHAVIOURAL MODEL: a real matched delay is a chain of standard
// cells sized after layout, whose delay tracks the combinational logic it
// stands for. Here the chain is replaced by a timed process (# delays), so the
// module only simulates (synthesis drops the delays).
//
// The delay is asymmetric: a rising input edge is passed on after
// T_RISE_NS * scale, a falling edge after T_FALL_NS * scale. One edge carries
// the logic (setup) delay, the other the minimum latch pulse width, so one
// element serves both constraints of a latch controller. Four taps select the
// scale: tap 0 is the full delay, taps 1, 2, 3 are 1/2, 1/4 and 1/8 of it,
// which lets the delay be shortened after fabrication to find the speed limit.
// Interface: in, tap (static select), out. Timing: out follows in after the
// selected delay; the input is a handshake wire and never glitches.
// The rising/falling split and scaling both edges by the tap are this
// design's choice.
module matched_delay #(
  parameter real T_RISE_NS = 1.0,
  parameter real T_FALL_NS = 2.0
) (
  input  logic       in,
  input  logic [1:0] tap,
  output logic       out
);
  timeunit 1ns; timeprecision 1ps;

  real scale;
  always_comb begin
    case (tap)
      2'd0:    scale = 1.0;
      2'd1:    scale = 0.5;
      2'd2:    scale = 0.25;
      default: scale = 0.125;
    endcase
  end

  // One edge at a time: a handshake wire does not change again before the
  // delayed edge has been used, so the line never holds two edges.
  logic target;
  initial begin
    out = 1'b0;
    forever begin
      wait (in !== out);
      target = in;
      if (target) #(T_RISE_NS * scale);
      else        #(T_FALL_NS * scale);
      out = target;
    end
  end
endmodule

// Muller C-element (N-input join) for the handshake network.
//
// The output rises when every input is high, falls when every input is low,
// and otherwise holds its value. The de-synchronized control network uses it
// wherever a latch controller has more than one predecessor (to join their
// requests) or more than one successor (to join their acknowledges).
// It is written as a level-sensitive latch whose gate opens only when the
// inputs agree, which is the usual state-holding form of a C-element; the
// "latch" circuit warning on this module is therefore intended.
// An asynchronous reset forces the output to INIT so that the join starts in
// the same state as the signals it combines.
// Interface: in[N-1:0], rst (active high), y. No clock: it reacts to levels.
module c_element #(
  parameter int unsigned N    = 2,
  parameter bit          INIT = 1'b0
) (
  input  logic [N-1:0] in,
  input  logic         rst,
  output logic         y
);
  timeunit 1ns; timeprecision 1ps;

  always_latch begin
    if (rst)          y = INIT;
    else if (&in)     y = 1'b1;
    else if (!(|in))  y = 1'b0;
  end
endmodule

// Level-sensitive data latch for one group of register bits.
//
// A de-synchronized circuit replaces every flip-flop by a pair of latches
// (master and slave), each driven by its own local control signal. This
// module is one such latch group: transparent while en is high, holding while
// en is low. Latches that start holding valid data (the odd ones, which are
// opaque after reset) load RESET_VAL while rst is high; the others pass on
// their input. The latch warning on this module is intended.
// Interface: d[W-1:0], en, rst (active high, asynchronous), q[W-1:0].
module dlatch #(
  parameter int unsigned    W         = 8,
  parameter bit             HAS_RESET = 1'b1,
  parameter logic [W-1:0]   RESET_VAL = '0
) (
  input  logic [W-1:0] d,
  input  logic         en,
  input  logic         rst,
  output logic [W-1:0] q
);
  timeunit 1ns; timeprecision 1ps;

  always_latch begin
    if (HAS_RESET && rst) q = RESET_VAL;
    else if (en)          q = d;
  end
endmodule

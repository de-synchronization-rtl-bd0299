// Latch-group numbering of the four-stage de-synchronized processor control.
//
// Each of the four physical pipeline stages (IF, ID with write-back merged
// in, EX, MEM) has a master latch group L1 and a slave latch group L2, each
// with its own controller. L1 groups are even (transparent after reset),
// L2 groups are odd (opaque after reset, holding the reset state).
package aspida_pkg;
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned NGRP = 8;
  typedef enum int unsigned {
    IF_L1 = 0, IF_L2, ID_L1, ID_L2, EX_L1, EX_L2, MEM_L1, MEM_L2
  } grp_e;
endpackage

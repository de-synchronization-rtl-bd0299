// Shared constants of the seven-latch de-synchronized example netlist.
//
// The netlist has latches A to G. Even latches (A, C, E) are transparent
// after reset; odd latches (B, D, F, G) are opaque after reset and hold the
// reset values below. The datapath functions are this design's own choice
// (any logic could sit between the latches); they are kept here so that the
// network and its testbench compute them from the same definition.
package fig13_pkg;
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned NLATCH = 7;
  typedef enum int unsigned { LA = 0, LB, LC, LD, LE, LF, LG } latch_e;

  // Phase of each latch: 1 = odd (opaque after reset), bit index = latch_e.
  localparam logic [NLATCH-1:0] ODD_MASK = 7'b1101010;  // G F E D C B A

  // Next value of latch X from the outputs of its predecessors.
  // Predecessors: A<-{F,G} B<-{A} C<-{D,G} D<-{C} E<-{B,D} F<-{E} G<-{E}
  function automatic logic [7:0] f_next(input latch_e x,
                                        input logic [NLATCH-1:0][7:0] q);
    unique case (x)
      LA:      f_next = q[LF] + q[LG];
      LB:      f_next = q[LA];                 // no logic between A and B
      LC:      f_next = q[LD] + (q[LG] ^ 8'h11);
      LD:      f_next = q[LC] + 8'h07;
      LE:      f_next = q[LB] ^ q[LD];
      LF:      f_next = q[LE] + 8'h01;
      default: f_next = {q[LE][0], q[LE][7:1]} ^ 8'h81;
    endcase
  endfunction

  // Reset values of the odd latches (B, D, F, G); even entries unused.
  function automatic logic [7:0] reset_val(input latch_e x);
    unique case (x)
      LB:      reset_val = 8'h01;
      LD:      reset_val = 8'h02;
      LF:      reset_val = 8'h03;
      LG:      reset_val = 8'h04;
      default: reset_val = 8'h00;
    endcase
  endfunction
endpackage

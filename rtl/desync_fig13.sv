// De-synchronized version of a seven-latch example netlist.
//
// The synchronous original has seven latch groups A..G clocked by two phases
// of one clock: A, C, E on the even phase and B, D, F, G on the odd phase,
// with data moving only from even to odd latches and back:
//   A<-{F,G}  B<-{A}  C<-{D,G}  D<-{C}  E<-{B,D}  F<-{E}  G<-{E}
// Here the global clock is gone. Every latch group has its own semi-decoupled
// controller (semidec_ctrl). A controller with several predecessors joins
// their requests with a C-element, and one with several successors joins
// their acknowledges with a C-element; single connections are plain wires.
// With CONCURRENT set, the controllers are desync_model_ctrl instead, with
// the same joins; they let neighbouring latches overlap more.
// Each controller's matched delay stands for the logic in front of its latch;
// the delays differ from latch to latch, as the logic blocks do.
// The result is flow-equivalent to the synchronous circuit: every latch
// stores the same sequence of values, only the relative timing of different
// latches changes.
// The netlist is closed (no primary inputs), like the published example. The
// logic between the latches (fig13_pkg::f_next) is this design's own.
// The handshake wires form closed loops through the controllers and joins,
// and the latches feed back through the logic (the netlist is a ring), so
// simulators report combinational loops here: that is the circuit, not an
// error. Every loop passes through a state-holding controller.
// Interface: rst (active high), tap (delay taps), q (all latch outputs),
// en (all latch enables, high = transparent). Latch index = fig13_pkg::latch_e.
module desync_fig13
  import fig13_pkg::*;
#(
  // Matched delay of the logic in front of each latch (index latch_e) and the
  // common minimum pulse width.
  parameter real T_LOGIC_NS [NLATCH] = '{3.0, 0.2, 2.0, 1.0, 2.5, 1.5, 0.7},
  parameter real T_PULSE_NS = 1.0,
  // 0: four-phase semi-decoupled controllers; 1: two-phase controllers with
  // the most concurrent protocol (desync_model_ctrl).
  parameter bit  CONCURRENT = 1'b0
) (
  input  logic                    rst,
  input  logic [1:0]              tap,
  output logic [NLATCH-1:0][7:0]  q,
  output logic [NLATCH-1:0]       en
);
  timeunit 1ns; timeprecision 1ps;

  logic [NLATCH-1:0] ri, ai, ro, ao;

  // Request joins (predecessors' ro) and acknowledge joins (successors' ai).
  // Join C-elements start at the reset value of the signals they combine:
  // all ro are 0; with four-phase controllers ai of an odd latch is 1 and of
  // an even latch 0, with two-phase controllers every ai starts at 0.
  c_element #(.N(2), .INIT(1'b0)) u_ri_a (.in({ro[LF], ro[LG]}), .rst(rst), .y(ri[LA]));
  assign ri[LB] = ro[LA];
  c_element #(.N(2), .INIT(1'b0)) u_ri_c (.in({ro[LD], ro[LG]}), .rst(rst), .y(ri[LC]));
  assign ri[LD] = ro[LC];
  c_element #(.N(2), .INIT(1'b0)) u_ri_e (.in({ro[LB], ro[LD]}), .rst(rst), .y(ri[LE]));
  assign ri[LF] = ro[LE];
  assign ri[LG] = ro[LE];

  assign ao[LA] = ai[LB];
  assign ao[LB] = ai[LE];
  assign ao[LC] = ai[LD];
  c_element #(.N(2), .INIT(1'b0)) u_ao_d (.in({ai[LC], ai[LE]}), .rst(rst), .y(ao[LD]));
  c_element #(.N(2), .INIT(!CONCURRENT)) u_ao_e (.in({ai[LF], ai[LG]}), .rst(rst), .y(ao[LE]));
  assign ao[LF] = ai[LA];
  c_element #(.N(2), .INIT(1'b0)) u_ao_g (.in({ai[LA], ai[LC]}), .rst(rst), .y(ao[LG]));

  for (genvar i = 0; i < NLATCH; i++) begin : g_latch
    logic [7:0] d;
    assign d = f_next(latch_e'(i), q);

    if (CONCURRENT) begin : g_mc
      desync_model_ctrl #(.ODD(ODD_MASK[i]), .T_LOGIC_NS(T_LOGIC_NS[i]),
                          .T_PULSE_NS(T_PULSE_NS)) u_ctrl (
        .rst(rst), .tap(tap), .ri(ri[i]), .ai(ai[i]), .ro(ro[i]), .ao(ao[i]), .en(en[i])
      );
    end else begin : g_sd
      semidec_ctrl #(.ODD(ODD_MASK[i]), .T_RISE_NS(T_PULSE_NS), .T_FALL_NS(T_LOGIC_NS[i])) u_ctrl (
        .rst(rst), .tap(tap), .ri(ri[i]), .ai(ai[i]), .ro(ro[i]), .ao(ao[i]), .en(en[i])
      );
    end

    dlatch #(.W(8), .HAS_RESET(ODD_MASK[i]), .RESET_VAL(reset_val(latch_e'(i)))) u_lat (
      .d(d), .en(en[i]), .rst(rst), .q(q[i])
    );
  end
endmodule

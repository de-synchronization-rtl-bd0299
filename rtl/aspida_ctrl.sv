// Clock generation for a four-stage de-synchronized pipelined processor,
// with a synchronous fallback mode.
//
// The processor datapath is an ordinary latch-based pipeline with stages IF,
// ID (holding the register file and hazard logic; write-back is merged into
// it), EX and MEM. Each stage has a master latch group L1 and a slave group
// L2, giving eight latch enables. This module produces them.
// De-synchronized mode (sync_mode = 0): eight semi-decoupled controllers
// (semidec_ctrl), connected along the datapath dependencies:
//   IF.L1 <- ID.L2        (next fetch address comes from decode)
//   IF.L2 <- IF.L1,  ID.L1 <- {IF.L2, MEM.L2},  ID.L2 <- ID.L1,
//   EX.L1 <- ID.L2,  EX.L2 <- EX.L1,  MEM.L1 <- EX.L2,  MEM.L2 <- MEM.L1
// so ID, EX and MEM form a ring and ID joins the instruction coming from IF
// with the one leaving MEM for write-back (C-elements join the requests into
// ID.L1 and the acknowledges into ID.L2). The controller in front of each L1
// group carries the matched delay of that stage's logic (T_IF_NS ...); the
// L2 controllers only need the short pulse delay T_PULSE_NS.
// Synchronous mode (sync_mode = 1): every L1 enable follows global_l1 and
// every L2 enable follows global_l2, two non-overlapping clocks from outside.
// The selection is a multiplexer in front of each latch group's enable.
// The stage delays and the exact arcs into IF.L1 are this design's reading
// of the published block diagram; the processor datapath itself is not here.
// The controllers and joins form handshake loops (IF<->ID and the ID-EX-MEM
// ring), which simulators report as combinational loops; they are intended,
// and every loop passes through a state-holding controller.
// Interface: rst (active high), tap (delay taps), sync_mode, global_l1,
// global_l2, g[7:0] (latch enables, index aspida_pkg::grp_e, high =
// transparent), ctrl_en[7:0] (controller outputs before the multiplexers).
module aspida_ctrl
  import aspida_pkg::*;
#(
  parameter real T_IF_NS    = 4.0,
  parameter real T_ID_NS    = 4.0,
  parameter real T_EX_NS    = 4.0,
  parameter real T_MEM_NS   = 4.0,
  parameter real T_PULSE_NS = 1.0
) (
  input  logic            rst,
  input  logic [1:0]      tap,
  input  logic            sync_mode,
  input  logic            global_l1,
  input  logic            global_l2,
  output logic [NGRP-1:0] g,
  output logic [NGRP-1:0] ctrl_en
);
  timeunit 1ns; timeprecision 1ps;

  logic [NGRP-1:0] ri, ai, ro, ao;

  // Requests.
  assign ri[IF_L1] = ro[ID_L2];
  assign ri[IF_L2] = ro[IF_L1];
  c_element #(.N(2), .INIT(1'b0)) u_ri_id (.in({ro[IF_L2], ro[MEM_L2]}), .rst(rst), .y(ri[ID_L1]));
  assign ri[ID_L2]  = ro[ID_L1];
  assign ri[EX_L1]  = ro[ID_L2];
  assign ri[EX_L2]  = ro[EX_L1];
  assign ri[MEM_L1] = ro[EX_L2];
  assign ri[MEM_L2] = ro[MEM_L1];

  // Acknowledges (odd groups start with ai = 1, even ones with ai = 0).
  assign ao[IF_L1] = ai[IF_L2];
  assign ao[IF_L2] = ai[ID_L1];
  assign ao[ID_L1] = ai[ID_L2];
  c_element #(.N(2), .INIT(1'b0)) u_ao_id (.in({ai[IF_L1], ai[EX_L1]}), .rst(rst), .y(ao[ID_L2]));
  assign ao[EX_L1]  = ai[EX_L2];
  assign ao[EX_L2]  = ai[MEM_L1];
  assign ao[MEM_L1] = ai[MEM_L2];
  assign ao[MEM_L2] = ai[ID_L1];

  localparam real T_STAGE [4] = '{T_IF_NS, T_ID_NS, T_EX_NS, T_MEM_NS};

  for (genvar s = 0; s < 4; s++) begin : g_stage
    // L1 (even): falling request edge carries the stage logic delay.
    semidec_ctrl #(.ODD(1'b0), .T_RISE_NS(T_PULSE_NS), .T_FALL_NS(T_STAGE[s])) u_l1 (
      .rst(rst), .tap(tap), .ri(ri[2*s]), .ai(ai[2*s]), .ro(ro[2*s]), .ao(ao[2*s]),
      .en(ctrl_en[2*s])
    );
    // L2 (odd): no logic between master and slave, only the pulse delay.
    semidec_ctrl #(.ODD(1'b1), .T_RISE_NS(T_PULSE_NS), .T_FALL_NS(T_PULSE_NS)) u_l2 (
      .rst(rst), .tap(tap), .ri(ri[2*s+1]), .ai(ai[2*s+1]), .ro(ro[2*s+1]),
      .ao(ao[2*s+1]), .en(ctrl_en[2*s+1])
    );
    assign g[2*s]   = sync_mode ? global_l1 : ctrl_en[2*s];
    assign g[2*s+1] = sync_mode ? global_l2 : ctrl_en[2*s+1];
  end
endmodule

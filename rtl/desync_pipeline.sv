// De-synchronized linear pipeline with handshake ports at both ends.
//
// A flip-flop pipeline of NSTAGE stages, each computing x -> f_s(x), becomes
// 2*NSTAGE latch groups: a master L1 (even, index 2s) that captures
// f_s(previous stage) and a slave L2 (odd, index 2s+1) that copies L1.
// Each latch group has its own controller, and neighbours are wired request
// to request and acknowledge to acknowledge. A plain pipeline needs no
// C-element joins. The controller in front of each L1 carries the
// stage's logic delay T_STAGE_NS; the L2 controllers only need the pulse
// delay, as nothing is computed between master and slave.
// CONCURRENT selects the controller type for all latches:
//   1: desync_model_ctrl, the most concurrent protocol, two-phase handshakes
//      (every toggle of a request or acknowledge is one event);
//   0: semidec_ctrl, semi-decoupled, four-phase handshakes.
// The environment sees the pipeline as one more odd latch at the input and
// one more even latch at the output:
//   input:  the first value must already be on in_data when reset is
//           released (it is captured without a request event, as the
//           value of an odd latch is after reset); every later value is
//           offered by a request event and must stay stable until in_ack
//           answers. Four-phase: raise in_req with data, wait
//           for in_ack high, then change the data, lower in_req and wait for
//           in_ack low (the falling edge starts the logic delay);
//           two-phase: change data and toggle in_req when in_ack != in_req.
//   output: out_data is valid from an out_req event until out_ack answers.
//           The first exchange hands over the reset value of the last L2,
//           since an even sink reads it first.
// A synchronous environment can drive in_req from its clock and answer
// out_req with a fixed short delay, provided its period is no shorter than
// the pipeline's own; the handshake assertions in the controllers report
// any overrun.
// The stage function f_s (a rotate and a per-stage constant) is only a
// stand-in for real stage logic; the structure and control are what this
// module shows. Odd latches reset to zero.
// Simulators report loops (the handshake chain) and latches: intended.
// Interface: rst (active high), tap, in_data/in_req/in_ack,
// out_data/out_req/out_ack, en (all latch enables, index 2s = L1 of stage s).
module desync_pipeline #(
  parameter int unsigned NSTAGE     = 16,
  parameter int unsigned W          = 64,
  parameter bit          CONCURRENT = 1'b1,
  parameter real         T_STAGE_NS = 1.2,
  parameter real         T_PULSE_NS = 0.3
) (
  input  logic                  rst,
  input  logic [1:0]            tap,
  input  logic [W-1:0]          in_data,
  input  logic                  in_req,
  output logic                  in_ack,
  output logic [W-1:0]          out_data,
  output logic                  out_req,
  input  logic                  out_ack,
  output logic [2*NSTAGE-1:0]   en
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned NL = 2 * NSTAGE;

  // Stage stand-in logic: rotate left by one and add a stage constant.
  function automatic logic [W-1:0] f_stage(input int unsigned s, input logic [W-1:0] x);
    logic [63:0] k;
    k = 64'h9E37_79B9_7F4A_7C15 * 64'(s + 1);
    return {x[W-2:0], x[W-1]} ^ k[W-1:0];
  endfunction

  logic [NL-1:0] ri, ai, ro, ao;
  logic [W-1:0]  q [NL];

  assign ri[0]    = in_req;
  assign in_ack   = ai[0];
  assign ao[NL-1] = out_ack;
  assign out_req  = ro[NL-1];
  assign out_data = q[NL-1];

  for (genvar j = 0; j < NL; j++) begin : g_lat
    localparam bit  ODD = (j % 2 == 1);
    localparam real TL  = ODD ? T_PULSE_NS : T_STAGE_NS;
    logic [W-1:0] d;

    if (j > 0) begin : g_ri
      assign ri[j] = ro[j-1];
    end
    if (j < NL - 1) begin : g_ao
      assign ao[j] = ai[j+1];
    end

    if (ODD) begin : g_copy
      assign d = q[j-1];
    end else if (j == 0) begin : g_first
      assign d = f_stage(0, in_data);
    end else begin : g_logic
      assign d = f_stage(j / 2, q[j-1]);
    end

    if (CONCURRENT) begin : g_mc
      desync_model_ctrl #(.ODD(ODD), .T_LOGIC_NS(TL), .T_PULSE_NS(T_PULSE_NS)) u_ctrl (
        .rst(rst), .tap(tap), .ri(ri[j]), .ai(ai[j]), .ro(ro[j]), .ao(ao[j]), .en(en[j]));
    end else begin : g_sd
      semidec_ctrl #(.ODD(ODD), .T_RISE_NS(T_PULSE_NS), .T_FALL_NS(TL)) u_ctrl (
        .rst(rst), .tap(tap), .ri(ri[j]), .ai(ai[j]), .ro(ro[j]), .ao(ao[j]), .en(en[j]));
    end

    dlatch #(.W(W), .HAS_RESET(ODD), .RESET_VAL('0)) u_lat (
      .d(d), .en(en[j]), .rst(rst), .q(q[j]));
  end
endmodule

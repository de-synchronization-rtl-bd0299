// Top level: the two de-synchronized circuits side by side.
//
// desync_fig13 is a complete closed de-synchronized netlist (seven latch
// groups with their datapath, controllers, C-element joins and matched
// delays). It appears twice: once with four-phase semi-decoupled
// controllers and once with the two-phase, most concurrent controllers.
// Both must store the same value sequences.
// desync_pipeline is a 16-stage, 64-bit de-synchronized pipeline with the
// most concurrent controllers (the size of the pipelined encryption core
// the scheme was evaluated on), with handshake ports to its environment. aspida_ctrl is the latch-enable generator of a four-stage
// pipelined processor with its synchronous fallback mode; the processor
// datapath it would clock is outside this design, so its eight latch
// enables are brought out as ports. The two share only reset and the
// delay-tap select.
// Interface of the pipeline: pipe_in_data/pipe_in_req/pipe_in_ack and
// pipe_out_data/pipe_out_req/pipe_out_ack, two-phase handshakes (see
// desync_pipeline), pipe_en (its 32 latch enables).
// Loop and latch warnings come from the asynchronous circuits inside and are
// intended (see their modules).
// Interface: rst (active high), tap, ex_q/ex_en (example netlist latch values
// and enables, semi-decoupled), mc_q/mc_en (the same for the concurrent
// controllers), sync_mode, global_l1, global_l2, cpu_g (processor latch
// enables), cpu_ctrl_en (controller outputs before the clock multiplexers).
module desync_top
  import fig13_pkg::*;
  import aspida_pkg::*;
(
  input  logic                   rst,
  input  logic [1:0]             tap,
  output logic [NLATCH-1:0][7:0] ex_q,
  output logic [NLATCH-1:0]      ex_en,
  output logic [NLATCH-1:0][7:0] mc_q,
  output logic [NLATCH-1:0]      mc_en,
  input  logic [63:0]            pipe_in_data,
  input  logic                   pipe_in_req,
  output logic                   pipe_in_ack,
  output logic [63:0]            pipe_out_data,
  output logic                   pipe_out_req,
  input  logic                   pipe_out_ack,
  output logic [31:0]            pipe_en,
  input  logic                   sync_mode,
  input  logic                   global_l1,
  input  logic                   global_l2,
  output logic [NGRP-1:0]        cpu_g,
  output logic [NGRP-1:0]        cpu_ctrl_en
);
  timeunit 1ns; timeprecision 1ps;

  desync_fig13 u_example (
    .rst(rst), .tap(tap), .q(ex_q), .en(ex_en)
  );

  desync_fig13 #(.CONCURRENT(1'b1)) u_example_mc (
    .rst(rst), .tap(tap), .q(mc_q), .en(mc_en)
  );

  desync_pipeline u_pipe (
    .rst(rst), .tap(tap), .in_data(pipe_in_data), .in_req(pipe_in_req), .in_ack(pipe_in_ack),
    .out_data(pipe_out_data), .out_req(pipe_out_req), .out_ack(pipe_out_ack), .en(pipe_en)
  );

  aspida_ctrl u_cpu_clk (
    .rst(rst), .tap(tap), .sync_mode(sync_mode), .global_l1(global_l1),
    .global_l2(global_l2), .g(cpu_g), .ctrl_en(cpu_ctrl_en)
  );
endmodule

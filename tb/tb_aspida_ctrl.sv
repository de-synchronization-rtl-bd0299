// Testbench for aspida_ctrl.
// De-synchronized mode: counts enable pulses of the eight latch groups and
// checks that (1) every group keeps pulsing (no deadlock), (2) a group never
// opens while one of its successors is still open (no hold race), (3) adjacent
// groups never drift more than one pulse apart, and (4) the pulse period gets
// shorter on a shorter delay tap. Synchronous mode: every L1 enable must equal
// global_l1 and every L2 enable global_l2 while two non-overlapping clocks
// are applied.
module tb_aspida_ctrl;
  import aspida_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic rst, sync_mode, gl1, gl2;
  logic [1:0] tap;
  logic [NGRP-1:0] g, cen;
  int npulse [NGRP];
  int hold_viol = 0, drift_viol = 0;

  aspida_ctrl dut (.rst(rst), .tap(tap), .sync_mode(sync_mode), .global_l1(gl1),
                   .global_l2(gl2), .g(g), .ctrl_en(cen));

  localparam int NEDGE = 9;
  localparam int PRED [NEDGE] = '{ID_L2, IF_L1, IF_L2, MEM_L2, ID_L1, ID_L2, EX_L1, EX_L2, MEM_L1};
  localparam int SUCC [NEDGE] = '{IF_L1, IF_L2, ID_L1, ID_L1, ID_L2, EX_L1, EX_L2, MEM_L1, MEM_L2};

  for (genvar i = 0; i < NGRP; i++) begin : g_mon
    always @(posedge g[i]) if (!rst && !sync_mode) begin
      for (int e = 0; e < NEDGE; e++)
        if (PRED[e] == i && g[SUCC[e]]) hold_viol++;
    end
    always @(negedge g[i]) if (!rst && !sync_mode) begin
      npulse[i]++;
      for (int e = 0; e < NEDGE; e++) begin
        int dd;
        dd = npulse[PRED[e]] - npulse[SUCC[e]];
        if (dd > 1 || dd < -1) drift_viol++;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run_desync(input logic [1:0] t, output realtime period);
    realtime t0;
    tap = t; sync_mode = 1'b0; rst = 1'b1;
    #10;
    for (int i = 0; i < NGRP; i++) npulse[i] = 0;
    rst = 1'b0;
    wait (npulse[ID_L1] == 5);
    t0 = $realtime;
    wait (npulse[ID_L1] == 25);
    period = ($realtime - t0) / 20.0;
    #20;
    for (int i = 0; i < NGRP; i++)
      check(npulse[i] >= 24, $sformatf("group %0d keeps pulsing (%0d)", i, npulse[i]));
  endtask

  initial begin
    realtime p0, p3;
    gl1 = 1'b0; gl2 = 1'b0;
    run_desync(2'd0, p0);
    run_desync(2'd3, p3);
    $display("desync period: tap0 %0.3f ns, tap3 %0.3f ns", p0, p3);
    check(p3 < p0, "shorter tap gives shorter period");
    check(hold_viol == 0, $sformatf("no predecessor opens while successor open (%0d)", hold_viol));
    check(drift_viol == 0, $sformatf("adjacent groups within one pulse (%0d)", drift_viol));
    // Synchronous mode: two non-overlapping phases.
    sync_mode = 1'b1;
    for (int k = 0; k < 20; k++) begin
      gl1 = 1'b1; #2;
      check(g == 8'b01010101, "sync L1 phase");
      gl1 = 1'b0; #1;
      check(g == 8'b00000000, "sync gap");
      gl2 = 1'b1; #2;
      check(g == 8'b10101010, "sync L2 phase");
      gl2 = 1'b0; #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog: control network stalled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

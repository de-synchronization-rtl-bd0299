// Testbench for desync_fig13: checks flow equivalence.
//
// A synchronous reference of the same netlist is computed here, cycle by
// cycle: odd latches start with their reset values O_0, then
// E_i = F_E(O_{i-1}) for even latches and O_i = F_O(E_i) for odd ones. Every
// time a latch of the de-synchronized circuit closes (enable falls), the value
// it holds must be the next value of that latch's reference sequence. The
// test also checks that every latch closes NCAP times, that no two adjacent
// latches drift more than one capture apart, and repeats the run with a
// shorter delay tap. A watchdog ends a run that deadlocks.
// Two copies of the network run side by side on the same stimulus: one with
// four-phase semi-decoupled controllers and one with the two-phase, most
// concurrent controllers. Both must match the same reference.
// A third copy has every logic delay equal to the largest one (balanced).
// It checks the two timing properties of de-synchronized circuits:
//   balanced: after start-up every latch opens with one constant period;
//   the unbalanced copy's k-th opening of each latch is never later than
//   the balanced copy's (shorter delays can only make events earlier).
module tb_desync_fig13;
  import fig13_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int NCAP = 40;

  logic rst;
  logic [1:0] tap;
  localparam int NDUT = 3;
  logic [NLATCH-1:0][7:0] q [NDUT];
  logic [NLATCH-1:0] en [NDUT];
  int checks = 0, failures = 0;

  // Unequal matched delays (G much slower than D) so that a missing join
  // or a wrong ordering shows up as a wrong captured value.
  desync_fig13 #(.T_LOGIC_NS('{3.0, 0.2, 0.5, 0.5, 2.5, 1.5, 9.0})) dut (
    .rst(rst), .tap(tap), .q(q[0]), .en(en[0]));
  desync_fig13 #(.T_LOGIC_NS('{3.0, 0.2, 0.5, 0.5, 2.5, 1.5, 9.0}), .CONCURRENT(1'b1)) dut_mc (
    .rst(rst), .tap(tap), .q(q[1]), .en(en[1]));
  desync_fig13 #(.T_LOGIC_NS('{9.0, 9.0, 9.0, 9.0, 9.0, 9.0, 9.0})) dut_bal (
    .rst(rst), .tap(tap), .q(q[2]), .en(en[2]));

  // Opening times of the unbalanced (0) and balanced (2) semi-decoupled copies.
  realtime t_open [NDUT][NLATCH][NCAP+2];
  int nopen [NDUT][NLATCH];
  for (genvar u = 0; u < NDUT; u++) begin : g_open
    for (genvar i = 0; i < NLATCH; i++) begin : g_l
      always @(posedge en[u][i]) if (!rst) begin
        if (nopen[u][i] < NCAP + 2) t_open[u][i][nopen[u][i]] = $realtime;
        nopen[u][i]++;
      end
    end
  end

  task automatic check_timing();
    realtime per, p0;
    int bad_per = 0, bad_late = 0;
    for (int i = 0; i < NLATCH; i++) begin
      p0 = t_open[2][i][4] - t_open[2][i][3];
      // Even latches start open, so they record one opening fewer.
      for (int k = 4; k < NCAP - 2; k++) begin
        per = t_open[2][i][k+1] - t_open[2][i][k];
        if (per - p0 > 0.002 || p0 - per > 0.002) begin
          bad_per++;
          $display("  latch %0d opening %0d: period %0.3f, first %0.3f", i, k, per, p0);
        end
      end
      for (int k = 0; k < NCAP - 2; k++)
        if (t_open[0][i][k] > t_open[2][i][k] + 0.001) bad_late++;
    end
    $display("balanced period %0.3f ns", p0);
    checks++;
    if (bad_per != 0) begin
      failures++;
      $display("FAIL balanced copy: period not constant (%0d deviations)", bad_per);
    end
    checks++;
    if (bad_late != 0) begin
      failures++;
      $display("FAIL unbalanced copy opened later than balanced one %0d times", bad_late);
    end
  endtask

  // Reference sequences ref_seq[latch][k] = value stored at the k-th capture.
  logic [7:0] ref_seq [NLATCH][NCAP+2];
  int ncap [NDUT][NLATCH];

  task automatic build_ref();
    logic [NLATCH-1:0][7:0] s;
    for (int i = 0; i < NLATCH; i++) s[i] = ODD_MASK[i] ? reset_val(latch_e'(i)) : 8'h00;
    for (int k = 0; k < NCAP + 2; k++) begin
      for (int i = 0; i < NLATCH; i++)
        if (!ODD_MASK[i]) s[i] = f_next(latch_e'(i), s);
      for (int i = 0; i < NLATCH; i++)
        if (!ODD_MASK[i]) ref_seq[i][k] = s[i];
      for (int i = 0; i < NLATCH; i++)
        if (ODD_MASK[i]) s[i] = f_next(latch_e'(i), s);
      for (int i = 0; i < NLATCH; i++)
        if (ODD_MASK[i]) ref_seq[i][k] = s[i];
    end
  endtask

  for (genvar u = 0; u < NDUT; u++) begin : g_dut
    for (genvar i = 0; i < NLATCH; i++) begin : g_mon
      always @(negedge en[u][i]) begin
        if (!rst) begin
          #0.001;
          if (!rst && ncap[u][i] < NCAP + 2) begin
            checks++;
            if (q[u][i] !== ref_seq[i][ncap[u][i]]) begin
              failures++;
              $display("FAIL dut %0d latch %0d capture %0d at %0t: got %02h expected %02h",
                       u, i, ncap[u][i], $time, q[u][i], ref_seq[i][ncap[u][i]]);
            end
          end
          ncap[u][i]++;
        end
      end
    end
  end

  // Adjacent latches never drift more than one capture apart (synchronic
  // distance). Pairs (pred, succ) of the netlist.
  localparam int NPAIR = 10;
  localparam int PRED [NPAIR] = '{LF, LG, LA, LD, LG, LC, LB, LD, LE, LE};
  localparam int SUCC [NPAIR] = '{LA, LA, LB, LC, LC, LD, LE, LE, LF, LG};
  int drift_fail = 0;
  // Count overlaps: an adjacent pair both transparent at once, which the
  // concurrent controllers allow and the semi-decoupled ones do not.
  int overlap [NDUT];
  for (genvar u = 0; u < NDUT; u++) begin : g_drift
    always @(en[u]) if (!rst)
      for (int p = 0; p < NPAIR; p++) begin
        int dd;
        dd = ncap[u][PRED[p]] - ncap[u][SUCC[p]];
        if (dd > 1 || dd < -1) drift_fail++;
        if (en[u][PRED[p]] && en[u][SUCC[p]]) overlap[u]++;
      end
  end

  function automatic bit all_done();
    for (int u = 0; u < NDUT; u++)
      for (int i = 0; i < NLATCH; i++) if (ncap[u][i] < NCAP) return 1'b0;
    return 1'b1;
  endfunction

  task automatic run(input logic [1:0] t);
    tap = t;
    rst = 1'b1;
    #1;
    for (int u = 0; u < NDUT; u++) for (int i = 0; i < NLATCH; i++) begin
      ncap[u][i] = 0;
      nopen[u][i] = 0;
    end
    #19 rst = 1'b0;
    while (!all_done()) #1;
    #5;
    check_timing();
  endtask

  initial begin
    time t0, t1;
    build_ref();
    t0 = $time;
    run(2'd0);
    t1 = $time;
    $display("tap0: %0d captures per latch in %0t", NCAP, t1 - t0);
    run(2'd3);
    $display("tap3: done at %0t", $time);
    $display("adjacent latches open together: semi-decoupled %0d, concurrent %0d",
             overlap[0], overlap[1]);
    checks++;
    if (overlap[1] == 0) begin
      failures++;
      $display("FAIL concurrent controllers never let adjacent latches overlap");
    end
    checks++;
    if (drift_fail != 0) begin
      failures++;
      $display("FAIL synchronic distance exceeded %0d times", drift_fail);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog: network stalled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// End-to-end testbench for desync_top, at its default parameters.
//
// Example netlist, in both versions (semi-decoupled and most concurrent
// controllers): every latch capture is compared with a synchronous
// reference of the same netlist (flow equivalence), first on the full delay
// tap and then, after a reset, on the 1/8 tap.
// Processor clock generator: de-synchronized mode is run and its eight
// enables are checked for liveness and for the hold rule (a latch group opens
// only while its successors are closed); then synchronous mode is checked
// against two non-overlapping global clocks.
// Pipeline (16 stages, 64 bits): fed by a two-phase producer and drained by
// a two-phase consumer with random response times; its results must match
// a synchronous reference of the same pipeline.
// Mechanisms counted, each must occur: pipeline results, latch captures, two-input request
// joins firing, two-input acknowledge joins firing, adjacent latches open
// together under the concurrent controllers, delay-tap change
// speeding the circuit up, reset in mid-run, synchronous mode, mode switch.
module tb_desync_top;
  import fig13_pkg::*;
  import aspida_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int NCAP = 30;
  int checks = 0, failures = 0;

  logic rst, sync_mode, gl1, gl2;
  logic [1:0] tap;
  logic [NLATCH-1:0][7:0] ex_q;
  logic [NLATCH-1:0] ex_en;
  logic [NLATCH-1:0][7:0] mc_q;
  logic [NLATCH-1:0] mc_en;
  logic [63:0] p_in, p_out;
  logic p_in_req, p_in_ack, p_out_req, p_out_ack;
  logic [31:0] p_en;
  logic [NGRP-1:0] cpu_g, cpu_cen;

  desync_top dut (.rst(rst), .tap(tap), .ex_q(ex_q), .ex_en(ex_en), .mc_q(mc_q), .mc_en(mc_en),
                  .pipe_in_data(p_in), .pipe_in_req(p_in_req), .pipe_in_ack(p_in_ack),
                  .pipe_out_data(p_out), .pipe_out_req(p_out_req), .pipe_out_ack(p_out_ack),
                  .pipe_en(p_en), .sync_mode(sync_mode),
                  .global_l1(gl1), .global_l2(gl2), .cpu_g(cpu_g), .cpu_ctrl_en(cpu_cen));

  // Mechanism counters.
  int n_capture = 0, n_req_join = 0, n_ack_join = 0, n_tap_speedup = 0,
      n_midrun_reset = 0, n_mc_capture = 0, n_mc_overlap = 0, n_pipe_out = 0, n_sync_cycles = 0, n_mode_switch = 0, n_cpu_pulse = 0;

  always @(posedge dut.u_example.ri[LA] or posedge dut.u_example.ri[LE] or
           dut.u_example_mc.ri[LA] or dut.u_example_mc.ri[LE] or
           posedge dut.u_cpu_clk.ri[ID_L1]) if (!rst) n_req_join++;
  always @(posedge dut.u_example.ao[LE] or posedge dut.u_example.ao[LG] or
           dut.u_example_mc.ao[LE] or dut.u_example_mc.ao[LG] or
           posedge dut.u_cpu_clk.ao[ID_L2]) if (!rst) n_ack_join++;

  // Synchronous reference of the example netlist.
  logic [7:0] ref_seq [NLATCH][NCAP+2];
  int ncap [NLATCH];
  int ncap_mc [NLATCH];
  initial begin
    logic [NLATCH-1:0][7:0] s;
    for (int i = 0; i < NLATCH; i++) s[i] = ODD_MASK[i] ? reset_val(latch_e'(i)) : 8'h00;
    for (int k = 0; k < NCAP + 2; k++) begin
      for (int i = 0; i < NLATCH; i++) if (!ODD_MASK[i]) s[i] = f_next(latch_e'(i), s);
      for (int i = 0; i < NLATCH; i++) if (ODD_MASK[i]) s[i] = f_next(latch_e'(i), s);
      for (int i = 0; i < NLATCH; i++) ref_seq[i][k] = s[i];
    end
  end

  for (genvar i = 0; i < NLATCH; i++) begin : g_mon
    always @(negedge ex_en[i]) if (!rst) begin
      #0.001;
      if (!rst && ncap[i] < NCAP + 2) begin
        checks++;
        n_capture++;
        if (ex_q[i] !== ref_seq[i][ncap[i]]) begin
          failures++;
          $display("FAIL example latch %0d capture %0d: got %02h expected %02h",
                   i, ncap[i], ex_q[i], ref_seq[i][ncap[i]]);
        end
      end
      ncap[i]++;
    end
  end

  for (genvar i = 0; i < NLATCH; i++) begin : g_mon_mc
    always @(negedge mc_en[i]) if (!rst) begin
      #0.001;
      if (!rst && ncap_mc[i] < NCAP + 2) begin
        checks++;
        n_mc_capture++;
        if (mc_q[i] !== ref_seq[i][ncap_mc[i]]) begin
          failures++;
          $display("FAIL concurrent example latch %0d capture %0d: got %02h expected %02h",
                   i, ncap_mc[i], mc_q[i], ref_seq[i][ncap_mc[i]]);
        end
      end
      ncap_mc[i]++;
    end
  end

  // Adjacent latch pairs of the example netlist (predecessor, successor).
  localparam int NXP = 10;
  localparam int XPRED [NXP] = '{LF, LG, LA, LD, LG, LC, LB, LD, LE, LE};
  localparam int XSUCC [NXP] = '{LA, LA, LB, LC, LC, LD, LE, LE, LF, LG};
  always @(mc_en) if (!rst)
    for (int p = 0; p < NXP; p++) if (mc_en[XPRED[p]] && mc_en[XSUCC[p]]) n_mc_overlap++;

  // Pipeline environment and reference. Output 0 is the reset value of the
  // last slave latch; output k+1 is the k-th input after all 16 stages.
  localparam int PST = 16, NPOUT = NCAP + PST;
  logic [63:0] p_stim [NPOUT + 2*PST + 4];
  logic [63:0] p_expect [NPOUT + 1];
  int p_nin, p_nout;
  function automatic logic [63:0] f_stage(input int unsigned st, input logic [63:0] x);
    logic [63:0] k;
    k = 64'h9E37_79B9_7F4A_7C15 * 64'(st + 1);
    return {x[62:0], x[63]} ^ k;
  endfunction
  initial begin
    logic [63:0] l1 [PST], l2 [PST];
    for (int i = 0; i < NPOUT + 2*PST + 4; i++) p_stim[i] = {$urandom, $urandom};
    for (int st = 0; st < PST; st++) l2[st] = '0;
    p_expect[0] = '0;
    for (int k = 0; k < NPOUT; k++) begin
      l1[0] = f_stage(0, p_stim[k]);
      for (int st = 1; st < PST; st++) l1[st] = f_stage(st, l2[st-1]);
      for (int st = 0; st < PST; st++) l2[st] = l1[st];
      p_expect[k+1] = l2[PST-1];
    end
  end
  initial begin
    p_in_req = 1'b0; p_out_ack = 1'b0;
    forever begin
      @(negedge rst);
      fork
        forever begin
          wait (p_in_ack != p_in_req);
          #($urandom_range(0, 2000) * 0.001);
          p_in = p_stim[p_nin];
          p_nin++;
          p_in_req = p_in_ack;
        end
        forever begin
          wait (p_out_ack == p_out_req);
          #($urandom_range(0, 2000) * 0.001);
          if (p_nout <= NPOUT) begin
            checks++;
            n_pipe_out++;
            if (p_out !== p_expect[p_nout]) begin
              failures++;
              $display("FAIL pipeline output %0d: got %016h expected %016h", p_nout, p_out,
                       p_expect[p_nout]);
            end
          end
          p_nout++;
          p_out_ack = ~p_out_req;
        end
        @(posedge rst);
      join_any
      disable fork;
    end
  end

  // Processor enables: hold rule and pulse counting (de-synchronized mode).
  localparam int NEDGE = 9;
  localparam int PRED [NEDGE] = '{ID_L2, IF_L1, IF_L2, MEM_L2, ID_L1, ID_L2, EX_L1, EX_L2, MEM_L1};
  localparam int SUCC [NEDGE] = '{IF_L1, IF_L2, ID_L1, ID_L1, ID_L2, EX_L1, EX_L2, MEM_L1, MEM_L2};
  int hold_viol = 0;
  int npulse [NGRP];
  for (genvar i = 0; i < NGRP; i++) begin : g_cpu
    always @(posedge cpu_g[i]) if (!rst && !sync_mode)
      for (int e = 0; e < NEDGE; e++) if (PRED[e] == i && cpu_g[SUCC[e]]) hold_viol++;
    always @(negedge cpu_g[i]) if (!rst && !sync_mode) begin
      npulse[i]++;
      n_cpu_pulse++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic bit all_done();
    for (int i = 0; i < NLATCH; i++) if (ncap[i] < NCAP || ncap_mc[i] < NCAP) return 1'b0;
    for (int i = 0; i < NGRP; i++) if (npulse[i] < NCAP) return 1'b0;
    if (p_nout <= NPOUT) return 1'b0;
    return 1'b1;
  endfunction

  task automatic run(input logic [1:0] t, output realtime dur);
    realtime t0;
    tap = t;
    rst = 1'b1;
    #1;
    for (int i = 0; i < NLATCH; i++) begin
      ncap[i] = 0;
      ncap_mc[i] = 0;
    end
    for (int i = 0; i < NGRP; i++) npulse[i] = 0;
    p_in_req = 1'b0;
    p_out_ack = 1'b0;
    p_in = p_stim[0];
    p_nin = 1;
    p_nout = 0;
    #9 rst = 1'b0;
    t0 = $realtime;
    while (!all_done()) #1;
    dur = $realtime - t0;
  endtask

  initial begin
    realtime d0, d3;
    gl1 = 1'b0; gl2 = 1'b0; sync_mode = 1'b0;
    run(2'd0, d0);
    // Reset in mid-run, then rerun on the shortest tap.
    #3;
    n_midrun_reset++;
    run(2'd3, d3);
    $display("example + processor, %0d cycles: tap0 %0.1f ns, tap3 %0.1f ns", NCAP, d0, d3);
    if (d3 < d0) n_tap_speedup++;
    check(hold_viol == 0, $sformatf("processor hold rule (%0d violations)", hold_viol));
    // Switch the processor to synchronous mode.
    sync_mode = 1'b1;
    n_mode_switch++;
    for (int k = 0; k < 10; k++) begin
      gl1 = 1'b1; #2 check(cpu_g == 8'b01010101, "sync L1 phase");
      gl1 = 1'b0; #1 check(cpu_g == 8'b00000000, "sync gap");
      gl2 = 1'b1; #2 check(cpu_g == 8'b10101010, "sync L2 phase");
      gl2 = 1'b0; #1;
      n_sync_cycles++;
    end
    // Back to de-synchronized mode: controllers resume.
    sync_mode = 1'b0;
    n_mode_switch++;
    begin
      int pulses_then;
      pulses_then = n_cpu_pulse;
      #50 check(n_cpu_pulse > pulses_then, "processor resumes after mode switch");
    end
    $display("pipeline: %0d results checked", n_pipe_out);
    $display("concurrent example: captures=%0d adjacent-open=%0d", n_mc_capture, n_mc_overlap);
    $display("mechanisms: capture=%0d req_join=%0d ack_join=%0d tap_speedup=%0d midrun_reset=%0d sync_cycles=%0d mode_switch=%0d cpu_pulses=%0d",
             n_capture, n_req_join, n_ack_join, n_tap_speedup, n_midrun_reset, n_sync_cycles,
             n_mode_switch, n_cpu_pulse);
    check(n_capture > 0, "mechanism: latch captures");
    check(n_pipe_out > 0, "mechanism: pipeline results");
    check(n_mc_capture > 0, "mechanism: concurrent-controller captures");
    check(n_mc_overlap > 0, "mechanism: adjacent latches open together");
    check(n_req_join > 0, "mechanism: request joins");
    check(n_ack_join > 0, "mechanism: acknowledge joins");
    check(n_tap_speedup > 0, "mechanism: shorter tap speeds up");
    check(n_midrun_reset > 0, "mechanism: reset in mid-run");
    check(n_sync_cycles > 0, "mechanism: synchronous mode");
    check(n_mode_switch > 1, "mechanism: mode switch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("FAIL watchdog: design stalled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

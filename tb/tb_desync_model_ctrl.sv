// Testbench for desync_model_ctrl: one even and one odd controller, each
// with a behavioural predecessor and successor that answer its transition
// handshakes after random delays.
// The predecessor sends its next request event once the controller has
// taken the previous one; the successor acknowledges each value offered.
// Checked on every event:
//   the latch closes only once the current request has been through the
//   logic delay, and only after the minimum pulse;
//   the latch opens only once the successor has taken the previous value;
//   ro moves only while the latch is open, once per round;
//   every round completes (no deadlock), NROUND rounds per controller.
// Tap 0 and tap 2 are both run, so the delay checks scale with the tap.
module tb_desync_model_ctrl;
  timeunit 1ns; timeprecision 1ps;

  localparam real TL = 3.0, TP = 1.0;
  localparam int NROUND = 60;
  localparam real EPS = 0.01;

  int checks = 0, failures = 0;
  logic rst;
  logic [1:0] tap;
  logic ri [2], ai [2], ro [2], ao [2], en [2];

  desync_model_ctrl #(.ODD(1'b0), .T_LOGIC_NS(TL), .T_PULSE_NS(TP)) dut_e (
    .rst(rst), .tap(tap), .ri(ri[0]), .ai(ai[0]), .ro(ro[0]), .ao(ao[0]), .en(en[0]));
  desync_model_ctrl #(.ODD(1'b1), .T_LOGIC_NS(TL), .T_PULSE_NS(TP)) dut_o (
    .rst(rst), .tap(tap), .ri(ri[1]), .ai(ai[1]), .ro(ro[1]), .ao(ao[1]), .en(en[1]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic real scale(input logic [1:0] t);
    return 1.0 / real'(1 << t);
  endfunction

  int rounds [2];
  int ro_moves [2];
  int ao_moves [2];

  for (genvar u = 0; u < 2; u++) begin : g_env
    localparam bit ODD = (u == 1);
    realtime t_ri, t_open;
    bit ri_fresh;

    // Predecessor: next request once the previous one has been taken.
    initial begin
      ri[u] = 1'b0;
      forever begin
        wait (!rst && ((ri[u] ^ ai[u]) != ODD));
        #($urandom_range(0, 4000) * 0.001);
        if (!rst && ((ri[u] ^ ai[u]) != ODD)) begin
          ri[u] = ~ri[u];
          t_ri = $realtime;
          ri_fresh = 1'b1;
        end
      end
    end

    // Successor: acknowledge each value offered.
    initial begin
      ao[u] = 1'b0;
      forever begin
        wait (!rst && ((ao[u] ^ ro[u]) != ODD));
        #($urandom_range(0, 4000) * 0.001);
        if (!rst && ((ao[u] ^ ro[u]) != ODD)) ao[u] = ~ao[u];
      end
    end

    always @(posedge en[u]) if (!rst) begin
      t_open = $realtime;
      // Every value offered so far must have been acknowledged (an odd
      // latch's reset value counts as one more). Checked a moment later so
      // that the acknowledge counted in the same time step is seen.
      #0.001;
      check(ao_moves[u] >= rounds[u] + int'(ODD),
            $sformatf("ctrl %0d opened before successor took its value", u));
    end

    always @(negedge en[u]) if (!rst) begin
      check($realtime - t_open >= TP * scale(tap) - EPS,
            $sformatf("ctrl %0d pulse %0.3f shorter than minimum", u, $realtime - t_open));
      // An even latch's first capture uses the reset value of its
      // predecessor; every other capture needs a fresh request.
      check(ri_fresh || (!ODD && rounds[u] == 0),
            $sformatf("ctrl %0d closed without a request", u));
      if (ri_fresh)
        check($realtime - t_ri >= TL * scale(tap) - EPS,
              $sformatf("ctrl %0d closed %0.3f ns after request, before logic delay",
                        u, $realtime - t_ri));
      ri_fresh = 1'b0;
      rounds[u]++;
    end

    always @(ao[u]) if (!rst) ao_moves[u]++;

    always @(ro[u]) if (!rst) begin
      ro_moves[u]++;
      check(en[u] === 1'b1, $sformatf("ctrl %0d offered data while closed", u));
      check(ro_moves[u] - rounds[u] == 1, $sformatf("ctrl %0d offered twice in one round", u));
    end
  end

  task automatic run(input logic [1:0] t);
    tap = t;
    rst = 1'b1;
    #1;
    rounds = '{0, 0};
    ro_moves = '{0, 0};
    ao_moves = '{0, 0};
    g_env[0].ri_fresh = 1'b0;
    g_env[1].ri_fresh = 1'b0;
    #9 rst = 1'b0;
    while (rounds[0] < NROUND || rounds[1] < NROUND) #1;
    #10;
  endtask

  initial begin
    run(2'd0);
    run(2'd2);
    check(rounds[0] >= NROUND && rounds[1] >= NROUND, "all rounds completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("FAIL watchdog: handshake stalled (rounds %0d %0d)", rounds[0], rounds[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

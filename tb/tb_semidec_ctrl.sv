// Testbench for semidec_ctrl: plays the neighbouring controllers of one even
// and one odd controller and checks, step by step:
//   * the reset states (even: en=1, ai=0, ro=0; odd: en=0, ai=1, ro=0);
//   * the latch closes T_RISE_NS after the request rises, not before;
//   * the latch opens T_FALL_NS after the request falls, and only once the
//     successors have acknowledged (ao high);
//   * ro rises only when the latch is closed and ao is low, and falls when
//     the latch has opened; ai always mirrors the closed state.
module tb_semidec_ctrl;
  timeunit 1ns; timeprecision 1ps;
  localparam real TR = 1.0, TF = 2.0;
  int checks = 0, failures = 0;
  logic rst;
  logic [1:0] tap;
  logic ri_e, ao_e, ai_e, ro_e, en_e;
  logic ri_o, ao_o, ai_o, ro_o, en_o;

  semidec_ctrl #(.ODD(1'b0), .T_RISE_NS(TR), .T_FALL_NS(TF)) u_even (
    .rst(rst), .tap(tap), .ri(ri_e), .ai(ai_e), .ro(ro_e), .ao(ao_e), .en(en_e));
  semidec_ctrl #(.ODD(1'b1), .T_RISE_NS(TR), .T_FALL_NS(TF)) u_odd (
    .rst(rst), .tap(tap), .ri(ri_o), .ai(ai_o), .ro(ro_o), .ao(ao_o), .en(en_o));

  task automatic check(input logic [2:0] got, input logic [2:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: {en,ai,ro} = %b expected %b", what, $time, got, exp);
    end
  endtask

  // One full handshake cycle on a controller that starts open with ro=0,
  // ao=1 and ri=0. Checks timing of close and open.
  task automatic cycle_even(int k);
    if (k % 3 == 2) begin
      // The acknowledge is still high from the previous value when the
      // predecessor withdraws its request: the latch must stay closed until
      // its own request has been answered.
      ri_e = 1'b1;
      #(TR + 0.2) check({en_e, ai_e, ro_e}, 3'b010, "even closed, ao still high");
      ri_e = 1'b0;
      #(TF + 1.0) check({en_e, ai_e, ro_e}, 3'b010, "even holds on a stale acknowledge");
      ao_e = 1'b0;
      #0.1        check({en_e, ai_e, ro_e}, 3'b011, "even ro raised");
      ao_e = 1'b1;
      #0.1        check({en_e, ai_e, ro_e}, 3'b100, "even reopened after fresh acknowledge");
      #1;
      return;
    end
    ri_e = 1'b1;
    #(TR - 0.2) check({en_e, ai_e, ro_e}, 3'b100, "even before close");
    #0.4        check({en_e, ai_e, ro_e}, 3'b010, "even closed, ro waits for ao low");
    ao_e = 1'b0;
    #0.1        check({en_e, ai_e, ro_e}, 3'b011, "even ro raised");
    if (k % 2 == 0) begin
      ri_e = 1'b0;
      #(TF + 1.0) check({en_e, ai_e, ro_e}, 3'b011, "even stays closed until ao");
      ao_e = 1'b1;
      #0.1      check({en_e, ai_e, ro_e}, 3'b100, "even reopened, ro low");
    end else begin
      // ao returns, then the request falls: opening waits for the delay.
      ao_e = 1'b1;
      #0.5        check({en_e, ai_e, ro_e}, 3'b011, "even waits for request low");
      ri_e = 1'b0;
      #(TF - 0.2) check({en_e, ai_e, ro_e}, 3'b011, "even before open");
      #0.4        check({en_e, ai_e, ro_e}, 3'b100, "even opened after fall delay");
    end
    #1;
  endtask

  initial begin
    tap = 2'd0;
    rst = 1'b1;
    ri_e = 1'b0; ao_e = 1'b1;   // printed even initial state
    ri_o = 1'b0; ao_o = 1'b0;   // printed odd initial state
    #5;
    check({en_e, ai_e, ro_e}, 3'b100, "even reset");
    check({en_o, ai_o, ro_o}, 3'b010, "odd reset");
    rst = 1'b0;
    #0.1 check({en_o, ai_o, ro_o}, 3'b011, "odd sends its reset token");
    #3   check({en_o, ai_o, ro_o}, 3'b011, "odd holds until successor acks");
    ao_o = 1'b1;
    #0.1 check({en_o, ai_o, ro_o}, 3'b100, "odd opens after ack");
    ri_o = 1'b1;
    #(TR + 0.2) check({en_o, ai_o, ro_o}, 3'b010, "odd closes on request");
    for (int k = 0; k < 20; k++) cycle_even(k);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for matched_delay: measures the delay of rising and falling
// edges on every tap and compares them with T_RISE_NS and T_FALL_NS scaled
// by 1, 1/2, 1/4 and 1/8.
module tb_matched_delay;
  timeunit 1ns; timeprecision 1ps;
  localparam real TR = 1.6, TF = 4.0;
  int checks = 0, failures = 0;
  logic in, out;
  logic [1:0] tap;

  matched_delay #(.T_RISE_NS(TR), .T_FALL_NS(TF)) dut (.in(in), .tap(tap), .out(out));

  task automatic measure(input logic edge_val, input real expect_ns);
    realtime t0, dt;
    in = edge_val;
    t0 = $realtime;
    wait (out === edge_val);
    dt = $realtime - t0;
    checks++;
    if (dt < expect_ns - 0.002 || dt > expect_ns + 0.002) begin
      failures++;
      $display("FAIL tap %0d edge %b: delay %0.3f ns expected %0.3f ns", tap, edge_val, dt, expect_ns);
    end
    #10;
  endtask

  initial begin
    real scale [4] = '{1.0, 0.5, 0.25, 0.125};
    in = 1'b0; tap = 2'd0;
    #10;
    for (int t = 0; t < 4; t++) begin
      tap = 2'(t);
      #1;
      measure(1'b1, TR * scale[t]);
      measure(1'b0, TF * scale[t]);
    end
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

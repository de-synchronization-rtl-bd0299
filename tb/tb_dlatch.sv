// Testbench for dlatch: checks reset to RESET_VAL, that q follows d while en
// is high, and that q keeps the value present when en fell while d keeps
// changing. A second instance without reset must ignore rst.
module tb_dlatch;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic [7:0] d, q, qn;
  logic en, rst;

  dlatch #(.W(8), .HAS_RESET(1'b1), .RESET_VAL(8'hA5)) dut  (.d(d), .en(en), .rst(rst), .q(q));
  dlatch #(.W(8), .HAS_RESET(1'b0), .RESET_VAL(8'hA5)) dutn (.d(d), .en(en), .rst(rst), .q(qn));

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    logic [7:0] held;
    d = 8'h11; en = 1'b1; rst = 1'b1;
    #1 check(q, 8'hA5, "reset value");
    check(qn, 8'h11, "no-reset latch transparent during rst");
    rst = 1'b0;
    for (int k = 0; k < 50; k++) begin
      en = 1'b1;
      d = 8'($urandom);
      #1 check(q, d, "transparent");
      held = d;
      en = 1'b0;
      #1;
      for (int j = 0; j < 3; j++) begin
        d = 8'($urandom);
        #1 check(q, held, "hold");
        check(qn, held, "hold (no reset)");
      end
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

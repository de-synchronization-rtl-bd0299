// Testbench for c_element: drives 2- and 3-input C-elements with random
// input vectors and compares the output with a reference that remembers the
// last output: all ones -> 1, all zeros -> 0, otherwise unchanged. Also
// checks the reset value.
module tb_c_element;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic rst;
  logic [1:0] in2;
  logic [2:0] in3;
  logic y2, y3, ref2, ref3;

  c_element #(.N(2), .INIT(1'b0)) u2 (.in(in2), .rst(rst), .y(y2));
  c_element #(.N(3), .INIT(1'b1)) u3 (.in(in3), .rst(rst), .y(y3));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b (in2=%b in3=%b)", what, got, exp, in2, in3);
    end
  endtask

  initial begin
    rst = 1'b1; in2 = 2'b01; in3 = 3'b010;
    #1;
    check(y2, 1'b0, "reset y2");
    check(y3, 1'b1, "reset y3");
    ref2 = 1'b0; ref3 = 1'b1;
    rst = 1'b0;
    for (int k = 0; k < 400; k++) begin
      in2 = 2'($urandom);
      in3 = (k % 7 == 0) ? 3'b111 : (k % 7 == 3) ? 3'b000 : 3'($urandom);
      #1;
      if (in2 == 2'b11) ref2 = 1'b1; else if (in2 == 2'b00) ref2 = 1'b0;
      if (in3 == 3'b111) ref3 = 1'b1; else if (in3 == 3'b000) ref3 = 1'b0;
      check(y2, ref2, "y2");
      check(y3, ref3, "y3");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

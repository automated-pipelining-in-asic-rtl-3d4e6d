// tb_c_element: checks the Muller C-element against its defining equation.
//
// Two instances (2 and 3 inputs, reset values 0 and 1) get random input
// vectors; a reference state is kept for each: it becomes 1 when all inputs
// are 1, 0 when all are 0, and stays otherwise. Reset is checked first.
`timescale 1ns/1ps
module tb_c_element;
  logic       rst = 1'b1;
  logic [1:0] in2;
  logic [2:0] in3;
  logic       out2, out3;
  logic       ref2, ref3;
  int checks = 0, failures = 0;

  c_element #(.N(2), .INIT(1'b0)) dut2 (.rst_i(rst), .in_i(in2), .out_o(out2));
  c_element #(.N(3), .INIT(1'b1)) dut3 (.rst_i(rst), .in_i(in3), .out_o(out3));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %0b expected %0b at %t", what, got, exp, $time);
    end
  endtask

  initial begin
    in2 = 2'b11; in3 = 3'b000;
    #1;
    check("reset 2-input", out2, 1'b0);
    check("reset 3-input", out3, 1'b1);
    in2 = 2'b01; in3 = 3'b101;
    #1 rst = 1'b0;
    ref2 = 1'b0; ref3 = 1'b1;
    #1;
    check("hold after reset 2", out2, ref2);
    check("hold after reset 3", out3, ref3);
    for (int i = 0; i < 500; i++) begin
      in2 = 2'($urandom);
      in3 = 3'($urandom);
      if (i % 7 == 0) in3 = 3'b111;
      if (i % 11 == 0) in3 = 3'b000;
      if (&in2) ref2 = 1'b1; else if (~|in2) ref2 = 1'b0;
      if (&in3) ref3 = 1'b1; else if (~|in3) ref3 = 1'b0;
      #1;
      check("2-input", out2, ref2);
      check("3-input", out3, ref3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

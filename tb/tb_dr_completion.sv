// tb_dr_completion: checks the dual-rail bus completion detector.
//
// A 4-pair bus receives codewords one pair at a time in random order, with
// random values, and then returns to NULL one pair at a time. done_o must
// stay low until the last pair has become valid and stay high until the last
// pair has returned to NULL.
`timescale 1ns/1ps
module tb_dr_completion;
  import gtl_pkg::*;
  localparam int N = 4;

  logic            rst = 1'b1;
  dr_bit_t [N-1:0] bus;
  logic            done;
  int checks = 0, failures = 0;

  dr_completion #(.N(N)) dut (.rst_i(rst), .bus_i(bus), .done_o(done));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %0b expected %0b at %t", what, got, exp, $time);
    end
  endtask

  initial begin
    int order [N];
    bus = '0;
    #1 rst = 1'b0;
    #1 check("idle", done, 1'b0);
    for (int w = 0; w < 200; w++) begin
      for (int i = 0; i < N; i++) order[i] = i;
      order.shuffle();
      for (int i = 0; i < N; i++) begin
        bus[order[i]] = dr_encode(1'($urandom));
        #1 check("set phase", done, i == N - 1);
      end
      order.shuffle();
      for (int i = 0; i < N; i++) begin
        bus[order[i]] = DR_NULL;
        #1 check("reset phase", done, i != N - 1);
      end
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

// tb_gtl_fork: checks the fork of a 2-bit dual-rail channel to 3 receivers.
//
// Every branch must carry the sender's word unchanged. The sender's
// acknowledge must rise only after all three receivers acknowledged and fall
// only after all three withdrew their acknowledge; receivers answer in random
// order.
`timescale 1ns/1ps
module tb_gtl_fork;
  import gtl_pkg::*;
  localparam int M = 3;
  localparam int W = 2;

  logic                   rst = 1'b1;
  dr_bit_t [W-1:0]        a;
  logic                   lack;
  dr_bit_t [M-1:0][W-1:0] z;
  logic    [M-1:0]        rack;
  int checks = 0, failures = 0;

  gtl_fork #(.M(M), .W(W)) dut (.rst_i(rst), .a_i(a), .lack_o(lack), .z_o(z), .rack_i(rack));

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %0h expected %0h at %t", what, got, exp, $time);
    end
  endtask

  initial begin
    int order [M];
    a = '0; rack = '0;
    #1 rst = 1'b0;
    for (int t = 0; t < 200; t++) begin
      logic [W-1:0] v;
      v = W'($urandom);
      for (int i = 0; i < W; i++) a[i] = dr_encode(v[i]);
      #1;
      for (int m = 0; m < M; m++) check("branch data", 32'(z[m]), 32'(a));
      for (int i = 0; i < M; i++) order[i] = i;
      order.shuffle();
      for (int i = 0; i < M; i++) begin
        rack[order[i]] = 1'b1;
        #1 check("ack join rise", 32'(lack), 32'(i == M - 1));
      end
      a = '0;
      #1;
      for (int m = 0; m < M; m++) check("branch null", 32'(z[m]), 0);
      order.shuffle();
      for (int i = 0; i < M; i++) begin
        rack[order[i]] = 1'b0;
        #1 check("ack join fall", 32'(lack), 32'(i != M - 1));
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

// tb_gtl_c17: runs the c17 benchmark circuit built from GTL cells.
//
// Two copies of gtl_c17, one with balance buffers and one without, receive
// the same NVEC random input vectors. Each of the five inputs is driven by
// its own process with its own random delays, and each of the two outputs has
// its own receiver, so the input and output channels run out of step with
// each other, as they may in a delay-insensitive circuit. Output token k of
// both copies must equal the single-rail c17 function of input vector k.
`timescale 1ns/1ps
module tb_gtl_c17;
  import gtl_pkg::*;
  localparam int NVEC = 200;

  logic rst = 1'b1;
  logic [4:0] vec [NVEC];   // {i7, i6, i3, i2, i1}
  int checks = 0, failures = 0;
  int rx_done = 0;

  function automatic logic [1:0] c17_ref(logic [4:0] v);
    logic i1, i2, i3, i6, i7, n10, n11, n16, n19;
    {i7, i6, i3, i2, i1} = v;
    n10 = ~(i1 & i3);
    n11 = ~(i3 & i6);
    n16 = ~(i2 & n11);
    n19 = ~(n11 & i7);
    return {~(n16 & n19), ~(n10 & n16)};  // {o23, o22}
  endfunction

  task automatic rand_delay(int maxd);
    #($urandom_range(maxd, 0) * 1ns + 0.5ns);
  endtask

  initial begin
    for (int k = 0; k < NVEC; k++) vec[k] = 5'($urandom);
    #5 rst = 1'b0;
  end

  for (genvar c = 0; c < 2; c++) begin : g_copy
    dr_bit_t [4:0] in;
    logic    [4:0] in_ack;
    dr_bit_t [1:0] out;
    logic    [1:0] out_ack;

    gtl_c17 #(.BALANCE(c == 0)) dut (
      .rst_i(rst),
      .i1(in[0]), .i2(in[1]), .i3(in[2]), .i6(in[3]), .i7(in[4]),
      .i1_ack(in_ack[0]), .i2_ack(in_ack[1]), .i3_ack(in_ack[2]),
      .i6_ack(in_ack[3]), .i7_ack(in_ack[4]),
      .o22(out[0]), .o23(out[1]), .o22_ack(out_ack[0]), .o23_ack(out_ack[1]));

    for (genvar i = 0; i < 5; i++) begin : g_src
      initial begin
        in[i] = DR_NULL;
        wait (rst == 1'b0);
        for (int k = 0; k < NVEC; k++) begin
          wait (in_ack[i] == 1'b0);
          rand_delay(3);
          in[i] = dr_encode(vec[k][i]);
          wait (in_ack[i] == 1'b1);
          rand_delay(3);
          in[i] = DR_NULL;
        end
      end
    end

    for (genvar o = 0; o < 2; o++) begin : g_snk
      initial begin
        out_ack[o] = 1'b0;
        wait (rst == 1'b0);
        for (int k = 0; k < NVEC; k++) begin
          logic [1:0] exp_v;
          exp_v = c17_ref(vec[k]);
          wait (out[o].t || out[o].f);
          rand_delay(4);
          checks++;
          if (out[o].t !== exp_v[o]) begin
            failures++;
            $display("copy %0d output %0d vector %0d: got %0b expected %0b",
                     c, o, k, out[o].t, exp_v[o]);
          end
          out_ack[o] = 1'b1;
          wait (out[o] == DR_NULL);
          rand_delay(4);
          out_ack[o] = 1'b0;
        end
        rx_done++;
      end
    end
  end

  initial begin
    fork
      wait (rx_done == 4);
      #2ms;
    join_any
    if (rx_done != 4) begin failures++; $display("watchdog expired"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

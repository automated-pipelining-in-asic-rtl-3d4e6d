// tb_gtl_sequence_detector: end-to-end test of the GTL "111" sequence detector.
//
// A sender process drives NTOK random bits as dual-rail tokens with the
// four-phase protocol and random delays; a receiver process takes the output
// tokens, again with random delays, so that back-pressure reaches the input.
// The expected output comes from a clocked reference model of the detector's
// synchronous specification (shift register plus AND), advanced once per
// token: output token k is the reference D_out during cycle k. Besides the
// values, the test counts how often the mechanisms of the design occurred:
// detections ("111" seen), input stalls (sender blocked by back-pressure),
// fork waits (one fork branch acknowledged while the other had not yet) and
// startup output of the initial register tokens. Each must occur at least once.
// The detector runs at its default parameters (3 bits, initial value 000).
`timescale 1ns/1ps
module tb_gtl_sequence_detector;
  import gtl_pkg::*;

  localparam int NTOK  = 400;
  localparam int DEPTH = 3;

  logic    rst = 1'b1;
  dr_bit_t d_in, d_out;
  logic    d_in_ack, d_out_ack;

  int checks = 0, failures = 0;
  int n_detect = 0, n_stall = 0, n_fork_wait = 0, n_init_out = 0;
  bit done_rx = 0;

  bit stim [NTOK];

  gtl_sequence_detector dut (
    .rst_i       (rst),
    .d_in_i      (d_in),
    .d_in_ack_o  (d_in_ack),
    .d_out_o     (d_out),
    .d_out_ack_i (d_out_ack)
  );

  // reference: the synchronous specification, one step per token
  function automatic bit ref_out(int k);
    logic [DEPTH-1:0] r = '0;
    for (int c = 0; c < k; c++) r = {stim[c], r[DEPTH-1:1]};
    return &r;
  endfunction

  task automatic rand_delay(int maxd);
    #($urandom_range(maxd, 0) * 1ns + 0.5ns);
  endtask

  // sender
  initial begin
    for (int k = 0; k < NTOK; k++)
      stim[k] = (k % 37 < 6) ? 1'b1 : 1'($urandom_range(3, 0) != 0);
    rst = 1'b1; d_in = DR_NULL; d_out_ack = 1'b0;
    #10 rst = 1'b0;
    for (int k = 0; k < NTOK; k++) begin
      rand_delay(3);
      if (d_in_ack) n_stall++;
      wait (d_in_ack == 1'b0);
      d_in = dr_encode(stim[k]);
      wait (d_in_ack == 1'b1);
      rand_delay(3);
      d_in = DR_NULL;
    end
  end

  // receiver
  initial begin
    wait (rst == 1'b0);
    for (int k = 0; k <= NTOK; k++) begin
      bit exp_v;
      wait (d_out.t || d_out.f);
      exp_v = ref_out(k);
      checks++;
      if (d_out.t !== exp_v) begin
        failures++;
        $display("mismatch token %0d: got %0b expected %0b", k, d_out.t, exp_v);
      end
      if (d_out.t) n_detect++;
      if (k == 0) n_init_out++;
      // slow consumer every so often, to build back-pressure
      if (k % 50 < 10) #(20ns); else rand_delay(4);
      d_out_ack = 1'b1;
      wait (d_out == DR_NULL);
      rand_delay(4);
      d_out_ack = 1'b0;
    end
    done_rx = 1;
  end

  // fork acknowledge skew: one branch done, the other not yet
  always @(dut.u_shift.g_bit[0].g_fork.u_fork.rack_i)
    if (^dut.u_shift.g_bit[0].g_fork.u_fork.rack_i) n_fork_wait++;

  // end of test and watchdog
  initial begin
    fork
      wait (done_rx);
      #(2ms);
    join_any
    if (!done_rx) begin
      failures++;
      $display("watchdog: output stream stopped");
    end
    #(50ns);
    // With no further input, the AND stage may already show the next output
    // if one of the two taps it holds is 0 (its f rail is an OR). Such an
    // early token must be 0 and must be justified by the stored bits.
    checks++;
    if ((d_out.t || d_out.f) &&
        (d_out.t || (stim[NTOK-1] && stim[NTOK-2]))) begin
      failures++;
      $display("unexpected output token after the last input");
    end
    checks += 4;
    if (n_detect == 0)    begin failures++; $display("no detection"); end
    if (n_stall == 0)     begin failures++; $display("no input stall"); end
    if (n_fork_wait == 0) begin failures++; $display("no fork wait"); end
    if (n_init_out == 0)  begin failures++; $display("no initial token output"); end
    $display("detections=%0d stalls=%0d fork_waits=%0d", n_detect, n_stall, n_fork_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

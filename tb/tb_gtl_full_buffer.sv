// tb_gtl_full_buffer: checks the full buffer (two half-buffer stages).
//
// Two instances: u_tok starts holding a token (INIT_VALUE 1), u_empty starts
// empty. Phase 1 blocks the receivers and offers a stream of tokens: a full buffer must
// hold exactly one token, so u_tok accepts none and u_empty accepts exactly
// one. Phase 2 streams random tokens through both with random delays and
// checks order and values (u_tok delivers its initial token first).
`timescale 1ns/1ps
module tb_gtl_full_buffer;
  import gtl_pkg::*;
  localparam int NTOK = 300;

  logic          rst = 1'b1;
  dr_bit_t [1:0] a, z;
  logic    [1:0] lack, rack;
  logic          stim [NTOK];
  int checks = 0, failures = 0;
  int accepted [2];
  int rx_done = 0;
  bit phase2 = 1'b0;

  gtl_full_buffer #(.INIT_TOKEN(1'b1), .INIT_VALUE(1'b1)) u_tok (
    .rst_i(rst), .a_i(a[0]), .lack_o(lack[0]), .z_o(z[0]), .rack_i(rack[0]));
  gtl_full_buffer #(.INIT_TOKEN(1'b0)) u_empty (
    .rst_i(rst), .a_i(a[1]), .lack_o(lack[1]), .z_o(z[1]), .rack_i(rack[1]));

  task automatic rand_delay(int maxd);
    #($urandom_range(maxd, 0) * 1ns + 0.5ns);
  endtask

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d at %t", what, got, exp, $time);
    end
  endtask

  initial for (int k = 0; k < NTOK; k++) stim[k] = 1'($urandom);

  // the token stream offered by both senders: a 1, then stim[1..]
  function automatic logic sent(int k);
    return (k == 0) ? 1'b1 : stim[k];
  endfunction

  for (genvar i = 0; i < 2; i++) begin : g_ch
    // sender: the first token is offered while the receiver is still blocked
    initial begin
      a[i] = DR_NULL;
      accepted[i] = 0;
      wait (rst == 1'b0);
      for (int k = 0; k < NTOK; k++) begin
        wait (lack[i] == 1'b0);
        rand_delay(2);
        a[i] = dr_encode(sent(k));
        wait (lack[i] == 1'b1);
        if (!phase2) accepted[i]++;
        rand_delay(2);
        a[i] = DR_NULL;
      end
    end

    // receiver: blocked in phase 1, then checks the stream
    initial begin
      rack[i] = 1'b0;
      wait (phase2);
      // u_tok delivers its initial token 1 ahead of the stream
      for (int k = 0; k < NTOK; k++) begin
        logic exp_v;
        if (i == 0) exp_v = (k == 0) ? 1'b1 : sent(k - 1);
        else        exp_v = sent(k);
        wait (z[i].t || z[i].f);
        rand_delay(3);
        check($sformatf("buffer %0d token %0d", i, k), int'(z[i].t), int'(exp_v));
        rack[i] = 1'b1;
        wait (z[i] == DR_NULL);
        rand_delay(3);
        rack[i] = 1'b0;
      end
      rx_done++;
    end
  end

  initial begin
    #5 rst = 1'b0;
    #150ns;
    check("tokens accepted by the full buffer holding a token", accepted[0], 0);
    check("tokens accepted by the empty full buffer", accepted[1], 1);
    phase2 = 1'b1;
    fork
      wait (rx_done == 2);
      #1ms;
    join_any
    if (rx_done != 2) begin failures++; $display("watchdog expired"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gtl_shift_register: checks the GTL shift register with parallel taps.
//
// A 4-bit instance with initial content 4'b1011 receives NTOK random bits;
// every tap has its own receiver with its own random delays, so the forks
// must wait for slow branches. Token j on tap k must equal bit k of the
// synchronous register after j clock edges: the initial bit INIT[k-j] while
// j <= k, else input bit j-1-k. Shows that the full buffers keep the bits
// apart (without them every tap would carry the same bit).
`timescale 1ns/1ps
module tb_gtl_shift_register;
  import gtl_pkg::*;
  localparam int         N    = 4;
  localparam logic [N-1:0] INIT = 4'b1011;
  localparam int         NTOK = 300;

  logic            rst = 1'b1;
  dr_bit_t         d;
  logic            d_ack;
  dr_bit_t [N-1:0] q;
  logic    [N-1:0] q_ack;
  logic            stim [NTOK];
  int checks = 0, failures = 0;
  int rx_done = 0;
  int n_fork_wait = 0;

  gtl_shift_register #(.N(N), .INIT_VALUE(INIT)) dut (
    .rst_i(rst), .d_i(d), .d_ack_o(d_ack), .q_o(q), .q_ack_i(q_ack));

  task automatic rand_delay(int maxd);
    #($urandom_range(maxd, 0) * 1ns + 0.5ns);
  endtask

  function automatic logic ref_bit(int k, int j);
    return (j > k) ? stim[j-1-k] : INIT[k-j];
  endfunction

  initial begin
    for (int j = 0; j < NTOK; j++) stim[j] = 1'($urandom);
    d = DR_NULL;
    #5 rst = 1'b0;
    for (int j = 0; j < NTOK; j++) begin
      wait (d_ack == 1'b0);
      rand_delay(2);
      d = dr_encode(stim[j]);
      wait (d_ack == 1'b1);
      rand_delay(2);
      d = DR_NULL;
    end
  end

  for (genvar k = 0; k < N; k++) begin : g_rx
    initial begin
      q_ack[k] = 1'b0;
      wait (rst == 1'b0);
      for (int j = 0; j <= NTOK; j++) begin
        wait (q[k].t || q[k].f);
        rand_delay(4 * (k + 1));
        checks++;
        if (q[k].t !== ref_bit(k, j)) begin
          failures++;
          $display("tap %0d token %0d: got %0b expected %0b", k, j, q[k].t, ref_bit(k, j));
        end
        q_ack[k] = 1'b1;
        wait (q[k] == DR_NULL);
        rand_delay(3);
        q_ack[k] = 1'b0;
      end
      rx_done++;
    end
  end

  always @(dut.g_bit[0].g_fork.u_fork.rack_i)
    if (^dut.g_bit[0].g_fork.u_fork.rack_i) n_fork_wait++;

  initial begin
    fork
      wait (rx_done == N);
      #2ms;
    join_any
    if (rx_done != N) begin failures++; $display("watchdog expired"); end
    checks++;
    if (n_fork_wait == 0) begin failures++; $display("fork never waited"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

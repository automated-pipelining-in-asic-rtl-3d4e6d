// gtl_shift_register: GTL mapping of an N-bit shift register with a parallel
// output.
//
// Each flip-flop of the synchronous shift register becomes a full buffer
// (two half-buffer stages, one of them holding the flip-flop's initial value
// as a token). Because every bit is also read out in parallel, the line after
// each full buffer branches through a fork: one branch is the parallel tap,
// the other feeds the next bit. The last bit has only its tap, so it needs no
// fork. Without the full buffers the forks alone would turn the register into
// one bit copied N times; the buffers give the GTL circuit the same token
// capacity as the flip-flops.
//
// Interface: serial input d_i with acknowledge d_ack_o; taps q_o[k] with
// acknowledges q_ack_i[k]. q_o[0] is the first bit after the input (the newest
// value), q_o[N-1] the oldest. Each shift consumes one input token and
// produces one token on every tap; the first token on each tap after reset is
// INIT_VALUE[k]. The FB-plus-fork structure follows the document; the tap
// order and the reset values are this design's choices.
//
// Every acknowledge closes a loop through C-elements (latches); the latch and
// combinational-loop warnings tools give for this block are these handshake
// loops and are intended.
module gtl_shift_register
  import gtl_pkg::*;
#(
  parameter int unsigned    N          = 3,
  parameter logic [N-1:0]   INIT_VALUE = '0
) (
  input  logic            rst_i,
  input  dr_bit_t         d_i,
  output logic            d_ack_o,
  output dr_bit_t [N-1:0] q_o,
  input  logic    [N-1:0] q_ack_i
);

  dr_bit_t [N-1:0] chain;      // chain[k]: input of bit k
  logic    [N-1:0] chain_ack;  // acknowledge of chain[k]

  assign chain[0] = d_i;
  assign d_ack_o  = chain_ack[0];

  for (genvar k = 0; k < N; k++) begin : g_bit
    dr_bit_t fb_out;
    logic    fb_ack;

    gtl_full_buffer #(.INIT_TOKEN(1'b1), .INIT_VALUE(INIT_VALUE[k])) u_fb (
      .rst_i  (rst_i),
      .a_i    (chain[k]),
      .lack_o (chain_ack[k]),
      .z_o    (fb_out),
      .rack_i (fb_ack)
    );

    if (k < N - 1) begin : g_fork
      dr_bit_t [1:0][0:0] br;
      gtl_fork #(.M(2), .W(1), .INIT(1'b0)) u_fork (
        .rst_i  (rst_i),
        .a_i    (fb_out),
        .lack_o (fb_ack),
        .z_o    (br),
        .rack_i ({chain_ack[k+1], q_ack_i[k]})
      );
      assign q_o[k]     = br[0][0];
      assign chain[k+1] = br[1][0];
    end else begin : g_last
      assign q_o[k] = fb_out;
      assign fb_ack = q_ack_i[k];
    end
  end

endmodule

// gtl_sequence_detector: GTL implementation of a "111" sequence detector.
//
// The synchronous specification shifts D_in into a DEPTH-bit register on each
// clock edge and drives D_out high while all register bits are 1. Its GTL
// implementation has no clock: the register becomes a gtl_shift_register (a
// full buffer per flip-flop, a fork where a bit is both read and shifted on)
// and the DEPTH-input AND becomes a single half-buffer gtl_gate that joins all
// taps. Every dual-rail token entering at d_in_i is one clock cycle of the
// specification, and every token leaving at d_out_o is the value D_out had in
// one cycle. The first output token after reset reflects the initial register
// content INIT_VALUE (all 0 by default), so output token k equals
// D_in[k-1] & D_in[k-2] & ... & D_in[k-DEPTH] with the initial bits standing in
// for inputs before the first one.
//
// Interface (four-phase, dual-rail, data driven):
//   d_in_i / d_in_ack_o   serial input channel
//   d_out_o / d_out_ack_i detector output channel
// rst_i is active high and must be held while the input channel is NULL and
// the output acknowledge is low. The structure (FB, F, FB, F, FB, HB with AND)
// follows the document's example; the data-driven handshake, reset and the
// DEPTH parameter are this design's choices (the document's example is 3 bits).
//
// Every acknowledge closes a loop through C-elements (latches); the latch and
// combinational-loop warnings tools give for this block are these handshake
// loops and are intended.
module gtl_sequence_detector
  import gtl_pkg::*;
#(
  parameter int unsigned      DEPTH      = 3,
  parameter logic [DEPTH-1:0] INIT_VALUE = '0
) (
  input  logic    rst_i,
  input  dr_bit_t d_in_i,
  output logic    d_in_ack_o,
  output dr_bit_t d_out_o,
  input  logic    d_out_ack_i
);

  dr_bit_t [DEPTH-1:0] taps;
  logic                taps_ack;

  gtl_shift_register #(.N(DEPTH), .INIT_VALUE(INIT_VALUE)) u_shift (
    .rst_i   (rst_i),
    .d_i     (d_in_i),
    .d_ack_o (d_in_ack_o),
    .q_o     (taps),
    .q_ack_i ({DEPTH{taps_ack}})
  );

  gtl_gate #(.N(DEPTH), .FUNC(GF_AND), .INIT_TOKEN(1'b0)) u_and (
    .rst_i  (rst_i),
    .a_i    (taps),
    .lack_o (taps_ack),
    .z_o    (d_out_o),
    .rack_i (d_out_ack_i)
  );

endmodule

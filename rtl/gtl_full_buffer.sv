// gtl_full_buffer: full buffer (FB), the GTL replacement of a flip-flop.
//
// A half-buffer stage holds half a token (a DATA wave or a NULL wave), so two
// of them in a row are needed to hold one data token, as a flip-flop or a pair
// of latches does. The first stage starts NULL, the second starts holding the
// token INIT_VALUE when INIT_TOKEN is set: this is the flip-flop's initial
// content. Each stage is a gtl_gate with the buffer function. Interface: one
// dual-rail bit in with its acknowledge, one dual-rail bit out with its
// acknowledge, four-phase handshake on both. Two HB stages per flip-flop, with
// every other stage holding a token, follows the document; which of the two
// holds it is this design's choice.
//
// Every acknowledge closes a loop through C-elements (latches); the latch and
// combinational-loop warnings tools give for this block are these handshake
// loops and are intended.
module gtl_full_buffer
  import gtl_pkg::*;
#(
  parameter bit INIT_TOKEN = 1'b1,
  parameter bit INIT_VALUE = 1'b0
) (
  input  logic    rst_i,
  input  dr_bit_t a_i,
  output logic    lack_o,
  output dr_bit_t z_o,
  input  logic    rack_i
);

  dr_bit_t mid;
  logic    mid_ack;

  gtl_gate #(.N(1), .FUNC(GF_BUF), .INIT_TOKEN(1'b0)) u_hb0 (
    .rst_i  (rst_i),
    .a_i    (a_i),
    .lack_o (lack_o),
    .z_o    (mid),
    .rack_i (mid_ack)
  );

  gtl_gate #(.N(1), .FUNC(GF_BUF), .INIT_TOKEN(INIT_TOKEN), .INIT_VALUE(INIT_VALUE)) u_hb1 (
    .rst_i  (rst_i),
    .a_i    (mid),
    .lack_o (mid_ack),
    .z_o    (z_o),
    .rack_i (rack_i)
  );

endmodule

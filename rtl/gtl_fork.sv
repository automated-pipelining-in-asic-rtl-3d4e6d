// gtl_fork: fork (F) of a dual-rail channel to M receivers.
//
// The data rails are simply branched: every receiver sees the same W-bit
// word. The fork holds no data and is not a pipeline stage; it only
// synchronises the acknowledges. A C-element joins the M receiver acknowledges,
// so the sender sees its acknowledge rise only after every branch has taken
// the DATA token and fall only after every branch has taken the NULL spacer.
// Branching of data and joining of acknowledges follow the document; the reset
// value INIT of the join (it must equal the receivers' acknowledges at reset)
// is this design's choice.
//
// Every acknowledge closes a loop through C-elements (latches); the latch and
// combinational-loop warnings tools give for this block are these handshake
// loops and are intended.
module gtl_fork
  import gtl_pkg::*;
#(
  parameter int unsigned M    = 2,
  parameter int unsigned W    = 1,
  parameter bit          INIT = 1'b0
) (
  input  logic                     rst_i,
  input  dr_bit_t [W-1:0]          a_i,
  output logic                     lack_o,
  output dr_bit_t [M-1:0][W-1:0]   z_o,
  input  logic    [M-1:0]          rack_i
);

  always_comb begin
    for (int m = 0; m < M; m++)
      z_o[m] = a_i;
  end

  c_element #(.N(M), .INIT(INIT)) u_ack_join (
    .rst_i (rst_i),
    .in_i  (rack_i),
    .out_o (lack_o)
  );

endmodule

// c_element: Muller C-element with N inputs and a reset value.
//
// The output copies the inputs when they all agree and holds its value
// otherwise; for two inputs this is g = x1 x2 + g (x1 + x2). It is the state
// holding cell of every quasi-delay-insensitive (QDI) stage: storage of a
// data rail, join of acknowledges and completion trees all use it.
//
// The element is written as a level-sensitive latch whose enable is "all
// inputs equal". While rst_i is high the output is forced to INIT; this reset
// path is a choice of this design (GTL stages need a defined NULL or DATA state
// at start-up). There is no clock: the output follows the inputs after the
// cell delay only.
//
// Tools list this cell as a latch and, wherever it closes a handshake, report
// a combinational loop through it; both are what a C-element is. Verilator's
// note that it finds no latch in the always_latch block, given when the cell
// sits inside a stage, does not change that: the output holds while the
// inputs disagree.
module c_element #(
  parameter int unsigned N    = 2,
  parameter bit          INIT = 1'b0
) (
  input  logic         rst_i,
  input  logic [N-1:0] in_i,
  output logic         out_o
);

  logic agree;  // all inputs equal: the latch is transparent

  assign agree = (&in_i) | ~(|in_i);

  always_latch begin
    if (rst_i)
      out_o = INIT;
    else if (agree)
      out_o = in_i[0];
  end

endmodule

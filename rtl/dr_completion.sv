// dr_completion: completion detector of a dual-rail (delay-insensitive) bus.
//
// Each dual-rail pair is complete when either rail is high, which an OR gate
// detects. A Muller C-element over all pair signals then rises once every pair
// carries DATA and falls once every pair has returned to NULL, so done_o marks
// the arrival of a whole codeword and of a whole spacer without any timing
// assumption. The OR-per-pair plus C-element structure follows the document;
// the single N-input C-element (rather than a tree of two-input ones) and the
// reset input are choices of this design.
//
// The C-element makes this block a latch; tools report it as such.
module dr_completion
  import gtl_pkg::*;
#(
  parameter int unsigned N    = 2,
  parameter bit          INIT = 1'b0
) (
  input  logic               rst_i,
  input  dr_bit_t [N-1:0]    bus_i,
  output logic               done_o
);

  logic [N-1:0] pair_valid;

  always_comb begin
    for (int i = 0; i < N; i++)
      pair_valid[i] = bus_i[i].t | bus_i[i].f;
  end

  c_element #(.N(N), .INIT(INIT)) u_join (
    .rst_i (rst_i),
    .in_i  (pair_valid),
    .out_o (done_o)
  );

endmodule

// gtl_c17: the c17 benchmark circuit (six NAND2 gates, ISCAS-85 / MCNC set)
// woven into GTL stages, used as a workload for the cell library.
//
// Netlist (node numbers as in the benchmark):
//   n10 = NAND(i1, i3)   n11 = NAND(i3, i6)
//   n16 = NAND(i2, n11)  n19 = NAND(n11, i7)
//   o22 = NAND(n10, n16) o23 = NAND(n16, n19)
// Every gate is a gtl_gate half-buffer stage; every net with two readers
// (i3, n11, n16) gets a gtl_fork that joins the readers' acknowledges. With
// BALANCE set, one buffer stage is inserted on each net that skips a logic
// level (i2 and i7 into level 2, n10 into level 3), so that all paths from an
// input to an output cross the same number of stages; this changes throughput,
// not function. Each input and output is its own dual-rail channel with its
// own acknowledge, so the environment may run them fully independently.
module gtl_c17
  import gtl_pkg::*;
#(
  parameter bit BALANCE = 1'b1
) (
  input  logic    rst_i,
  input  dr_bit_t i1, i2, i3, i6, i7,
  output logic    i1_ack, i2_ack, i3_ack, i6_ack, i7_ack,
  output dr_bit_t o22, o23,
  input  logic    o22_ack, o23_ack
);

  // level-skipping nets after optional balance buffers
  dr_bit_t i2_b, i7_b, n10_b;
  logic    i2_b_ack, i7_b_ack, n10_b_ack;
  dr_bit_t n10, n11, n16, n19;
  logic    n10_ack, n11_ack, n16_ack, n19_ack;
  dr_bit_t [1:0][0:0] i3_br, n11_br, n16_br;
  logic    [1:0]      i3_br_ack, n11_br_ack, n16_br_ack;

  if (BALANCE) begin : g_bal
    gtl_gate #(.N(1), .FUNC(GF_BUF)) u_b2 (
      .rst_i(rst_i), .a_i(i2), .lack_o(i2_ack), .z_o(i2_b), .rack_i(i2_b_ack));
    gtl_gate #(.N(1), .FUNC(GF_BUF)) u_b7 (
      .rst_i(rst_i), .a_i(i7), .lack_o(i7_ack), .z_o(i7_b), .rack_i(i7_b_ack));
    gtl_gate #(.N(1), .FUNC(GF_BUF)) u_b10 (
      .rst_i(rst_i), .a_i(n10), .lack_o(n10_ack), .z_o(n10_b), .rack_i(n10_b_ack));
  end else begin : g_nobal
    assign i2_b = i2;   assign i2_ack  = i2_b_ack;
    assign i7_b = i7;   assign i7_ack  = i7_b_ack;
    assign n10_b = n10; assign n10_ack = n10_b_ack;
  end

  gtl_fork #(.M(2)) u_f3 (
    .rst_i(rst_i), .a_i(i3), .lack_o(i3_ack), .z_o(i3_br), .rack_i(i3_br_ack));

  gtl_gate #(.N(2), .FUNC(GF_NAND)) u_g10 (
    .rst_i(rst_i), .a_i({i3_br[0][0], i1}), .lack_o(i3_br_ack[0]), .z_o(n10), .rack_i(n10_ack));
  assign i1_ack = i3_br_ack[0];

  gtl_gate #(.N(2), .FUNC(GF_NAND)) u_g11 (
    .rst_i(rst_i), .a_i({i6, i3_br[1][0]}), .lack_o(i3_br_ack[1]), .z_o(n11), .rack_i(n11_ack));
  assign i6_ack = i3_br_ack[1];

  gtl_fork #(.M(2)) u_f11 (
    .rst_i(rst_i), .a_i(n11), .lack_o(n11_ack), .z_o(n11_br), .rack_i(n11_br_ack));

  gtl_gate #(.N(2), .FUNC(GF_NAND)) u_g16 (
    .rst_i(rst_i), .a_i({n11_br[0][0], i2_b}), .lack_o(n11_br_ack[0]), .z_o(n16), .rack_i(n16_ack));
  assign i2_b_ack = n11_br_ack[0];

  gtl_gate #(.N(2), .FUNC(GF_NAND)) u_g19 (
    .rst_i(rst_i), .a_i({i7_b, n11_br[1][0]}), .lack_o(n11_br_ack[1]), .z_o(n19), .rack_i(n19_ack));
  assign i7_b_ack = n11_br_ack[1];

  gtl_fork #(.M(2)) u_f16 (
    .rst_i(rst_i), .a_i(n16), .lack_o(n16_ack), .z_o(n16_br), .rack_i(n16_br_ack));

  gtl_gate #(.N(2), .FUNC(GF_NAND)) u_g22 (
    .rst_i(rst_i), .a_i({n16_br[0][0], n10_b}), .lack_o(n16_br_ack[0]), .z_o(o22), .rack_i(o22_ack));
  assign n10_b_ack = n16_br_ack[0];

  gtl_gate #(.N(2), .FUNC(GF_NAND)) u_g23 (
    .rst_i(rst_i), .a_i({n19, n16_br[1][0]}), .lack_o(n16_br_ack[1]), .z_o(o23), .rack_i(o23_ack));
  assign n19_ack = n16_br_ack[1];

endmodule

// gtl_pkg: types shared by the Gate Transfer Level (GTL) cells.
//
// A GTL design carries every Boolean signal on two wires (dual-rail):
// rail t (".1") is high for a logic 1, rail f (".0") for a logic 0, and both
// low is the spacer NULL that separates consecutive data tokens. Both rails
// high never occurs. The gate function list covers the unate cells a dual-rail
// expansion produces: rail t of a cell computes f, rail f computes f'.
package gtl_pkg;

  // One dual-rail bit. {t,f} = 2'b10 is DATA 1, 2'b01 is DATA 0, 2'b00 is NULL.
  typedef struct packed {
    logic t;
    logic f;
  } dr_bit_t;

  localparam dr_bit_t DR_NULL = '{t: 1'b0, f: 1'b0};
  localparam dr_bit_t DR_ZERO = '{t: 1'b0, f: 1'b1};
  localparam dr_bit_t DR_ONE  = '{t: 1'b1, f: 1'b0};

  // Function F of a GTL gate.
  typedef enum logic [2:0] {
    GF_BUF  = 3'd0,  // buffer stage, input 0 only (no logic, pipeline slack)
    GF_INV  = 3'd1,  // inverter stage, input 0 only (rails swapped)
    GF_AND  = 3'd2,
    GF_OR   = 3'd3,
    GF_NAND = 3'd4,
    GF_NOR  = 3'd5
  } gate_func_e;

  function automatic dr_bit_t dr_encode(input logic b);
    return b ? DR_ONE : DR_ZERO;
  endfunction

  function automatic logic dr_is_data(input dr_bit_t d);
    return d.t ^ d.f;
  endfunction

endpackage

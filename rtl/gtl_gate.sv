// gtl_gate: one GTL gate, a dual-rail half-buffer (HB) pipeline stage.
//
// A gate of the single-rail netlist becomes a pipeline stage of its own. The
// stage has four parts:
//   F       - the function, expanded to dual rail: rail t computes f from the
//             t rails of the inputs and rail f computes f' from the f rails
//             (for AND: z.t = &a.t, z.f = |a.f). Only monotonic, unate logic.
//   Storage - one C-element per output rail. It joins the F rail with the
//             enable ~rack_i, so a DATA result is latched only while the next
//             stage waits for DATA and is cleared to NULL only after the next
//             stage has acknowledged and the inputs have returned to NULL.
//   CD      - completion detection of the output pair (OR of the two rails).
//   ACK     - a C-element joining the input completion (the join of the
//             input channels' requests, see dr_completion) with CD; its output
//             is the acknowledge lack_o to all input channels.
// The requests travel on the data rails themselves (data driven style), so
// there are no separate req wires. Four-phase protocol on every channel:
// DATA arrives, ack rises, NULL arrives, ack falls. The stage holds half a
// token; two stages in a row hold one (see gtl_full_buffer).
//
// Reset: while rst_i is high the output is NULL (INIT_TOKEN = 0) or holds the
// DATA token INIT_VALUE (INIT_TOKEN = 1), and lack_o is INIT_TOKEN. A stage
// with an initial token must have NULL inputs at reset. The structure of F,
// Storage, CD and ACK follows the document's static GTL template; the data
// driven request encoding, the exact ACK join and the reset scheme are this
// design's choices. Circuit warnings about latches and combinational loops are
// expected: the C-elements are latches and every handshake is a loop.
module gtl_gate
  import gtl_pkg::*;
#(
  parameter int unsigned N          = 2,
  parameter gate_func_e  FUNC       = GF_AND,
  parameter bit          INIT_TOKEN = 1'b0,
  parameter bit          INIT_VALUE = 1'b0
) (
  input  logic            rst_i,
  // input channels (one shared acknowledge: the join)
  input  dr_bit_t [N-1:0] a_i,
  output logic            lack_o,
  // output channel
  output dr_bit_t         z_o,
  input  logic            rack_i
);

  localparam dr_bit_t ResetZ = INIT_TOKEN ? dr_encode(INIT_VALUE) : DR_NULL;

  logic [N-1:0] in_t, in_f;
  logic         f_t, f_f;
  logic         in_done, out_done;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      in_t[i] = a_i[i].t;
      in_f[i] = a_i[i].f;
    end
  end

  // F: dual-rail expansion of the gate function
  always_comb begin
    unique case (FUNC)
      GF_BUF:  begin f_t = in_t[0];  f_f = in_f[0];  end
      GF_INV:  begin f_t = in_f[0];  f_f = in_t[0];  end
      GF_AND:  begin f_t = &in_t;    f_f = |in_f;    end
      GF_OR:   begin f_t = |in_t;    f_f = &in_f;    end
      GF_NAND: begin f_t = |in_f;    f_f = &in_t;    end
      GF_NOR:  begin f_t = &in_f;    f_f = |in_t;    end
      default: begin f_t = 1'b0;     f_f = 1'b0;     end
    endcase
  end

  // Storage: one C-element per rail, enabled while the next stage is ready
  c_element #(.N(2), .INIT(ResetZ.t)) u_store_t (
    .rst_i (rst_i),
    .in_i  ({f_t, ~rack_i}),
    .out_o (z_o.t)
  );

  c_element #(.N(2), .INIT(ResetZ.f)) u_store_f (
    .rst_i (rst_i),
    .in_i  ({f_f, ~rack_i}),
    .out_o (z_o.f)
  );

  // CD: completion of the output pair
  assign out_done = z_o.t | z_o.f;

  // join of the input channels: completion of the whole input bus
  dr_completion #(.N(N), .INIT(1'b0)) u_in_cd (
    .rst_i  (rst_i),
    .bus_i  (a_i),
    .done_o (in_done)
  );

  // ACK: acknowledge once inputs and output agree (both DATA or both NULL)
  c_element #(.N(2), .INIT(INIT_TOKEN)) u_ack (
    .rst_i (rst_i),
    .in_i  ({in_done, out_done}),
    .out_o (lack_o)
  );

  // a dual-rail pair never has both rails high
  always_comb begin
    if (!rst_i) assert (!(z_o.t && z_o.f)) else $error("gtl_gate: both output rails high");
  end

endmodule

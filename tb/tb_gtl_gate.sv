// tb_gtl_gate: checks GTL gate stages (dual-rail half buffers).
//
// Four two-input stages (AND, OR, NAND, NOR) share one input channel; the
// sender drives the two input pairs in random order and waits for the join of
// their four acknowledges, as a fork would. Each stage has its own receiver
// with random delays. A fifth, single-input inverter stage starts with a DATA
// token (value 1) to check the initialised-stage reset. Checks:
//   - each output token equals the gate function of the input token;
//   - an acknowledge rises only when both input pairs and the output are DATA
//     (input completeness of the acknowledge);
//   - the inverter delivers its initial token first, then the inverted inputs.
`timescale 1ns/1ps
module tb_gtl_gate;
  import gtl_pkg::*;
  localparam int NG = 4;
  localparam int NTOK = 300;
  localparam gate_func_e FUNCS [NG] = '{GF_AND, GF_OR, GF_NAND, GF_NOR};

  logic            rst = 1'b1;
  dr_bit_t [1:0]   a;
  logic [NG-1:0]   lack, rack;
  dr_bit_t [NG-1:0] z;
  logic [1:0]      stim_a [NTOK];
  int checks = 0, failures = 0;
  int rx_done = 0;

  // inverter stage with an initial token
  dr_bit_t b, zi;
  logic    lack_i, rack_i;
  logic    stim_b [NTOK];

  function automatic logic ref_f(gate_func_e f, logic [1:0] v);
    case (f)
      GF_AND:  return &v;
      GF_OR:   return |v;
      GF_NAND: return ~&v;
      GF_NOR:  return ~|v;
      default: return 1'b0;
    endcase
  endfunction

  task automatic rand_delay(int maxd);
    #($urandom_range(maxd, 0) * 1ns + 0.5ns);
  endtask

  for (genvar g = 0; g < NG; g++) begin : g_dut
    gtl_gate #(.N(2), .FUNC(FUNCS[g])) u_gate (
      .rst_i(rst), .a_i(a), .lack_o(lack[g]), .z_o(z[g]), .rack_i(rack[g]));

    // acknowledge only after a complete input word and a valid output
    always @(posedge lack[g]) begin
      checks++;
      if (!((a[0].t || a[0].f) && (a[1].t || a[1].f) && (z[g].t || z[g].f))) begin
        failures++;
        $display("gate %0d acknowledged an incomplete token at %t", g, $time);
      end
    end

    initial begin
      rack[g] = 1'b0;
      wait (rst == 1'b0);
      for (int k = 0; k < NTOK; k++) begin
        wait (z[g].t || z[g].f);
        rand_delay(3);
        checks++;
        if (z[g].t !== ref_f(FUNCS[g], stim_a[k])) begin
          failures++;
          $display("gate %0d token %0d: got %0b expected %0b", g, k, z[g].t,
                   ref_f(FUNCS[g], stim_a[k]));
        end
        rack[g] = 1'b1;
        wait (z[g] == DR_NULL);
        rand_delay(3);
        rack[g] = 1'b0;
      end
      rx_done++;
    end
  end

  gtl_gate #(.N(1), .FUNC(GF_INV), .INIT_TOKEN(1'b1), .INIT_VALUE(1'b1)) u_inv (
    .rst_i(rst), .a_i(b), .lack_o(lack_i), .z_o(zi), .rack_i(rack_i));

  // sender of the shared two-input channel
  initial begin
    for (int k = 0; k < NTOK; k++) stim_a[k] = 2'($urandom);
    a = '0;
    #5 rst = 1'b0;
    for (int k = 0; k < NTOK; k++) begin
      int first;
      first = $urandom_range(1, 0);
      wait (lack == '0);
      rand_delay(2);
      a[first] = dr_encode(stim_a[k][first]);
      rand_delay(2);
      a[1-first] = dr_encode(stim_a[k][1-first]);
      wait (lack == '1);
      rand_delay(2);
      a[first] = DR_NULL;
      rand_delay(2);
      a[1-first] = DR_NULL;
    end
  end

  // inverter: sender and receiver
  initial begin
    for (int k = 0; k < NTOK; k++) stim_b[k] = 1'($urandom);
    b = DR_NULL;
    wait (rst == 1'b0);
    for (int k = 0; k < NTOK; k++) begin
      wait (lack_i == 1'b0);
      rand_delay(2);
      b = dr_encode(stim_b[k]);
      wait (lack_i == 1'b1);
      rand_delay(2);
      b = DR_NULL;
    end
  end

  initial begin
    rack_i = 1'b0;
    #1;
    checks++;
    if (zi != DR_ONE) begin failures++; $display("inverter reset token missing"); end
    wait (rst == 1'b0);
    for (int k = 0; k <= NTOK; k++) begin
      logic exp_v;
      exp_v = (k == 0) ? 1'b1 : ~stim_b[k-1];
      wait (zi.t || zi.f);
      rand_delay(3);
      checks++;
      if (zi.t !== exp_v) begin
        failures++;
        $display("inverter token %0d: got %0b expected %0b", k, zi.t, exp_v);
      end
      if (k == NTOK) break;
      rack_i = 1'b1;
      wait (zi == DR_NULL);
      rand_delay(3);
      rack_i = 1'b0;
    end
    rx_done++;
  end

  initial begin
    fork
      wait (rx_done == NG + 1);
      #1ms;
    join_any
    if (rx_done != NG + 1) begin failures++; $display("watchdog expired"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

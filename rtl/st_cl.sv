// Self-timed double-rail combinational logic (minterm form).
//
// Computes NO Boolean functions of NI three-valued inputs on double-rail
// lines, with the self-timed behaviour the state machine relies on: the
// outputs stay undefined until every input is defined, then take the
// functions' values; they stay defined until every input is undefined, then
// return to undefined. Outputs therefore also serve as completion signals.
//
// Structure: one NI-input C-element per input minterm j, fed by rail
// x[i].r1 where bit i of j is 1 and x[i].r0 where it is 0. Exactly one
// minterm fires once all inputs are defined; all minterms fall once all
// inputs are undefined. Output rail f[o].r1 is the OR of the minterms whose
// TABLE entry has bit o set, f[o].r0 the OR of the others. The design takes
// this block's internals from elsewhere and states only its behaviour; the
// minterm form here is the simplest circuit with that behaviour.
//
// TABLE[j] holds the NO output bits for input vector j, where bit i of j is
// the value of x[i]. reset clears every minterm C-element (outputs become
// undefined). Deferred assertions check that no input or output line ever
// has both rails high. The C-element loops are storage; their loop warnings
// stand.
module st_cl
  import st_pkg::*;
#(
  parameter int NI = TL_N + TL_K,
  parameter int NO = TL_M + TL_K,
  parameter logic [2**NI-1:0][NO-1:0] TABLE = traffic_light_table()
) (
  input  logic         reset,
  input  dr_t [NI-1:0] x,
  output dr_t [NO-1:0] f
);

  localparam int NT = 2**NI;

  logic [NT-1:0] m;

  for (genvar j = 0; j < NT; j++) begin : g_minterm
    logic [NI-1:0] sel;
    for (genvar i = 0; i < NI; i++) begin : g_rail
      if (((j >> i) & 1) == 1) begin : g_one
        assign sel[i] = x[i].r1;
      end else begin : g_zero
        assign sel[i] = x[i].r0;
      end
    end
    c_element_n #(.N(NI)) u_c (
      .a     (sel),
      .preset(1'b0),
      .clear (reset),
      .z     (m[j])
    );
  end

  always_comb begin
    for (int o = 0; o < NO; o++) begin
      f[o] = DR_U;
      for (int j = 0; j < NT; j++) begin
        if (TABLE[j][o]) f[o].r1 = f[o].r1 | m[j];
        else             f[o].r0 = f[o].r0 | m[j];
      end
    end
  end

  // Double-rail rule on inputs and outputs, checked once settled.
  for (genvar i = 0; i < NI; i++) begin : g_chk_in
    always_comb assert final (reset || !(x[i].r1 && x[i].r0))
      else $error("st_cl: input line %0d has both rails high", i);
  end
  for (genvar o = 0; o < NO; o++) begin : g_chk_out
    always_comb assert final (reset || !(f[o].r1 && f[o].r0))
      else $error("st_cl: output line %0d has both rails high", o);
  end

endmodule

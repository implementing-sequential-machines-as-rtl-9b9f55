// Self-timed master-slave register on K double-rail lines (no clock).
//
// The register is sequenced by its data, not by a clock. Starting with all
// inputs Y undefined and the outputs y holding a defined value:
//   * when all Y become defined, line A falls, the output C-elements clear
//     and y becomes all undefined; that raises line B, which opens the input
//     C-elements, so the master lines w capture Y; when all w are defined the
//     acknowledgment W falls ("inputs may now be removed");
//   * when all Y become undefined, A rises, the output C-elements pass w to
//     y, so y becomes defined with the stored value; that lowers B, the w
//     lines return to 0, and W rises ("new inputs may be applied").
// A = NOT(all Y defined / all Y undefined detector), B is the same for y, W
// is the same for w. Input C-elements are w = C(Y, B), output C-elements are
// y = C(w, A); this structure and the phase sequence follow the design.
//
// Initialisation: while reset is high the output C-elements are preset or
// cleared so that y holds INIT (rail r1 of bit i preset when INIT[i] = 1,
// rail r0 otherwise); Y must be undefined during reset. All other cells
// settle by themselves. Which rail is preset is this design's encoding.
//
// ack_in (used when USE_ACK_IN = 1) is the acknowledgment of a successor
// stage. Its inverse is added as one more input of the W C-element, so W
// falls only after the successor has also taken its data (ack_in = 0) and
// rises only after it has also taken the spacer (ack_in = 1). Where ack_in
// enters is this design's choice.
//
// Deferred assertions check that no input or output line ever carries the
// illegal code (both rails high) outside reset.
//
// All storage is in C-element feedback loops, and the A/B lines close loops
// through the register; the combinational-loop warnings for them stand.
module st_ms
  import st_pkg::*;
#(
  parameter int           K          = 2,
  parameter logic [K-1:0] INIT       = '0,
  parameter bit           USE_ACK_IN = 1'b0
) (
  input  logic        reset,
  input  dr_t [K-1:0] Y,        // inputs (next state)
  output dr_t [K-1:0] y,        // outputs (present state)
  input  logic        ack_in,   // successor's acknowledgment
  output logic        ack_out   // W line
);

  logic        in_done, out_done, w_done;
  logic        a_line, b_line;
  dr_t [K-1:0] w;

  dr_done #(.N(K)) u_in_det  (.d(Y), .done(in_done));
  dr_done #(.N(K)) u_out_det (.d(y), .done(out_done));

  assign a_line = ~in_done;
  assign b_line = ~out_done;

  for (genvar i = 0; i < K; i++) begin : g_bit
    // master: w = C(Y, B)
    c_element u_w0 (.a(Y[i].r0), .b(b_line), .z(w[i].r0));
    c_element u_w1 (.a(Y[i].r1), .b(b_line), .z(w[i].r1));
    // slave: y = C(w, A), set to INIT by reset
    c_element_pc u_y0 (
      .a     (w[i].r0),
      .b     (a_line),
      .preset(reset & ~INIT[i]),
      .clear (reset &  INIT[i]),
      .z     (y[i].r0)
    );
    c_element_pc u_y1 (
      .a     (w[i].r1),
      .b     (a_line),
      .preset(reset &  INIT[i]),
      .clear (reset & ~INIT[i]),
      .z     (y[i].r1)
    );
  end

  // W detector over the master lines, optionally joined by ~ack_in.
  localparam int WN = USE_ACK_IN ? K + 1 : K;
  logic [WN-1:0] w_def;

  always_comb begin
    for (int i = 0; i < K; i++) w_def[i] = w[i].r1 | w[i].r0;
    if (USE_ACK_IN) w_def[WN-1] = ~ack_in;
  end

  c_element_n #(.N(WN)) u_w_det (
    .a     (w_def),
    .preset(1'b0),
    .clear (1'b0),
    .z     (w_done)
  );

  assign ack_out = ~w_done;

  // Double-rail rule: no line may have both rails high. Checked at the end
  // of each time step, once the loops have settled; not during reset.
  for (genvar i = 0; i < K; i++) begin : g_chk
    always_comb begin
      assert final (reset || !(Y[i].r1 && Y[i].r0))
        else $error("st_ms: input line %0d has both rails high", i);
      assert final (reset || !(y[i].r1 && y[i].r0))
        else $error("st_ms: output line %0d has both rails high", i);
    end
  end

endmodule

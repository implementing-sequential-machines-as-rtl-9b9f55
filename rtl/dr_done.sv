// Completion detector for a vector of double-rail lines.
//
// Each line's two rails are ORed ("this line is defined") and the N results
// feed one N-input C-element. The output goes to 1 once every line is
// defined, to 0 once every line is undefined, and holds in between. This is
// the OR-gates-into-a-C-element structure used three times in the
// master-slave register; the inversion that produces the register's A, B and
// W lines is done by the user of this module. Not reset: it settles by itself
// once its inputs are all defined or all undefined.
module dr_done
  import st_pkg::*;
#(
  parameter int N = 2
) (
  input  dr_t [N-1:0] d,
  output logic        done
);

  logic [N-1:0] line_def;

  always_comb begin
    for (int i = 0; i < N; i++) line_def[i] = d[i].r1 | d[i].r0;
  end

  c_element_n #(.N(N)) u_c (
    .a     (line_def),
    .preset(1'b0),
    .clear (1'b0),
    .z     (done)
  );

endmodule

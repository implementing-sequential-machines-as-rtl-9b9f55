// Self-timed finite state machine (top level).
//
// A self-timed combinational block (st_cl) computes the outputs O and the
// next state Y from the inputs I and the present state y; a self-timed
// master-slave register (st_ms) feeds Y back to y. No clock: one state
// transition is one four-phase cycle of the inputs.
//   1. ack_out = 1, I all undefined, y holds the present state, O and Y are
//      undefined.
//   2. The environment makes every input defined (in any order). Only when
//      the last one arrives do O and Y become defined. The register stores
//      Y, makes y undefined and lowers ack_out.
//   3. The environment removes every input. O and Y stay defined until the
//      last input is gone (the logic block still sees no all-spacer input
//      until then), then become undefined. The register then presents the
//      stored next state on y and raises ack_out.
// O may depend on state and inputs (Mealy) or on state only (Moore); both are
// just columns of TABLE. The structure (logic block plus master-slave
// register, the W line of the register as acknowledgment, reset to the
// register's output C-elements and to every C-element of the logic block)
// follows the design.
//
// TABLE row index is {y, I} (I in the low N bits), row content is {Y, O}
// (O in the low M bits). The default table, a traffic-light controller
// (st_pkg), and the default sizes belong to that example, not to the method.
// With USE_ACK_IN = 1 ack_out also waits for ack_in, the ack_out of a
// successor stage fed by O (a "train" of machines); for a stand-alone
// machine set USE_ACK_IN = 0, which ignores ack_in. reset must be held, with I
// undefined, long enough for all cells to settle. The loops through the
// C-elements and through the state feedback are the circuit; their
// combinational-loop warnings stand.
module st_fsm
  import st_pkg::*;
#(
  parameter int                         N          = TL_N,
  parameter int                         M          = TL_M,
  parameter int                         K          = TL_K,
  parameter logic [K-1:0]               INIT       = HG,
  parameter logic [2**(N+K)-1:0][M+K-1:0] TABLE    = traffic_light_table(),
  parameter bit                         USE_ACK_IN = 1'b1
) (
  input  logic        reset,
  input  dr_t [N-1:0] I,
  output dr_t [M-1:0] O,
  input  logic        ack_in,
  output logic        ack_out
);

  dr_t [K-1:0]   ps;      // present state y
  dr_t [K-1:0]   ns;      // next state Y
  dr_t [N+K-1:0] cl_in;
  dr_t [M+K-1:0] cl_out;

  assign cl_in   = {ps, I};
  assign {ns, O} = cl_out;

  st_cl #(
    .NI   (N + K),
    .NO   (M + K),
    .TABLE(TABLE)
  ) u_cl (
    .reset(reset),
    .x    (cl_in),
    .f    (cl_out)
  );

  st_ms #(
    .K         (K),
    .INIT      (INIT),
    .USE_ACK_IN(USE_ACK_IN)
  ) u_ms (
    .reset  (reset),
    .Y      (ns),
    .y      (ps),
    .ack_in (ack_in),
    .ack_out(ack_out)
  );

endmodule

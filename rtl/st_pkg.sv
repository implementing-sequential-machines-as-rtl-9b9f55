// Shared types and constants for the self-timed (double-rail) state machine.
//
// Every three-valued line {0, 1, U} is carried on two wires. Rail r0 high
// means the value 0, rail r1 high means the value 1, both low means
// "undefined" (U, the spacer between two data values). Both rails high is not
// a legal code and never occurs in a correctly operating circuit. The choice
// of two wires per line follows the double-rail scheme of the design; the bit
// order inside the struct is this package's own choice.
//
// The package also holds the default state table of st_fsm: a four-state
// traffic-light controller (highway / farm road), the classic example used to
// show the state-machine method. The table below is the textbook version of
// that controller and is this design's own choice of example.
package st_pkg;

  // One double-rail line.
  typedef struct packed {
    logic r1;  // high: value 1
    logic r0;  // high: value 0
  } dr_t;

  localparam dr_t DR_U    = '{r1: 1'b0, r0: 1'b0};
  localparam dr_t DR_ZERO = '{r1: 1'b0, r0: 1'b1};
  localparam dr_t DR_ONE  = '{r1: 1'b1, r0: 1'b0};

  // Encode a Boolean value as a defined double-rail line.
  function automatic dr_t dr_enc(input logic v);
    return v ? DR_ONE : DR_ZERO;
  endfunction

  // A line is defined when exactly one of its rails is high.
  function automatic logic dr_defined(input dr_t d);
    return d.r1 ^ d.r0;
  endfunction

  // ---------------------------------------------------------------------
  // Default example: traffic-light controller.
  //   inputs  I = {C, TL, TS}      car waiting on the farm road,
  //                                long timeout, short timeout
  //   outputs O = {ST, HL[1:0], FL[1:0]}
  //                                start-timer pulse, highway light,
  //                                farm-road light
  //   state   y = 2 bits           HG, HY, FG, FY (Gray coded)
  // ---------------------------------------------------------------------
  localparam int TL_N = 3;
  localparam int TL_M = 5;
  localparam int TL_K = 2;

  typedef enum logic [1:0] {
    HG = 2'b00,  // highway green, farm red
    HY = 2'b01,  // highway yellow, farm red
    FG = 2'b11,  // farm green, highway red
    FY = 2'b10   // farm yellow, highway red
  } tl_state_e;

  typedef enum logic [1:0] {
    GREEN  = 2'b00,
    YELLOW = 2'b01,
    RED    = 2'b10
  } tl_color_e;

  // Table row index is {y, I}; each row holds {Y, O}.
  typedef logic [2**(TL_N+TL_K)-1:0][TL_M+TL_K-1:0] tl_table_t;

  function automatic tl_table_t traffic_light_table();
    tl_table_t t;
    for (int idx = 0; idx < 2**(TL_N+TL_K); idx++) begin
      logic [1:0] ps, ns;
      logic       c, tl, ts, st;
      logic [1:0] hl, fl;
      ps = 2'(idx >> TL_N);
      c  = idx[2];
      tl = idx[1];
      ts = idx[0];
      ns = ps;
      st = 1'b0;
      hl = RED;
      fl = RED;
      case (ps)
        HG: begin
          hl = GREEN;
          if (c && tl) begin ns = HY; st = 1'b1; end
        end
        HY: begin
          hl = YELLOW;
          if (ts) begin ns = FG; st = 1'b1; end
        end
        FG: begin
          fl = GREEN;
          if (!c || tl) begin ns = FY; st = 1'b1; end
        end
        default: begin  // FY
          fl = YELLOW;
          if (ts) begin ns = HG; st = 1'b1; end
        end
      endcase
      t[idx] = {ns, st, hl, fl};
    end
    return t;
  endfunction

endpackage

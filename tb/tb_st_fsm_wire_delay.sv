// Wire-delay testbench for the self-timed state machine loop.
//
// The machine of st_fsm is rebuilt here from st_cl (the traffic-light table)
// and st_ms, but every rail of the next-state wires (logic block to
// register) and of the present-state wires (register to logic block) passes
// through a transport delay drawn at random, 1 to 15 time units, for every
// transition on that rail. The environment also applies and removes the
// inputs with random gaps. The machine must still step through the same
// states and produce the same outputs as a model written here, because it
// relies on completion detection, not on timing. At each acknowledgment the
// outputs and the register's present state are checked.
module tb_st_fsm_wire_delay;
  import st_pkg::*;
  localparam int NTRANS = 300;

  logic      reset, ack;
  dr_t [2:0] I;
  dr_t [4:0] O;
  dr_t [1:0] ns_cl, ns_ms, ps_ms, ps_cl;
  dr_t [6:0] cl_out;
  int checks = 0, failures = 0, n_late = 0, changes = 0;

  st_cl u_cl (.reset(reset), .x({ps_cl, I}), .f(cl_out));
  assign {ns_cl, O} = cl_out;
  st_ms #(.K(2), .INIT(HG), .USE_ACK_IN(1'b0)) u_ms (
    .reset(reset), .Y(ns_ms), .y(ps_ms), .ack_in(1'b1), .ack_out(ack));

  // per-rail random transport delays on the feedback wires
  for (genvar i = 0; i < 2; i++) begin : g_wire
    always @(ns_cl[i].r0) ns_ms[i].r0 <= #($urandom_range(1, 15)) ns_cl[i].r0;
    always @(ns_cl[i].r1) ns_ms[i].r1 <= #($urandom_range(1, 15)) ns_cl[i].r1;
    always @(ps_ms[i].r0) ps_cl[i].r0 <= #($urandom_range(1, 15)) ps_ms[i].r0;
    always @(ps_ms[i].r1) ps_cl[i].r1 <= #($urandom_range(1, 15)) ps_ms[i].r1;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  function automatic logic [6:0] ref_step(logic [1:0] s, logic car, logic tlong, logic tshort);
    unique case (s)
      2'b00:   return (car && tlong) ? 7'b01_1_00_10 : 7'b00_0_00_10;
      2'b01:   return tshort         ? 7'b11_1_01_10 : 7'b01_0_01_10;
      2'b11:   return (!car || tlong)? 7'b10_1_10_00 : 7'b11_0_10_00;
      default: return tshort         ? 7'b00_1_10_01 : 7'b10_0_10_01;
    endcase
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] s;
    I = '0;
    ns_ms = '0;
    ps_cl = {DR_ZERO, DR_ZERO};
    reset = 1'b1;
    #50;
    reset = 1'b0;
    #50;
    s = HG;
    check(ack && ps_ms[0] == DR_ZERO && ps_ms[1] == DR_ZERO, "reset state HG");
    for (int n = 0; n < NTRANS; n++) begin
      logic [2:0] v;
      logic [6:0] exp;
      v = 3'($urandom);
      if ($urandom_range(2) == 0) v = (s == HG) ? 3'b110 : (s == FG) ? 3'b010 : 3'b001;
      exp = ref_step(s, v[2], v[1], v[0]);
      for (int k = 0; k < 3; k++) begin
        I[(k + n) % 3] = dr_enc(v[(k + n) % 3]);
        #($urandom_range(0, 4));
      end
      // present state still travelling to the logic block: it must wait
      if (ps_cl != ps_ms) n_late++;
      wait (ack == 1'b0);
      for (int o = 0; o < 5; o++)
        check(O[o] == dr_enc(exp[o]), $sformatf("output %0d, state %b input %b", o, s, v));
      for (int k = 0; k < 3; k++) begin
        I[(k + 2 * n) % 3] = DR_U;
        #($urandom_range(0, 4));
      end
      wait (ack == 1'b1);
      check(ps_ms[0] == dr_enc(exp[5]) && ps_ms[1] == dr_enc(exp[6]),
            $sformatf("next state %b", exp[6:5]));
      check(O == '0, "outputs undefined after spacer");
      if (exp[6:5] != s) changes++;
      s = exp[6:5];
    end
    if (n_late == 0 || changes == 0) begin
      failures++;
      $display("coverage: late present state %0d, changes %0d", n_late, changes);
    end
    $display("inputs applied before the present state had arrived: %0d of %0d", n_late, NTRANS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

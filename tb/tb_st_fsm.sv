// End-to-end testbench for st_fsm at its default parameters: the
// traffic-light controller (inputs {C, TL, TS}, outputs {ST, HL, FL},
// 2 state bits) with the ack-in line in use.
//
// The testbench is the machine's environment. For each transition it waits
// for ack_out = 1, makes the inputs defined one at a time in random order
// (outputs must stay undefined and the present state defined until the last
// one), waits for ack_out = 0 and compares the outputs with a reference model
// written here, then removes the inputs one at a time (outputs must stay
// defined until the last) and waits for ack_out = 1, after which the present
// state must equal the reference next state. A behavioural successor stage
// drives ack_in: it lowers it some time after the outputs become all
// defined and raises it some time after they become all undefined; ack_out
// must never change before ack_in allows it. The run also resets the machine
// from a state other than the initial one. Each mechanism (partial inputs,
// partial removal, ack-in stall, every state, every state change, staying in
// a state, reset) is counted, and one that never happened is a failure.
module tb_st_fsm;
  import st_pkg::*;
  localparam int NTRANS = 400;

  logic       reset, ack_in, ack_out;
  dr_t [2:0]  I;
  dr_t [4:0]  O;
  int checks = 0, failures = 0;
  int n_partial_in = 0, n_partial_out = 0, n_stall = 0, n_stay = 0, n_reset = 0;
  int n_visit[4];
  int n_change[4];
  bit in_reset;

  st_fsm dut (.reset(reset), .I(I), .O(O), .ack_in(ack_in), .ack_out(ack_out));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  function automatic logic o_undef(dr_t [4:0] o);
    for (int i = 0; i < 5; i++) if (o[i] != DR_U) return 1'b0;
    return 1'b1;
  endfunction
  function automatic logic o_defined(dr_t [4:0] o);
    for (int i = 0; i < 5; i++) if (!(o[i].r1 ^ o[i].r0)) return 1'b0;
    return 1'b1;
  endfunction
  function automatic logic o_is(dr_t [4:0] o, logic [4:0] v);
    for (int i = 0; i < 5; i++) if (o[i] != dr_enc(v[i])) return 1'b0;
    return 1'b1;
  endfunction
  function automatic logic ps_undef();
    return dut.ps[0] == DR_U && dut.ps[1] == DR_U;
  endfunction
  function automatic logic ps_is(logic [1:0] s);
    return dut.ps[0] == dr_enc(s[0]) && dut.ps[1] == dr_enc(s[1]);
  endfunction

  // reference: {next state, ST, HL, FL}; HL/FL: 00 green, 01 yellow, 10 red
  function automatic logic [6:0] ref_step(logic [1:0] s, logic car, logic tlong, logic tshort);
    unique case (s)
      2'b00:   return (car && tlong) ? 7'b01_1_00_10 : 7'b00_0_00_10;  // HG
      2'b01:   return tshort         ? 7'b11_1_01_10 : 7'b01_0_01_10;  // HY
      2'b11:   return (!car || tlong)? 7'b10_1_10_00 : 7'b11_0_10_00;  // FG
      default: return tshort         ? 7'b00_1_10_01 : 7'b10_0_10_01;  // FY
    endcase
  endfunction

  // successor stage: takes O, acknowledges with ack_in after a random delay
  initial begin
    ack_in = 1'b1;
    forever begin
      while (!o_defined(O)) @(O);
      #($urandom_range(1, 40));
      // stall: the register already holds its data, ack_out waits for ack_in
      if (&dut.u_ms.w_def[1:0] && ack_out) n_stall++;
      ack_in = 1'b0;
      while (!o_undef(O)) @(O);
      #($urandom_range(1, 40));
      if (!(|dut.u_ms.w_def[1:0]) && !ack_out) n_stall++;
      ack_in = 1'b1;
    end
  end

  // ack_out may only follow ack_in
  always @(negedge ack_out) if (!in_reset) check(ack_in == 1'b0, "ack_out fell before ack_in");
  always @(posedge ack_out) if (!in_reset) check(ack_in == 1'b1, "ack_out rose before ack_in");


  initial begin
    #20000000;
    failures++;
    $display("watchdog expired: I=%b O=%b ps=%b ns=%b ack_in=%b ack_out=%b w=%b a=%b b=%b", I, O, dut.ps, dut.ns, ack_in, ack_out, dut.u_ms.w, dut.u_ms.a_line, dut.u_ms.b_line);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    in_reset = 1'b1;
    I = '0;
    wait (ack_in == 1'b1);
    reset = 1'b1;
    #20;
    reset = 1'b0;
    #20;
    in_reset = 1'b0;
    n_reset++;
    check(ps_is(HG), "reset: present state is HG");
    check(ack_out && o_undef(O), "reset: ack_out = 1, outputs undefined");
  endtask

  initial begin
    logic [1:0] s;
    reset = 1'b0;
    in_reset = 1'b1;
    do_reset();
    s = HG;
    for (int n = 0; n < NTRANS; n++) begin
      logic [2:0] v;
      logic [6:0] exp;
      int order[3];
      if (n == NTRANS / 2) begin
        check(s != HG || n_visit[1] > 0, "mid-run reset from a visited state");
        do_reset();
        s = HG;
      end
      wait (ack_out == 1'b1);
      #1;
      check(o_undef(O), "E0: outputs undefined");
      check(ps_is(s), $sformatf("present state %b", s));
      n_visit[s]++;
      // mostly random inputs; sometimes the ones that force a change
      v = 3'($urandom);
      if ($urandom_range(3) == 0) v = (s == HG) ? 3'b110 : (s == FG) ? 3'b010 : 3'b001;
      exp = ref_step(s, v[2], v[1], v[0]);
      order = '{0, 1, 2};
      for (int i = 2; i > 0; i--) begin
        int j, t;
        j = $urandom_range(i);
        t = order[i]; order[i] = order[j]; order[j] = t;
      end
      for (int k = 0; k < 3; k++) begin
        I[order[k]] = dr_enc(v[order[k]]);
        #($urandom_range(1, 5));
        if (k < 2) begin
          check(o_undef(O) && ps_is(s) && ack_out, "S1: outputs undefined, state held");
          n_partial_in++;
        end
      end
      wait (ack_out == 1'b0);
      #1;
      check(o_is(O, exp[4:0]), $sformatf("S2: outputs for state %b input %b", s, v));
      check(ps_undef(), "S2: present state undefined");
      for (int k = 0; k < 3; k++) begin
        I[order[(k + 1) % 3]] = DR_U;
        #($urandom_range(1, 5));
        if (k < 2) begin
          check(o_is(O, exp[4:0]) && ps_undef() && !ack_out, "S3: outputs held");
          n_partial_out++;
        end
      end
      wait (ack_out == 1'b1);
      #1;
      check(o_undef(O), "S4: outputs undefined");
      check(ps_is(exp[6:5]), $sformatf("S4: next state %b", exp[6:5]));
      if (exp[6:5] == s) n_stay++; else n_change[s]++;
      s = exp[6:5];
    end
    for (int i = 0; i < 4; i++) begin
      if (n_visit[i] == 0) begin failures++; $display("coverage: state %0d never visited", i); end
      if (n_change[i] == 0) begin failures++; $display("coverage: no change from state %0d", i); end
    end
    if (n_partial_in == 0 || n_partial_out == 0 || n_stall == 0 || n_stay == 0 || n_reset < 2) begin
      failures++;
      $display("coverage: partial_in=%0d partial_out=%0d stall=%0d stay=%0d reset=%0d",
               n_partial_in, n_partial_out, n_stall, n_stay, n_reset);
    end
    $display("mechanisms: partial_in=%0d partial_out=%0d ack_in_stall=%0d stay=%0d reset=%0d",
             n_partial_in, n_partial_out, n_stall, n_stay, n_reset);
    $display("states visited HG=%0d HY=%0d FG=%0d FY=%0d; changes from HG=%0d HY=%0d FG=%0d FY=%0d",
             n_visit[0], n_visit[1], n_visit[3], n_visit[2],
             n_change[0], n_change[1], n_change[3], n_change[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

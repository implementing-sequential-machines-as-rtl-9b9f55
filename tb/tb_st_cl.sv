// Self-checking testbench for st_cl, the self-timed combinational block.
// u_small computes three functions of three inputs (parity, majority and a
// constant 0); u_tl is the default block, the traffic-light table. For
// random input vectors, inputs are made defined one line at a time (outputs
// must stay undefined until the last), then the outputs are compared with
// values computed here; inputs are then removed one line at a time (outputs
// must stay defined until the last), after which all outputs must be
// undefined. Reset is checked to clear every output.
module tb_st_cl;
  import st_pkg::*;
  localparam int SETTLE = 3;

  // ---- small instance: f0 = x0^x1^x2, f1 = maj(x0,x1,x2), f2 = 0
  localparam int SI = 3, SO = 3;
  function automatic logic [2**SI-1:0][SO-1:0] small_table();
    logic [2**SI-1:0][SO-1:0] t;
    for (int j = 0; j < 2**SI; j++) begin
      logic a, b, c;
      {c, b, a} = 3'(j);
      t[j] = {1'b0, (a & b) | (a & c) | (b & c), a ^ b ^ c};
    end
    return t;
  endfunction

  logic reset;
  dr_t [SI-1:0] xs;
  dr_t [SO-1:0] fs;
  dr_t [4:0]    xt;
  dr_t [6:0]    ft;
  int checks = 0, failures = 0;
  int n_partial = 0;

  st_cl #(.NI(SI), .NO(SO), .TABLE(small_table())) u_small (
    .reset(reset), .x(xs), .f(fs));
  st_cl u_tl (.reset(reset), .x(xt), .f(ft));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  function automatic logic undef7(dr_t [6:0] v);
    for (int i = 0; i < 7; i++) if (v[i] != DR_U) return 1'b0;
    return 1'b1;
  endfunction
  function automatic logic undef3(dr_t [2:0] v);
    for (int i = 0; i < 3; i++) if (v[i] != DR_U) return 1'b0;
    return 1'b1;
  endfunction

  // traffic light reference: returns {next state, ST, HL, FL}
  function automatic logic [6:0] tl_ref(logic [1:0] s, logic car, logic tlong, logic tshort);
    logic [1:0] hl, fl, ns;
    logic st;
    if (s == 2'b00) begin          // HG
      hl = 2'b00; fl = 2'b10;
      st = car & tlong;
      ns = st ? 2'b01 : s;
    end else if (s == 2'b01) begin // HY
      hl = 2'b01; fl = 2'b10;
      st = tshort;
      ns = st ? 2'b11 : s;
    end else if (s == 2'b11) begin // FG
      hl = 2'b10; fl = 2'b00;
      st = ~car | tlong;
      ns = st ? 2'b10 : s;
    end else begin                 // FY
      hl = 2'b10; fl = 2'b01;
      st = tshort;
      ns = st ? 2'b00 : s;
    end
    return {ns, st, hl, fl};
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    xs = '0; xt = '0;
    reset = 1'b1;
    #SETTLE;
    check(undef3(fs) && undef7(ft), "reset: outputs undefined");
    reset = 1'b0;
    #SETTLE;
    check(undef3(fs) && undef7(ft), "after reset: outputs undefined");

    for (int n = 0; n < 200; n++) begin
      logic [2:0] v;
      logic [4:0] u;
      logic [2:0] exp_s;
      logic [6:0] exp_t;
      v = 3'($urandom);
      u = 5'($urandom);
      exp_s = {1'b0, (v[0] & v[1]) | (v[0] & v[2]) | (v[1] & v[2]), ^v};
      exp_t = tl_ref(u[4:3], u[2], u[1], u[0]);
      // apply, one line at a time, in a rotating order
      for (int k = 0; k < 5; k++) begin
        int i;
        i = (k + n) % 5;
        xt[i] = dr_enc(u[i]);
        if (i < 3) xs[i] = dr_enc(v[i]);
        #SETTLE;
        if (k < 4) begin
          check(undef7(ft), "tl: outputs undefined before last input");
          n_partial++;
        end
      end
      for (int o = 0; o < 7; o++)
        check(ft[o] == dr_enc(exp_t[o]), $sformatf("tl: output %0d for input %b", o, u));
      for (int o = 0; o < 3; o++)
        check(fs[o] == dr_enc(exp_s[o]), $sformatf("small: output %0d for input %b", o, v));
      // remove, one line at a time
      for (int k = 0; k < 5; k++) begin
        int i;
        i = (k + 2 * n) % 5;
        xt[i] = DR_U;
        if (i < 3) xs[i] = DR_U;
        #SETTLE;
        if (k < 4) begin
          logic held;
          held = 1'b1;
          for (int o = 0; o < 7; o++) if (ft[o] != dr_enc(exp_t[o])) held = 1'b0;
          check(held, "tl: outputs held until last input removed");
        end
      end
      check(undef3(fs) && undef7(ft), "outputs undefined after spacer");
    end
    if (n_partial == 0) begin failures++; $display("coverage: no partial inputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

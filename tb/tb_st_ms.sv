// Self-checking testbench for st_ms, the self-timed master-slave register.
// Two 4-bit registers are exercised: u_plain (no ack-in) and u_ack (ack-in
// used, driven by the testbench as a successor stage would). For each of
// many random values the testbench walks the full cycle of the register:
// inputs made defined one line at a time (outputs must keep the old value and
// W stay 1 until the last line), then W must fall with the outputs all
// undefined; inputs removed one line at a time (outputs must stay undefined,
// W stay 0), then W must rise with the outputs equal to the stored value.
// For u_ack, W must also wait for every change of ack_in.
module tb_st_ms;
  import st_pkg::*;
  localparam int K = 4;
  localparam logic [K-1:0] INIT_P = 4'b1010;
  localparam logic [K-1:0] INIT_A = 4'b0110;
  localparam int SETTLE = 5;

  logic        reset, ack_in;
  dr_t [K-1:0] Yp, yp, Ya, ya;
  logic        Wp, Wa;
  int checks = 0, failures = 0;
  int n_partial_in = 0, n_partial_out = 0, n_stall = 0;

  st_ms #(.K(K), .INIT(INIT_P), .USE_ACK_IN(1'b0)) u_plain (
    .reset(reset), .Y(Yp), .y(yp), .ack_in(1'b1), .ack_out(Wp));
  st_ms #(.K(K), .INIT(INIT_A), .USE_ACK_IN(1'b1)) u_ack (
    .reset(reset), .Y(Ya), .y(ya), .ack_in(ack_in), .ack_out(Wa));

  function automatic logic all_undef(dr_t [K-1:0] v);
    for (int i = 0; i < K; i++) if (v[i] != DR_U) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic is_value(dr_t [K-1:0] v, logic [K-1:0] val);
    for (int i = 0; i < K; i++) if (v[i] != dr_enc(val[i])) return 1'b0;
    return 1'b1;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  // Random permutation of line indices.
  task automatic shuffle(output int order[K]);
    for (int i = 0; i < K; i++) order[i] = i;
    for (int i = K - 1; i > 0; i--) begin
      int j, t;
      j = $urandom_range(i);
      t = order[i]; order[i] = order[j]; order[j] = t;
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [K-1:0] stored_p, v;
    int order[K];
    Yp = '0; Ya = '0; ack_in = 1'b1;
    reset = 1'b1;
    #SETTLE;
    reset = 1'b0;
    #SETTLE;
    // E0: outputs hold the initial value, W = 1
    check(is_value(yp, INIT_P) && Wp, "plain: initial state");
    check(is_value(ya, INIT_A) && Wa, "ack: initial state");
    stored_p = INIT_P;

    // ---------------- register without ack-in ----------------
    for (int n = 0; n < 100; n++) begin
      v = K'($urandom);
      shuffle(order);
      for (int k = 0; k < K; k++) begin
        Yp[order[k]] = dr_enc(v[order[k]]);
        #SETTLE;
        if (k < K - 1) begin
          check(is_value(yp, stored_p) && Wp, "plain S1: outputs keep old value, W=1");
          n_partial_in++;
        end
      end
      check(all_undef(yp), "plain S2: outputs undefined");
      check(!Wp, "plain S2: W fell");
      shuffle(order);
      for (int k = 0; k < K; k++) begin
        Yp[order[k]] = DR_U;
        #SETTLE;
        if (k < K - 1) begin
          check(all_undef(yp) && !Wp, "plain S3: outputs stay undefined, W=0");
          n_partial_out++;
        end
      end
      check(is_value(yp, v), "plain S4: outputs equal stored value");
      check(Wp, "plain S4: W rose");
      stored_p = v;
    end

    // ---------------- register with ack-in ----------------
    for (int n = 0; n < 100; n++) begin
      v = K'($urandom);
      for (int k = 0; k < K; k++) Ya[k] = dr_enc(v[k]);
      #SETTLE;
      check(all_undef(ya), "ack S2: outputs undefined");
      // successor has not yet taken the data: W must wait
      check(Wa, "ack: W waits for ack_in to fall");
      n_stall++;
      ack_in = 1'b0;
      #SETTLE;
      check(!Wa, "ack: W fell after ack_in");
      for (int k = 0; k < K; k++) Ya[k] = DR_U;
      #SETTLE;
      check(is_value(ya, v), "ack S4: outputs equal stored value");
      check(!Wa, "ack: W waits for ack_in to rise");
      n_stall++;
      ack_in = 1'b1;
      #SETTLE;
      check(Wa, "ack: W rose after ack_in");

    end

    // second reset from a non-initial state
    Yp = '0;
    reset = 1'b1;
    #SETTLE;
    reset = 1'b0;
    #SETTLE;
    check(is_value(yp, INIT_P) && Wp, "plain: state after second reset");

    if (n_partial_in == 0 || n_partial_out == 0 || n_stall == 0) begin
      failures++;
      $display("coverage: partial_in=%0d partial_out=%0d stall=%0d",
               n_partial_in, n_partial_out, n_stall);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for a "train" of two self-timed state machines.
//
// Stage A (1 input, 1 state bit) keeps the running parity of its input and
// outputs the new parity. Stage B (1 input, 2 state bits) counts the ones it
// receives modulo 4 and outputs a carry when the count wraps. A's output
// drives B's input, and B's ack_out drives A's ack_in, so A only
// acknowledges its environment once B has taken A's data (or spacer). The
// testbench drives A like any environment and checks, after every cycle, A's
// and B's outputs and present states against a model written here. It also
// checks that A's ack_out never moves ahead of B's. B's ack_out reaches A
// through a 7-unit wire delay so that A's wait for it is visible.
module tb_st_fsm_train;
  import st_pkg::*;

  // A: index {y, i}, row {Y, O}; Y = O = y ^ i
  localparam logic [3:0][1:0] TABLE_A = '{2'b00, 2'b11, 2'b11, 2'b00};
  // B: index {y[1:0], i}, row {Y[1:0], O}; Y = y + i, O = (y == 3) & i
  function automatic logic [7:0][2:0] table_b();
    logic [7:0][2:0] t;
    for (int j = 0; j < 8; j++) begin
      logic [1:0] s;
      logic       i;
      s = 2'(j >> 1);
      i = j[0];
      t[j] = {2'(s + 2'(i)), (s == 2'd3) && i};
    end
    return t;
  endfunction

  logic      reset, ack_a, ack_b, ack_b_d;
  dr_t [0:0] ia, oa, ob;
  int checks = 0, failures = 0, n_wait_b = 0, n_carry = 0;

  st_fsm #(.N(1), .M(1), .K(1), .INIT(1'b0), .TABLE(TABLE_A), .USE_ACK_IN(1'b1)) u_a (
    .reset(reset), .I(ia), .O(oa), .ack_in(ack_b_d), .ack_out(ack_a));
  st_fsm #(.N(1), .M(1), .K(2), .INIT(2'b00), .TABLE(table_b()), .USE_ACK_IN(1'b0)) u_b (
    .reset(reset), .I(oa), .O(ob), .ack_in(1'b1), .ack_out(ack_b));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  // B's acknowledgment reaches A over a wire with a delay of 7 time units,
  // so that A's wait for it can be observed.
  always @(ack_b) ack_b_d <= #7 ack_b;

  // A's acknowledgment must never lead B's
  always @(negedge ack_a) if (!reset) check(!ack_b_d, "A fell before B");
  always @(posedge ack_a) if (!reset) check(ack_b_d, "A rose before B");

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic       par, v, carry;
    logic [1:0] cnt;
    ia = '0;
    ack_b_d = 1'b1;
    reset = 1'b1;
    #20;
    reset = 1'b0;
    #20;
    par = 1'b0;
    cnt = 2'd0;
    check(ack_a && ack_b, "after reset both stages ready");
    for (int n = 0; n < 300; n++) begin
      wait (ack_a == 1'b1);
      #1;
      v = 1'($urandom);
      ia[0] = dr_enc(v);
      #2;
      // B has taken the data, A still waits for B's delayed acknowledgment
      if (ack_a && !ack_b) n_wait_b++;
      check(ack_a, "A waits for B");
      wait (ack_a == 1'b0);
      #1;
      carry = (cnt == 2'd3) && (par ^ v);
      check(oa[0] == dr_enc(par ^ v), "A output is the new parity");
      check(ob[0] == dr_enc(carry), "B output is the carry");
      if (carry) n_carry++;
      cnt = cnt + 2'(par ^ v);
      par = par ^ v;
      ia[0] = DR_U;
      wait (ack_a == 1'b1);
      #1;
      check(oa[0] == DR_U && ob[0] == DR_U, "spacer reached both stages");
      check(u_a.ps[0] == dr_enc(par), "A state");
      check(u_b.ps[0] == dr_enc(cnt[0]) && u_b.ps[1] == dr_enc(cnt[1]), "B state");
    end
    if (n_carry == 0 || n_wait_b == 0) begin
      failures++;
      $display("coverage: carries=%0d waits=%0d", n_carry, n_wait_b);
    end
    $display("A waited for B %0d times, carries %0d", n_wait_b, n_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

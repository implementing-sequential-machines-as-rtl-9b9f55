// Self-checking testbench for c_element.
// Drives a random walk over the two inputs and compares z with a reference
// C-element computed in the testbench (follow when equal, hold otherwise).
module tb_c_element;
  logic a, b, z, z_ref;
  int checks = 0, failures = 0;
  int holds = 0, sets = 0, clears = 0;

  c_element dut (.a(a), .b(b), .z(z));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 1'b0; b = 1'b0; z_ref = 1'b0;
    #1;
    checks++; if (z !== 1'b0) begin failures++; $display("init: z=%b", z); end
    for (int n = 0; n < 400; n++) begin
      if ($urandom_range(1) != 0) a = ~a; else b = ~b;
      if (a == b) z_ref = a;
      #1;
      checks++;
      if (z !== z_ref) begin failures++; $display("a=%b b=%b z=%b exp=%b", a, b, z, z_ref); end
      if (a != b) holds++; else if (a) sets++; else clears++;
    end
    if (holds == 0 || sets == 0 || clears == 0) begin
      failures++; $display("coverage: holds=%0d sets=%0d clears=%0d", holds, sets, clears);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for c_element_pc.
// Random walk over a, b, preset and clear; the reference applies preset
// (priority), then clear, then the C-element rule. Preset and clear are each
// exercised while the inputs would otherwise hold the opposite value.
module tb_c_element_pc;
  logic a, b, preset, clear, z, z_ref;
  int checks = 0, failures = 0;
  int n_preset = 0, n_clear = 0, n_clear_vs_hold = 0, n_preset_vs_hold = 0;

  c_element_pc dut (.a(a), .b(b), .preset(preset), .clear(clear), .z(z));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 1'b0; b = 1'b0; preset = 1'b0; clear = 1'b1; z_ref = 1'b0;
    #1;
    checks++; if (z !== 1'b0) begin failures++; $display("clear: z=%b", z); end
    clear = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      int r;
      logic prev;
      prev = z_ref;
      r = $urandom_range(9);
      preset = (r == 0);
      clear  = (r == 1) || (r == 2 && $urandom_range(1) == 1);
      if (r >= 3) begin
        if ($urandom_range(1) != 0) a = ~a; else b = ~b;
      end
      if (preset) begin
        z_ref = 1'b1; n_preset++;
        if (prev == 1'b0 && a != b) n_preset_vs_hold++;
      end else if (clear) begin
        z_ref = 1'b0; n_clear++;
        if (prev == 1'b1 && a != b) n_clear_vs_hold++;
      end else if (a == b) z_ref = a;
      #1;
      checks++;
      if (z !== z_ref) begin
        failures++;
        $display("a=%b b=%b p=%b c=%b z=%b exp=%b", a, b, preset, clear, z, z_ref);
      end
    end
    if (n_preset == 0 || n_clear == 0 || n_clear_vs_hold == 0 || n_preset_vs_hold == 0) begin
      failures++;
      $display("coverage: preset=%0d clear=%0d", n_preset, n_clear);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for c_element_n (4 inputs).
// Random walk over the inputs with occasional preset/clear pulses, compared
// with a reference that follows when all inputs agree and holds otherwise.
module tb_c_element_n;
  localparam int N = 4;
  logic [N-1:0] a;
  logic preset, clear, z, z_ref;
  int checks = 0, failures = 0;
  int n_rise = 0, n_fall = 0, n_hold = 0;

  c_element_n #(.N(N)) dut (.a(a), .preset(preset), .clear(clear), .z(z));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; preset = 1'b0; clear = 1'b0;
    #1;
    z_ref = 1'b0;
    checks++; if (z !== 1'b0) begin failures++; $display("init z=%b", z); end
    for (int n = 0; n < 2000; n++) begin
      logic prev;
      prev = z_ref;
      preset = ($urandom_range(49) == 0);
      clear  = !preset && ($urandom_range(49) == 0);
      // move towards all-ones or all-zeros so both are reached
      a[$urandom_range(N-1)] = (n / 16) % 2 == 0;
      if (preset) z_ref = 1'b1;
      else if (clear) z_ref = 1'b0;
      else if (&a) z_ref = 1'b1;
      else if (~|a) z_ref = 1'b0;
      if (!preset && !clear) begin
        if (z_ref && !prev) n_rise++;
        else if (!z_ref && prev) n_fall++;
        else if (a != '0 && a != '1) n_hold++;
      end
      #1;
      checks++;
      if (z !== z_ref) begin
        failures++;
        $display("a=%b p=%b c=%b z=%b exp=%b", a, preset, clear, z, z_ref);
      end
    end
    if (n_rise == 0 || n_fall == 0 || n_hold == 0) begin
      failures++;
      $display("coverage: rise=%0d fall=%0d hold=%0d", n_rise, n_fall, n_hold);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_da_lut4: checks both the look-up table contents and the coefficient set.
// Every address of two differently parameterised tables is compared with
// the coefficient sum computed here, and the quantised Daubechies 8-tap
// coefficients are compared with their 4-decimal published values.
module tb_da_lut4;
  import dwt_pkg::*;

  int checks = 0, failures = 0;

  localparam branch_t CA = '{H0[0], H0[2], H0[4], H0[6]};
  localparam branch_t CB = '{G1[1], G1[3], G1[5], G1[7]};

  logic [PTAPS-1:0] addr;
  lut_word_t        va, vb;

  da_lut4 #(.COEF(CA)) u_a (.addr, .value(va));
  da_lut4 #(.COEF(CB)) u_b (.addr, .value(vb));

  // Table 1 values (Daubechies 8-tap), four decimals.
  real t_h0 [8] = '{-0.0106, 0.0329, 0.0308, -0.1870, -0.0280, 0.6309, 0.7148, 0.2304};
  real t_h1 [8] = '{-0.2304, 0.7148, -0.6309, -0.0280, 0.1870, 0.0308, -0.0329, -0.0106};
  real t_g0 [8] = '{0.2304, 0.7148, 0.6309, -0.0280, -0.1870, 0.0308, 0.0329, -0.0106};
  real t_g1 [8] = '{-0.0106, -0.0329, 0.0308, 0.1870, -0.0280, -0.6309, 0.7148, -0.2304};

  task automatic check_coef(string name, int q, real t);
    real v = real'(q) / real'(2**CF);
    checks++;
    if (v - t > 0.00006 || t - v > 0.00006) begin
      failures++;
      $display("FAIL %s: %f vs table %f", name, v, t);
    end
  endtask

  initial begin
    for (int a = 0; a < 2**PTAPS; a++) begin
      int ea, eb;
      ea = 0; eb = 0;
      addr = PTAPS'(a);
      #1;
      for (int i = 0; i < PTAPS; i++) begin
        if (a[i]) begin ea += CA[i]; eb += CB[i]; end
      end
      checks += 2;
      if (int'(va) != ea) begin failures++; $display("FAIL a addr %0d: %0d exp %0d", a, va, ea); end
      if (int'(vb) != eb) begin failures++; $display("FAIL b addr %0d: %0d exp %0d", a, vb, eb); end
    end
    for (int k = 0; k < TAPS; k++) begin
      check_coef("H0", H0[k], t_h0[k]);
      check_coef("H1", H1[k], t_h1[k]);
      check_coef("G0", G0[k], t_g0[k]);
      check_coef("G1", G1[k], t_g1[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

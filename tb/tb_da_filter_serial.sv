// tb_da_filter_serial: the bit-serial organisation of da_filter. Two
// instances, one bit plane per clock (DA_BITS = 1, 20 clocks per result) and
// four per clock (5 clocks per result), get random taps whenever ready is
// high, sometimes after a random pause. Every result is compared with the
// multiplied-out inner product; its latency must be DW/DA_BITS + 1 clocks
// and, when taps are offered as soon as ready allows, results must follow
// each other every DW/DA_BITS clocks.
module tb_da_filter_serial;
  import dwt_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam branch_t CA = '{G0[0], G0[2], G0[4], G0[6]};
  localparam branch_t CB = '{G1[0], G1[2], G1[4], G1[6]};

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic sample_t rand_sample();
    case ($urandom_range(0, 5))
      0:       return {1'b1, {(DW-1){1'b0}}};
      1:       return {1'b0, {(DW-1){1'b1}}};
      default: return sample_t'($urandom);
    endcase
  endfunction

  int done = 0;

  for (genvar v = 0; v < 2; v++) begin : g_var
    localparam int BITS  = (v == 0) ? 1 : 4;
    localparam int STEPS = DW / BITS;

    logic    in_valid = 0;
    sample_t taps_a [PTAPS], taps_b [PTAPS];
    logic    ready, out_valid;
    acc_t    result;

    da_filter #(.COEF_A(CA), .COEF_B(CB), .DA_BITS(BITS)) dut (
      .clk, .rst_n, .in_valid, .taps_a, .taps_b, .ready, .out_valid, .result);

    longint exp_q [$];
    longint cyc_q [$];
    longint last_out = -1;
    int     n_out = 0, back_to_back = 0;

    always @(posedge clk) if (rst_n && out_valid) begin
      checks += 2;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL %0d bits: unexpected result", BITS);
      end else begin
        longint e, c;
        e = exp_q.pop_front();
        c = cyc_q.pop_front();
        if (longint'(result) != e) begin
          failures++; $display("FAIL %0d bits: result %0d exp %0d", BITS, result, e);
        end
        if (cycle != c + longint'(STEPS) + 1) begin
          failures++; $display("FAIL %0d bits: latency %0d exp %0d", BITS, cycle - c, STEPS + 1);
        end
      end
      if (last_out >= 0 && cycle - last_out == longint'(STEPS)) back_to_back++;
      last_out = cycle;
      n_out++;
    end

    initial begin
      foreach (taps_a[i]) begin taps_a[i] = '0; taps_b[i] = '0; end
      @(posedge rst_n);
      for (int t = 0; t < 120; t++) begin
        longint e;
        @(negedge clk);
        in_valid = 0;
        if (t % 3 == 2) repeat ($urandom_range(0, 7)) @(negedge clk);
        while (!ready) @(negedge clk);
        e = 0;
        for (int i = 0; i < PTAPS; i++) begin
          taps_a[i] = rand_sample();
          taps_b[i] = rand_sample();
          e += longint'(CA[i]) * longint'(taps_a[i]) + longint'(CB[i]) * longint'(taps_b[i]);
        end
        in_valid = 1;
        exp_q.push_back(e);
        cyc_q.push_back(cycle);
      end
      @(negedge clk);
      in_valid = 0;
      repeat (STEPS + 4) @(negedge clk);
      checks += 2;
      if (n_out != 120) begin failures++; $display("FAIL %0d bits: %0d results", BITS, n_out); end
      if (back_to_back == 0) begin failures++; $display("FAIL %0d bits: never back to back", BITS); end
      $display("%0d bit plane(s) per clock: %0d results, %0d back to back", BITS, n_out, back_to_back);
      done++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

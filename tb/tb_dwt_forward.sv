// tb_dwt_forward: random 8-bit samples, first one per clock and then with
// random gaps, through the three-octave forward transform. Every H1, H2, H3
// and L3 coefficient is compared with the cascaded filter-and-decimate
// reference, and each is checked to leave at its expected clock: H(k)[n]
// 2k clocks after input sample 2^k*n, which at full input rate gives one
// H1 per 2 clocks, one H2 per 4 and one H3/L3 per 8.
module tb_dwt_forward;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int LEVELS = 3;
  localparam int N = 2048;
  localparam int FULL = 1024;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       in_valid;
  in_sample_t in_sample;
  logic       in_ready;
  logic       h_valid [LEVELS];
  sample_t    h       [LEVELS];
  logic       l_valid;
  sample_t    l;

  dwt_forward #(.LEVELS(LEVELS)) dut (.*);

  seq_t x, sched, ref_h [LEVELS], ref_l, low;
  int   n_h [LEVELS], n_l = 0;
  longint last_h [LEVELS];
  int   rate_ok [LEVELS];
  longint cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < LEVELS; k++) if (h_valid[k]) begin
      int n;
      n = n_h[k];
      checks += 2;
      if (n >= ref_h[k].size()) begin
        failures++; $display("FAIL extra H%0d", k + 1);
      end else begin
        if (longint'(h[k]) != ref_h[k][n]) begin
          failures++; $display("FAIL H%0d[%0d] %0d exp %0d", k + 1, n, h[k], ref_h[k][n]);
        end
        if (cycle != sched[(2**(k+1)) * n] + 2 * (longint'(k) + 1)) begin
          failures++; $display("FAIL H%0d[%0d] at cycle %0d exp %0d", k + 1, n, cycle,
                               sched[(2**(k+1)) * n] + 2 * (longint'(k) + 1));
        end
        if ((2**(k+1)) * (n + 1) < FULL && n > 0) begin
          checks++;
          if (cycle - last_h[k] != 2**(k+1)) begin
            failures++; $display("FAIL H%0d spacing %0d", k + 1, cycle - last_h[k]);
          end else rate_ok[k]++;
        end
      end
      last_h[k] = cycle;
      n_h[k]++;
    end
    if (l_valid) begin
      checks += 2;
      if (n_l >= ref_l.size() || longint'(l) != ref_l[n_l]) begin
        failures++; $display("FAIL L%0d[%0d] %0d", LEVELS, n_l, l);
      end
      if (!h_valid[LEVELS-1]) begin failures++; $display("FAIL L/H valid mismatch"); end
      n_l++;
    end
  end

  initial begin
    for (int i = 0; i < N; i++) x.push_back(longint'($urandom_range(0, 255)) - 128);
    low = to_samples(x);
    for (int k = 0; k < LEVELS; k++) begin
      ref_h[k] = analysis(low, H1);
      low      = analysis(low, H0);
      n_h[k] = 0; last_h[k] = 0; rate_ok[k] = 0;
    end
    ref_l = low;
    sched = schedule(N, FULL, 3, 5);
    in_valid = 0; in_sample = '0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      while (cycle < sched[i]) @(negedge clk);
      in_valid = 1; in_sample = in_sample_t'(x[i]);
      @(negedge clk);
      in_valid = 0;
    end
    repeat (20) @(negedge clk);
    for (int k = 0; k < LEVELS; k++) begin
      checks += 2;
      if (n_h[k] != N / 2**(k+1)) begin
        failures++; $display("FAIL H%0d count %0d exp %0d", k + 1, n_h[k], N / 2**(k+1));
      end
      if (rate_ok[k] == 0) begin failures++; $display("FAIL H%0d full rate never seen", k + 1); end
      $display("H%0d: %0d outputs, %0d at full rate", k + 1, n_h[k], rate_ok[k]);
    end
    checks++;
    if (n_l != N / 2**LEVELS) begin failures++; $display("FAIL L count %0d", n_l); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

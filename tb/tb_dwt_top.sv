// tb_dwt_top: end-to-end test of the forward and inverse transform at the
// default configuration (three octaves, Daubechies 8-tap, 8-bit input).
//
// Random 8-bit samples go in at one per clock for the first half and with
// random gaps afterwards. Checked against a multiply-accumulate reference:
// every H1, H2, H3 and L3 coefficient, every reconstructed sample, and the
// reconstruction rounded to 8 bits, which must equal the input delayed by 49
// samples exactly (the word widths are chosen to make it so).
// Counted and required at least once: decimation in each forward octave
// (including at its full rate of 1 per 2, 4 and 8 clocks), interpolation in
// each inverse octave (including at its full rate of 1 per 4, 2 and 1
// clocks), input gaps, and inputs at the extremes of the 8-bit range.
module tb_dwt_top;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int LEVELS = 3;   // the default of dwt_top
  localparam int N = 8192;
  localparam int FULL = 4096;
  localparam int DELAY0 = (TAPS - 1) * (2**LEVELS - 1);

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
  logic       y_valid;
  sample_t    y;
  in_sample_t y_sample;

  dwt_top dut (.*);

  seq_t x, sched, ref_h [LEVELS], ref_l, low, rec, ref_y;
  int   n_h [LEVELS], dec_full [LEVELS];
  longint last_h [LEVELS], last_rec [LEVELS];
  int   n_rec [LEVELS], int_full [LEVELS];
  int   n_l = 0, n_y = 0, exact = 0, gaps = 0, extremes = 0;
  longint cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // Forward coefficients.
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < LEVELS; k++) if (h_valid[k]) begin
      int n;
      n = n_h[k];
      checks++;
      if (n >= ref_h[k].size() || longint'(h[k]) != ref_h[k][n]) begin
        failures++; $display("FAIL H%0d[%0d] = %0d", k + 1, n, h[k]);
      end
      if (n > 0 && cycle - last_h[k] == 2**(k+1)) dec_full[k]++;
      last_h[k] = cycle;
      n_h[k]++;
    end
    if (l_valid) begin
      checks++;
      if (n_l >= ref_l.size() || longint'(l) != ref_l[n_l]) begin
        failures++; $display("FAIL L3[%0d] = %0d", n_l, l);
      end
      n_l++;
    end
  end

  // Interpolation in every inverse octave: rec_valid[k] carries the rebuilt
  // low-pass sequence of octave k (k = 0 is the output).
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < LEVELS; k++) if (dut.u_inverse.rec_valid[k]) begin
      if (n_rec[k] > 0 && cycle - last_rec[k] == 2**k) int_full[k]++;
      last_rec[k] = cycle;
      n_rec[k]++;
    end
  end

  // Reconstruction.
  always @(posedge clk) if (rst_n && y_valid) begin
    checks += 2;
    if (n_y >= ref_y.size() || longint'(y) != ref_y[n_y]) begin
      failures++; $display("FAIL y[%0d] = %0d", n_y, y);
    end
    if (n_y >= DELAY0) begin
      longint e;
      e = longint'(y_sample) - x[n_y - DELAY0];
      checks++;
      if (e == 0) exact++;
      else begin
        failures++; $display("FAIL y_sample[%0d] = %0d, input was %0d", n_y, y_sample, x[n_y - DELAY0]);
      end
    end
    n_y++;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      longint v;
      case ($urandom_range(0, 15))
        0:       v = -128;
        1:       v = 127;
        default: v = longint'($urandom_range(0, 255)) - 128;
      endcase
      if (v == -128 || v == 127) extremes++;
      x.push_back(v);
    end
    low = to_samples(x);
    for (int k = 0; k < LEVELS; k++) begin
      ref_h[k] = analysis(low, H1);
      low      = analysis(low, H0);
      n_h[k] = 0; last_h[k] = 0; dec_full[k] = 0;
      n_rec[k] = 0; last_rec[k] = 0; int_full[k] = 0;
    end
    ref_l = low;
    rec = ref_l;
    for (int k = LEVELS; k >= 1; k--)
      rec = synthesis(rec, delayed(ref_h[k-1], (TAPS - 1) * (2**(LEVELS-k) - 1)), G0, G1);
    ref_y = rec;
    sched = schedule(N, FULL, 3, 5);
    for (int i = 1; i < N; i++) if (sched[i] != sched[i-1] + 1) gaps++;
    in_valid = 0; in_sample = '0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      while (cycle < sched[i]) @(negedge clk);
      in_valid = 1; in_sample = in_sample_t'(x[i]);
      @(negedge clk);
      in_valid = 0;
    end
    repeat (200) @(negedge clk);

    for (int k = 0; k < LEVELS; k++) begin
      checks += 4;
      if (n_h[k] != N / 2**(k+1)) begin failures++; $display("FAIL H%0d count %0d", k + 1, n_h[k]); end
      if (dec_full[k] == 0) begin failures++; $display("FAIL octave %0d decimation never at full rate", k + 1); end
      if (n_rec[k] != N / 2**k) begin failures++; $display("FAIL rebuilt L%0d count %0d", k, n_rec[k]); end
      if (int_full[k] == 0) begin failures++; $display("FAIL octave %0d interpolation never at full rate", k + 1); end
      $display("octave %0d: decimated %0d (%0d at 1 per %0d clocks), interpolated %0d (%0d at 1 per %0d clocks)",
               k + 1, n_h[k], dec_full[k], 2**(k+1), n_rec[k], int_full[k], 2**k);
    end
    checks += 4;
    if (n_l != N / 2**LEVELS) begin failures++; $display("FAIL L3 count %0d", n_l); end
    if (gaps == 0)     begin failures++; $display("FAIL no input gaps"); end
    if (extremes == 0) begin failures++; $display("FAIL no extreme inputs"); end
    if (exact < (N - DELAY0) * 9 / 10) begin failures++; $display("FAIL only %0d exact", exact); end
    $display("input gaps %0d, extreme inputs %0d, exact reconstructions %0d of %0d",
             gaps, extremes, exact, N - DELAY0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

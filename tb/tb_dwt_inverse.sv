// tb_dwt_inverse: drives the inverse transform with reference coefficient
// streams (H1, H2, H3, L3 of random 8-bit input) presented at the clocks the
// forward transform produces them: one input sample per clock for the first
// half, random gaps afterwards. The output is compared with the reference
// synthesis tree (zero insertion and direct-form filters, detail streams
// delayed by 7 and 21 samples) and, rounded to an integer, with the original
// input delayed by 49 samples. Also checks that at full rate the
// reconstruction leaves at one sample per clock.
module tb_dwt_inverse;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int LEVELS = 3;
  localparam int N = 2048;
  localparam int FULL = 1024;
  localparam int DELAY0 = (TAPS - 1) * (2**LEVELS - 1);

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    h_valid [LEVELS];
  sample_t h       [LEVELS];
  logic    l_valid;
  sample_t l;
  logic    y_valid;
  sample_t y;

  dwt_inverse #(.LEVELS(LEVELS)) dut (.*);

  seq_t x, sched, ref_h [LEVELS], ref_l, low, rec, ref_y;
  int   ptr [LEVELS];
  int   n_y = 0, run = 0, max_run = 0, exact = 0;
  longint cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n) begin
    if (y_valid) begin
      longint r;
      checks += 2;
      if (n_y >= ref_y.size()) begin
        failures++; $display("FAIL extra output");
      end else if (longint'(y) != ref_y[n_y]) begin
        failures++; $display("FAIL y[%0d] %0d exp %0d", n_y, y, ref_y[n_y]);
      end
      r = (longint'(y) + 128) >>> FRAC;
      if (n_y >= DELAY0) begin
        if (r == x[n_y - DELAY0]) exact++;
        else if (r - x[n_y - DELAY0] > 1 || x[n_y - DELAY0] - r > 1) begin
          failures++; $display("FAIL reconstruction y[%0d]=%0d x=%0d", n_y, r, x[n_y - DELAY0]);
        end
      end
      n_y++;
      run++;
      if (run > max_run) max_run = run;
    end else run = 0;
  end

  initial begin
    for (int i = 0; i < N; i++) x.push_back(longint'($urandom_range(0, 255)) - 128);
    low = to_samples(x);
    for (int k = 0; k < LEVELS; k++) begin
      ref_h[k] = analysis(low, H1);
      low      = analysis(low, H0);
      ptr[k] = 0;
    end
    ref_l = low;
    rec = ref_l;
    for (int k = LEVELS; k >= 1; k--)
      rec = synthesis(rec, delayed(ref_h[k-1], (TAPS - 1) * (2**(LEVELS-k) - 1)), G0, G1);
    ref_y = rec;
    sched = schedule(N, FULL, 3, 5);
    foreach (h[k]) begin h_valid[k] = 0; h[k] = '0; end
    l_valid = 0; l = '0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    while (cycle < sched[N-1] + 30) begin
      @(negedge clk);
      for (int k = 0; k < LEVELS; k++) begin
        h_valid[k] = 0;
        if (ptr[k] < ref_h[k].size() &&
            cycle == sched[(2**(k+1)) * ptr[k]] + 2 * (longint'(k) + 1)) begin
          h_valid[k] = 1;
          h[k] = sample_t'(ref_h[k][ptr[k]]);
          if (k == LEVELS - 1) l = sample_t'(ref_l[ptr[k]]);
          ptr[k]++;
        end
      end
      l_valid = h_valid[LEVELS-1];
    end
    repeat (100) @(negedge clk);
    checks += 3;
    if (n_y != N) begin failures++; $display("FAIL %0d outputs, expected %0d", n_y, N); end
    if (max_run < FULL / 2) begin failures++; $display("FAIL longest 1/clock run %0d", max_run); end
    if (exact < (N - DELAY0) * 9 / 10) begin failures++; $display("FAIL only %0d exact", exact); end
    $display("outputs %0d, longest one-per-clock run %0d, exact reconstructions %0d of %0d",
             n_y, max_run, exact, N - DELAY0);
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

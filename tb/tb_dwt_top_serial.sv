// tb_dwt_top_serial: the whole forward and inverse transform built with
// bit-serial distributed arithmetic (DA_BITS = 1: one bit plane per clock,
// 20 clocks per inner product). Random 8-bit samples are offered whenever
// in_ready allows, with occasional pauses. Checked against the reference
// model: every H1, H2, H3 and L3 coefficient, every reconstructed sample,
// and the 8-bit reconstruction against the input delayed by 49 samples.
// Also checks that even-indexed samples are taken no faster than one per
// 20 clocks and that this rate is reached.
module tb_dwt_top_serial;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int LEVELS = 3;
  localparam int DA_BITS = 1;
  localparam int STEPS = DW / DA_BITS;
  localparam int N = 1024;
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

  dwt_top #(.LEVELS(LEVELS), .DA_BITS(DA_BITS)) dut (.*);

  seq_t x, ref_h [LEVELS], ref_l, low, rec, ref_y;
  int   n_h [LEVELS];
  int   n_l = 0, n_y = 0, exact = 0, at_rate = 0, too_fast = 0;
  longint cycle = 0, last_even = -1;

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < LEVELS; k++) if (h_valid[k]) begin
      checks++;
      if (n_h[k] >= ref_h[k].size() || longint'(h[k]) != ref_h[k][n_h[k]]) begin
        failures++; $display("FAIL H%0d[%0d] = %0d", k + 1, n_h[k], h[k]);
      end
      n_h[k]++;
    end
    if (l_valid) begin
      checks++;
      if (n_l >= ref_l.size() || longint'(l) != ref_l[n_l]) begin
        failures++; $display("FAIL L3[%0d] = %0d", n_l, l);
      end
      n_l++;
    end
    if (y_valid) begin
      checks += 2;
      if (n_y >= ref_y.size() || longint'(y) != ref_y[n_y]) begin
        failures++; $display("FAIL y[%0d] = %0d", n_y, y);
      end
      if (n_y >= DELAY0) begin
        longint e;
        e = longint'(y_sample) - x[n_y - DELAY0];
        if (e == 0) exact++;
        else if (e > 1 || e < -1) begin
          failures++; $display("FAIL y_sample[%0d] = %0d, input %0d", n_y, y_sample, x[n_y - DELAY0]);
        end
      end
      n_y++;
    end
  end

  initial begin
    for (int i = 0; i < N; i++) x.push_back(longint'($urandom_range(0, 255)) - 128);
    low = to_samples(x);
    for (int k = 0; k < LEVELS; k++) begin
      ref_h[k] = analysis(low, H1);
      low      = analysis(low, H0);
      n_h[k] = 0;
    end
    ref_l = low;
    rec = ref_l;
    for (int k = LEVELS; k >= 1; k--)
      rec = synthesis(rec, delayed(ref_h[k-1], (TAPS - 1) * (2**(LEVELS-k) - 1)), G0, G1);
    ref_y = rec;
    in_valid = 0; in_sample = '0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      in_valid = 0;
      if ($urandom_range(0, 15) == 0) repeat ($urandom_range(1, 30)) @(negedge clk);
      while (!in_ready) @(negedge clk);
      in_valid = 1; in_sample = in_sample_t'(x[i]);
      if (i % 2 == 0) begin
        if (last_even >= 0) begin
          if (cycle - last_even < longint'(STEPS)) too_fast++;
          if (cycle - last_even == longint'(STEPS)) at_rate++;
        end
        last_even = cycle;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (1500) @(negedge clk);
    for (int k = 0; k < LEVELS; k++) begin
      checks++;
      if (n_h[k] != N / 2**(k+1)) begin failures++; $display("FAIL H%0d count %0d", k + 1, n_h[k]); end
    end
    checks += 5;
    if (n_l != N / 2**LEVELS) begin failures++; $display("FAIL L3 count %0d", n_l); end
    if (n_y != N) begin failures++; $display("FAIL %0d outputs", n_y); end
    if (too_fast != 0) begin failures++; $display("FAIL %0d even samples taken too early", too_fast); end
    if (at_rate == 0) begin failures++; $display("FAIL serial rate never reached"); end
    if (exact < (N - DELAY0) * 9 / 10) begin failures++; $display("FAIL only %0d exact", exact); end
    $display("outputs %0d, even samples at 1 per %0d clocks: %0d, exact reconstructions %0d of %0d",
             n_y, STEPS, at_rate, exact, N - DELAY0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

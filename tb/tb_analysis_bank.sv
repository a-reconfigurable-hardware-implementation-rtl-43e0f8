// tb_analysis_bank: feeds random samples, first at one per clock and then
// with random gaps, and compares every low-pass and high-pass output with
// the direct-form filter-and-decimate reference. Also checks the count (one
// output per two inputs), the latency (two clocks after the even sample) and
// the output rate at full input rate (one output per two clocks).
module tb_analysis_bank;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int N = 400;
  localparam int FULL_RATE = 200;   // first samples arrive back to back

  logic    in_valid;
  sample_t in_sample;
  logic    in_ready;
  logic    out_valid;
  sample_t out_low, out_high;

  analysis_bank dut (.*);

  seq_t x, ref_lo, ref_hi;
  int   in_cycle [N];
  int   cycle = 0;
  int   n_out = 0;
  int   last_out_cycle = -1;

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    checks += 4;
    if (n_out >= ref_lo.size()) begin
      failures++; $display("FAIL extra output");
    end else begin
      if (longint'(out_low) != ref_lo[n_out]) begin
        failures++; $display("FAIL low[%0d] %0d exp %0d", n_out, out_low, ref_lo[n_out]);
      end
      if (longint'(out_high) != ref_hi[n_out]) begin
        failures++; $display("FAIL high[%0d] %0d exp %0d", n_out, out_high, ref_hi[n_out]);
      end
      if (cycle != in_cycle[2*n_out] + 2) begin
        failures++; $display("FAIL latency of output %0d: cycle %0d, even input at %0d",
                             n_out, cycle, in_cycle[2*n_out]);
      end
      if (2*n_out + 2 < FULL_RATE && n_out > 0 && cycle - last_out_cycle != 2) begin
        failures++; $display("FAIL full-rate output spacing %0d", cycle - last_out_cycle);
      end
    end
    last_out_cycle = cycle;
    n_out++;
  end

  initial begin
    for (int i = 0; i < N; i++) x.push_back(longint'($urandom_range(0, 2**19)) - 2**18);
    ref_lo = analysis(x, H0);
    ref_hi = analysis(x, H1);
    in_valid = 0; in_sample = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < N; i++) begin
      if (i >= FULL_RATE) begin
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
      in_valid = 1; in_sample = sample_t'(x[i]);
      in_cycle[i] = cycle;
      @(negedge clk);
      in_valid = 0;
    end
    repeat (10) @(negedge clk);
    checks++;
    if (n_out != N/2) begin failures++; $display("FAIL %0d outputs, expected %0d", n_out, N/2); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_synthesis_bank: feeds random low/high pairs, one every 2*SPACING clocks
// and then with longer random gaps, and compares the output stream with the
// zero-insert-and-filter reference. Checks the count (two outputs per pair),
// that the even output comes two clocks after its pair and the odd output
// SPACING clocks after the even one.
module tb_synthesis_bank;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int SPACING = 2;
  localparam int M = 200;

  logic    in_valid;
  sample_t in_low, in_high;
  logic    in_ready;
  logic    out_valid;
  sample_t out_sample;

  synthesis_bank #(.SPACING(SPACING)) dut (.*);

  seq_t lo, hi, ref_y;
  int   in_cycle [M];
  int   cycle = 0;
  int   n_out = 0;

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    int expect_cycle;
    checks += 2;
    if (n_out >= ref_y.size()) begin
      failures++; $display("FAIL extra output");
    end else begin
      if (longint'(out_sample) != ref_y[n_out]) begin
        failures++; $display("FAIL y[%0d] %0d exp %0d", n_out, out_sample, ref_y[n_out]);
      end
      expect_cycle = in_cycle[n_out/2] + 2 + ((n_out % 2 != 0) ? SPACING : 0);
      if (cycle != expect_cycle) begin
        failures++; $display("FAIL timing of y[%0d]: cycle %0d exp %0d", n_out, cycle, expect_cycle);
      end
    end
    n_out++;
  end

  initial begin
    for (int i = 0; i < M; i++) begin
      lo.push_back(longint'($urandom_range(0, 2**19)) - 2**18);
      hi.push_back(longint'($urandom_range(0, 2**19)) - 2**18);
    end
    ref_y = synthesis(lo, hi, G0, G1);
    in_valid = 0; in_low = '0; in_high = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < M; i++) begin
      in_valid = 1; in_low = sample_t'(lo[i]); in_high = sample_t'(hi[i]);
      in_cycle[i] = cycle;
      @(negedge clk);
      in_valid = 0;
      repeat (2*SPACING - 1 + ((i >= M/2) ? $urandom_range(0, 3) : 0)) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (n_out != 2*M) begin failures++; $display("FAIL %0d outputs, expected %0d", n_out, 2*M); end
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

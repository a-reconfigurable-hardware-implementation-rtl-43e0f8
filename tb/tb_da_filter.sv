// tb_da_filter: random taps over the whole sample range (including the most
// negative value) with random gaps in in_valid. Each result is compared with
// the inner product computed by multiplication, and must appear exactly one
// clock after its inputs.
module tb_da_filter;
  import dwt_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam branch_t CA = '{H1[0], H1[2], H1[4], H1[6]};
  localparam branch_t CB = '{H1[1], H1[3], H1[5], H1[7]};

  logic    in_valid;
  sample_t taps_a [PTAPS], taps_b [PTAPS];
  logic    ready;
  logic    out_valid;
  acc_t    result;

  da_filter #(.COEF_A(CA), .COEF_B(CB)) dut (.*);

  function automatic sample_t rand_sample();
    case ($urandom_range(0, 5))
      0:       return {1'b1, {(DW-1){1'b0}}};   // most negative
      1:       return {1'b0, {(DW-1){1'b1}}};   // most positive
      default: return sample_t'($urandom);
    endcase
  endfunction

  longint expected;
  logic   expect_out;

  initial begin
    in_valid = 0;
    foreach (taps_a[i]) begin taps_a[i] = '0; taps_b[i] = '0; end
    expect_out = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      // the previous cycle's inputs are now in the output register
      checks++;
      if (out_valid !== expect_out) begin
        failures++; $display("FAIL valid at %0d: %b exp %b", t, out_valid, expect_out);
      end else if (expect_out && longint'(result) != expected) begin
        failures++; $display("FAIL result at %0d: %0d exp %0d", t, result, expected);
      end
      in_valid = ($urandom_range(0, 3) != 0);
      expected = 0;
      for (int i = 0; i < PTAPS; i++) begin
        taps_a[i] = rand_sample();
        taps_b[i] = rand_sample();
        expected += longint'(CA[i]) * longint'(taps_a[i]) + longint'(CB[i]) * longint'(taps_b[i]);
      end
      expect_out = in_valid;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

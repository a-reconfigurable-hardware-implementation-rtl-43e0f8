// analysis_bank: polyphase analysis filter bank (one octave of the forward DWT).
//
// Produces the low-pass and high-pass outputs decimated by two,
//   low[n]  = sum_k LO[k] x[2n-k],   high[n] = sum_k HI[k] x[2n-k],
// without computing the samples the down-sampler would discard. The input is
// split into its even and odd phase: the even samples x[2n], x[2n-2], ...
// feed the even polyphase branch of each filter (taps 0,2,4,6) and the odd
// samples x[2n-1], x[2n-3], ... the odd branch (taps 1,3,5,7). Each filter is
// one da_filter whose two 4-input LUTs are exactly these two branches, so the
// branch outputs are added inside the distributed-arithmetic adder. Only one
// inner product per filter is evaluated per pair of inputs.
//
// The polyphase structure and the use of distributed-arithmetic sub-filters
// follow the published design. This design's choices: the first sample
// after reset has index 0 (even), all history is zero after reset, and the
// full-precision result is rounded to the sample format (round half up).
//
// Interface: in_valid/in_sample may be asserted on any clock (up to one
// sample per clock) while in_ready is high. out_valid pulses once per two
// input samples with out_low and out_high. With the default bit-parallel DA
// filters (DA_BITS = DW) in_ready is always high and the outputs come two
// clocks after the even-indexed input sample that completes the pair; with
// DA_BITS < DW the DA filters take DW/DA_BITS clocks per result, even
// samples may follow each other no faster than that, and the latency is
// DW/DA_BITS + 2 clocks. There is no back-pressure: the source must honour
// in_ready (an assertion checks it). Synchronous active-low reset.
module analysis_bank
  import dwt_pkg::*;
#(
  parameter coef_t LO = H0,
  parameter coef_t HI = H1,
  parameter int    DA_BITS = DW   // bit planes per clock in the DA filters
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_sample,
  output logic    in_ready,
  output logic    out_valid,
  output sample_t out_low,
  output sample_t out_high
);

  logic    odd_next;              // the next input sample has an odd index
  sample_t even_line [PTAPS-1];   // x[2n-2], x[2n-4], x[2n-6]
  sample_t odd_line  [PTAPS];     // x[2n-1], x[2n-3], x[2n-5], x[2n-7]
  sample_t taps_even [PTAPS];     // x[2n], x[2n-2], x[2n-4], x[2n-6]
  logic    fire;

  assign fire = in_valid && !odd_next;

  always_comb begin
    taps_even[0] = in_sample;
    for (int i = 1; i < PTAPS; i++) taps_even[i] = even_line[i-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      odd_next <= 1'b0;
      for (int i = 0; i < PTAPS-1; i++) even_line[i] <= '0;
      for (int i = 0; i < PTAPS; i++)   odd_line[i]  <= '0;
    end else if (in_valid) begin
      odd_next <= !odd_next;
      if (odd_next) begin
        odd_line[0] <= in_sample;
        for (int i = 1; i < PTAPS; i++) odd_line[i] <= odd_line[i-1];
      end else begin
        even_line[0] <= in_sample;
        for (int i = 1; i < PTAPS-1; i++) even_line[i] <= even_line[i-1];
      end
    end
  end

  logic lo_valid, hi_valid, lo_ready, hi_ready;

  // Odd samples are only stored; an even sample needs free DA filters.
  assign in_ready = odd_next || (lo_ready && hi_ready);
  acc_t lo_acc, hi_acc;

  da_filter #(.COEF_A(branch_of(LO, 0)), .COEF_B(branch_of(LO, 1)), .DA_BITS(DA_BITS)) u_low (
    .clk, .rst_n, .in_valid(fire), .taps_a(taps_even), .taps_b(odd_line),
    .ready(lo_ready), .out_valid(lo_valid), .result(lo_acc)
  );

  da_filter #(.COEF_A(branch_of(HI, 0)), .COEF_B(branch_of(HI, 1)), .DA_BITS(DA_BITS)) u_high (
    .clk, .rst_n, .in_valid(fire), .taps_a(taps_even), .taps_b(odd_line),
    .ready(hi_ready), .out_valid(hi_valid), .result(hi_acc)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_low   <= '0;
      out_high  <= '0;
    end else begin
      out_valid <= lo_valid;
      if (lo_valid) begin
        out_low  <= round_acc(lo_acc);
        out_high <= round_acc(hi_acc);
      end
    end
  end

  a_branches_in_step: assert property (@(posedge clk) disable iff (!rst_n) lo_valid == hi_valid);

endmodule

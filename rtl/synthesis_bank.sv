// synthesis_bank: polyphase synthesis filter bank (one octave of the inverse DWT).
//
// Up-samples a low-pass and a high-pass sequence by two, filters them with
// LO and HI and adds the results:
//   y[n] = sum_k low[k] LO[n-2k] + sum_k high[k] HI[n-2k].
// Instead of filtering inserted zeros, each input pair (low[m], high[m])
// yields both output samples directly:
//   y[2m]   = sum_i low[m-i] LO[2i]   + high[m-i] HI[2i]
//   y[2m+1] = sum_i low[m-i] LO[2i+1] + high[m-i] HI[2i+1].
// Each output is one da_filter: one 4-input LUT holds a polyphase branch of
// LO (addressed by the low-pass history), the other the same branch of HI
// (addressed by the high-pass history).
//
// The polyphase structure and distributed-arithmetic sub-filters follow the
// published design. This design's choices: history is zero after reset,
// results are rounded to the sample format (round half up), and the odd
// output is held back SPACING clocks after the even one, so that a stage fed
// one pair every 2*SPACING clocks emits one sample every SPACING clocks
// (1 per 4, 1 per 2 and 1 per clock in a three-octave inverse transform).
//
// Interface: in_valid with in_low/in_high; pairs must be at least
// 2*SPACING clocks apart and, with DA_BITS < DW, may only come while
// in_ready is high (DW/DA_BITS clocks apart). out_valid/out_sample: y[2m]
// two clocks after the pair (DW/DA_BITS + 2 with DA_BITS < DW), y[2m+1]
// SPACING clocks later. Synchronous active-low reset.
module synthesis_bank
  import dwt_pkg::*;
#(
  parameter coef_t LO      = G0,
  parameter coef_t HI      = G1,
  parameter int    SPACING = 1,
  parameter int    DA_BITS = DW   // bit planes per clock in the DA filters
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_low,
  input  sample_t in_high,
  output logic    in_ready,
  output logic    out_valid,
  output sample_t out_sample
);

  sample_t low_line  [PTAPS-1];   // low[m-1], low[m-2], low[m-3]
  sample_t high_line [PTAPS-1];
  sample_t taps_low  [PTAPS];     // low[m], ..., low[m-3]
  sample_t taps_high [PTAPS];

  always_comb begin
    taps_low[0]  = in_low;
    taps_high[0] = in_high;
    for (int i = 1; i < PTAPS; i++) begin
      taps_low[i]  = low_line[i-1];
      taps_high[i] = high_line[i-1];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < PTAPS-1; i++) begin
        low_line[i]  <= '0;
        high_line[i] <= '0;
      end
    end else if (in_valid) begin
      low_line[0]  <= in_low;
      high_line[0] <= in_high;
      for (int i = 1; i < PTAPS-1; i++) begin
        low_line[i]  <= low_line[i-1];
        high_line[i] <= high_line[i-1];
      end
    end
  end

  logic even_valid, odd_valid, even_ready, odd_ready;

  assign in_ready = even_ready && odd_ready;
  acc_t even_acc, odd_acc;

  da_filter #(.COEF_A(branch_of(LO, 0)), .COEF_B(branch_of(HI, 0)), .DA_BITS(DA_BITS)) u_even (
    .clk, .rst_n, .in_valid, .taps_a(taps_low), .taps_b(taps_high),
    .ready(even_ready), .out_valid(even_valid), .result(even_acc)
  );

  da_filter #(.COEF_A(branch_of(LO, 1)), .COEF_B(branch_of(HI, 1)), .DA_BITS(DA_BITS)) u_odd (
    .clk, .rst_n, .in_valid, .taps_a(taps_low), .taps_b(taps_high),
    .ready(odd_ready), .out_valid(odd_valid), .result(odd_acc)
  );

  localparam int CNT_W = $clog2(SPACING + 1);

  sample_t          odd_hold;
  logic             odd_pending;
  logic [CNT_W-1:0] odd_count;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_sample  <= '0;
      odd_hold    <= '0;
      odd_pending <= 1'b0;
      odd_count   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (even_valid) begin
        out_valid   <= 1'b1;
        out_sample  <= round_acc(even_acc);
        odd_hold    <= round_acc(odd_acc);
        odd_pending <= 1'b1;
        odd_count   <= CNT_W'(SPACING);
      end else if (odd_pending) begin
        if (odd_count == CNT_W'(1)) begin
          out_valid   <= 1'b1;
          out_sample  <= odd_hold;
          odd_pending <= 1'b0;
        end
        odd_count <= odd_count - CNT_W'(1);
      end
    end
  end

  a_pair_rate: assert property (@(posedge clk) disable iff (!rst_n) !(even_valid && odd_pending))
    else $error("synthesis_bank: input pairs closer than 2*SPACING clocks");
  a_phases_in_step: assert property (@(posedge clk) disable iff (!rst_n) even_valid == odd_valid);

endmodule

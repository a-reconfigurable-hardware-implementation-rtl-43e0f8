// dwt_inverse: multi-octave inverse discrete wavelet transform.
//
// LEVELS synthesis_bank stages in cascade, deepest octave first: the stage
// of octave k combines the reconstructed low-pass sequence L(k) with the
// detail sequence H(k) and produces L(k-1); the stage of octave 1 produces
// the reconstructed signal. Fed by dwt_forward at one input sample per
// clock, the stages emit one sample per 4, per 2 and per clock, as in the
// published three-octave design.
//
// Each octave's analysis and synthesis add 7 samples of delay, so the
// rebuilt L(k) lags H(k) by D(k) = 7*(2**(LEVELS-k) - 1) samples of octave k.
// The H(k) streams for k < LEVELS therefore pass through a coef_align_fifo
// preloaded with D(k) zeros (this alignment is this design's own; the
// published description shows only the filter tree). The output equals the
// forward transform's input delayed by D(0) = 7*(2**LEVELS - 1) samples
// (49 for three octaves), up to rounding.
//
// DA_BITS selects bit-parallel (default) or bit-serial distributed
// arithmetic (see da_filter). With DA_BITS < DW each octave's odd output is
// spaced DW/(2*DA_BITS) times further, matching the slower forward rate;
// DW/DA_BITS must then be even.
//
// Interface: the coefficient streams in the form and timing dwt_forward
// produces them: h_valid[k-1]/h[k-1] for H(k); l_valid/l for L(LEVELS),
// with h[LEVELS-1] valid in the same cycle. y_valid/y carry the
// reconstruction in sample_t format. Synchronous active-low reset.
module dwt_inverse
  import dwt_pkg::*;
#(
  parameter int LEVELS  = 3,
  parameter int DA_BITS = DW   // bit planes per clock in every DA filter
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    h_valid [LEVELS],
  input  sample_t h       [LEVELS],
  input  logic    l_valid,
  input  sample_t l,
  output logic    y_valid,
  output sample_t y
);

  localparam int FILTER_DELAY = TAPS - 1;
  // Clocks per inner product, and the odd-output spacing unit: with DW/DA_BITS
  // clocks per result the forward transform takes at most two samples per
  // DW/DA_BITS clocks, so every octave runs DW/(2*DA_BITS) times slower.
  localparam int STEPS = DW / DA_BITS;
  localparam int UNIT  = (STEPS == 1) ? 1 : STEPS / 2;

  logic    rec_valid [LEVELS+1];   // rebuilt L(k), k = 0..LEVELS
  sample_t rec       [LEVELS+1];

  assign rec_valid[LEVELS] = l_valid;
  assign rec[LEVELS]       = l;

  for (genvar k = 1; k <= LEVELS; k++) begin : g_stage
    sample_t detail;
    if (k == LEVELS) begin : g_direct
      assign detail = h[k-1];
      a_deepest_pair: assert property (@(posedge clk) disable iff (!rst_n)
                                       h_valid[k-1] == l_valid);
    end else begin : g_align
      localparam int D = FILTER_DELAY * (2**(LEVELS-k) - 1);
      coef_align_fifo #(.DELAY(D), .DEPTH(2**$clog2(D + 16))) u_align (
        .clk, .rst_n,
        .push(h_valid[k-1]), .push_data(h[k-1]),
        .pop (rec_valid[k]), .pop_data(detail)
      );
    end
    logic ready;
    synthesis_bank #(.LO(G0), .HI(G1), .SPACING(UNIT * 2**(k-1)), .DA_BITS(DA_BITS)) u_bank (
      .clk, .rst_n,
      .in_valid  (rec_valid[k]),
      .in_low    (rec[k]),
      .in_high   (detail),
      .in_ready  (ready),
      .out_valid (rec_valid[k-1]),
      .out_sample(rec[k-1])
    );
    a_stage_ready: assert property (@(posedge clk) disable iff (!rst_n) rec_valid[k] |-> ready)
      else $error("dwt_inverse: octave %0d received a pair it cannot take", k);
  end

  initial begin
    assert (STEPS == 1 || STEPS % 2 == 0)
      else $error("dwt_inverse: DW/DA_BITS must be 1 or even");
  end

  assign y_valid = rec_valid[0];
  assign y       = rec[0];

endmodule

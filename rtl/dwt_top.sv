// dwt_top: three-octave forward DWT followed by the inverse DWT.
//
// The Daubechies 8-tap forward transform (dwt_forward) decomposes a stream
// of 8-bit samples into the detail sequences H1, H2, H3 and the coarse
// sequence L3, which are brought out; the inverse transform (dwt_inverse)
// rebuilds the signal from them. Every filter is a polyphase filter bank
// whose branches are distributed-arithmetic look-up tables, so no
// multipliers are used. This pairing of the two transforms mirrors how the
// published design was exercised; in an application the coefficients would
// be processed (quantised, coded) between the two halves.
//
// DA_BITS chooses the distributed-arithmetic organisation: DW (default)
// evaluates all bit planes in one clock, so one sample per clock is taken;
// smaller values evaluate DA_BITS bit planes per clock as in a bit-serial DA
// filter, and the first octave then takes an even-indexed sample only every
// DW/DA_BITS clocks (in_ready).
//
// Interface: in_valid/in_sample, up to one 8-bit sample per clock while
// in_ready is high (always, at the default).
// Coefficients: h_valid[k-1]/h[k-1] = H(k), l_valid/l = L(LEVELS), in the
// sample_t format (FRAC fractional bits). Reconstruction: y_valid with y
// (sample_t) and y_sample (y rounded to an IN_W-bit integer, saturated);
// it equals the input delayed by 7*(2**LEVELS - 1) samples (49). At one input per clock
// the output also runs at one sample per clock. Synchronous active-low reset.
module dwt_top
  import dwt_pkg::*;
#(
  parameter int LEVELS  = 3,
  parameter int DA_BITS = DW   // DW: bit-parallel DA; 1: bit-serial DA
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  in_sample_t in_sample,
  output logic       in_ready,
  output logic       h_valid [LEVELS],
  output sample_t    h       [LEVELS],
  output logic       l_valid,
  output sample_t    l,
  output logic       y_valid,
  output sample_t    y,
  output in_sample_t y_sample
);

  dwt_forward #(.LEVELS(LEVELS), .DA_BITS(DA_BITS)) u_forward (
    .clk, .rst_n, .in_valid, .in_sample, .in_ready,
    .h_valid, .h, .l_valid, .l
  );

  dwt_inverse #(.LEVELS(LEVELS), .DA_BITS(DA_BITS)) u_inverse (
    .clk, .rst_n, .h_valid, .h, .l_valid, .l,
    .y_valid, .y
  );

  // Round the reconstruction to an integer sample and saturate to IN_W bits.
  localparam sample_t MAX_IN = sample_t'((2**(IN_W-1) - 1) * 2**FRAC);
  localparam sample_t MIN_IN = sample_t'(-(2**(IN_W-1)) * 2**FRAC);

  always_comb begin
    if (y > MAX_IN)      y_sample = in_sample_t'(2**(IN_W-1) - 1);
    else if (y < MIN_IN) y_sample = in_sample_t'(-(2**(IN_W-1)));
    else                 y_sample = in_sample_t'((y + sample_t'(2**(FRAC-1))) >>> FRAC);
  end

endmodule

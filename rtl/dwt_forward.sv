// dwt_forward: multi-octave forward discrete wavelet transform (Mallat tree).
//
// LEVELS analysis_bank stages in cascade: stage k filters the low-pass
// sequence L(k-1) (L0 is the input) into the detail sequence H(k), sent to
// the output, and the low-pass sequence L(k), passed to stage k+1. The last
// stage also outputs L(LEVELS). With one input sample per clock, H1 leaves at
// one sample per 2 clocks, H2 at one per 4 and H3 and L3 at one per 8, as in
// the published design, which uses three octaves of the Daubechies 8-tap
// wavelet.
//
// Input samples are IN_W-bit two's-complement integers; they are moved into
// the integer part of the internal sample format (sample_t, FRAC fractional
// bits). All coefficient outputs use sample_t.
//
// DA_BITS selects bit-parallel (default) or bit-serial distributed
// arithmetic, see da_filter; with DA_BITS < DW the first octave accepts an
// even-indexed sample only every DW/DA_BITS clocks (in_ready).
//
// Interface: in_valid/in_sample (at most one per clock while in_ready is
// high, gaps allowed).
// h_valid[k-1]/h[k-1] carry H(k); l_valid/l carry L(LEVELS) and coincide
// with h_valid[LEVELS-1]. Each stage adds two clocks of latency.
module dwt_forward
  import dwt_pkg::*;
#(
  parameter int LEVELS  = 3,
  parameter int DA_BITS = DW   // bit planes per clock in every DA filter
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  in_sample_t in_sample,
  output logic       in_ready,
  output logic       h_valid [LEVELS],
  output sample_t    h       [LEVELS],
  output logic       l_valid,
  output sample_t    l
);

  logic    low_valid [LEVELS+1];
  sample_t low       [LEVELS+1];

  assign low_valid[0] = in_valid;
  assign low[0]       = sample_t'(in_sample) <<< FRAC;

  for (genvar k = 1; k <= LEVELS; k++) begin : g_stage
    logic ready;
    analysis_bank #(.LO(H0), .HI(H1), .DA_BITS(DA_BITS)) u_bank (
      .clk, .rst_n,
      .in_valid (low_valid[k-1]),
      .in_sample(low[k-1]),
      .in_ready (ready),
      .out_valid(low_valid[k]),
      .out_low  (low[k]),
      .out_high (h[k-1])
    );
    assign h_valid[k-1] = low_valid[k];
    a_stage_ready: assert property (@(posedge clk) disable iff (!rst_n) low_valid[k-1] |-> ready)
      else $error("dwt_forward: octave %0d received a sample it cannot take", k);
  end

  // Deeper octaves run at half the rate of the one before, so only the first
  // one can refuse a sample.
  assign in_ready = g_stage[1].ready;

  assign l_valid = low_valid[LEVELS];
  assign l       = low[LEVELS];

endmodule

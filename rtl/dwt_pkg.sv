// dwt_pkg: number formats and filter coefficients shared by the DWT datapath.
//
// All samples travelling between filter banks use one signed fixed-point
// format, sample_t: DW bits, FRAC of them fractional. Input samples are
// IN_W-bit two's-complement integers and are placed in the integer part.
// Filter coefficients are Daubechies 8-tap values quantised to CF fractional
// bits (round to nearest). The four filters are the standard orthogonal set:
// H0/H1 analysis low/high pass, G0/G1 synthesis low/high pass, written as
// FIR taps in the order they multiply x[n], x[n-1], ... x[n-7]. With these
// taps a one-level analysis followed by synthesis returns the input delayed
// by TAPS-1 = 7 samples.
//
// The wavelet, the 8-bit input and the split of every filter into two 4-tap
// polyphase branches follow the published design; the word widths DW, FRAC
// and CF are this design's choice (wide enough that a three-octave forward
// and inverse transform reconstructs 8-bit input to within one LSB).
package dwt_pkg;

  localparam int IN_W  = 8;    // input sample width (8-bit samples)
  localparam int TAPS  = 8;    // Daubechies 8-tap filters
  localparam int PTAPS = TAPS / 2;  // taps per polyphase branch / per LUT
  localparam int DW    = 20;   // inter-stage sample width
  localparam int FRAC  = 8;    // fractional bits of a sample
  localparam int CF    = 14;   // fractional bits of a coefficient
  localparam int CW    = 16;   // coefficient width
  localparam int LW    = CW + 2;       // LUT word: sum of up to 4 coefficients
  localparam int ACC_W = DW + LW + 2;  // full-precision inner product

  typedef logic signed [DW-1:0]    sample_t;
  typedef logic signed [IN_W-1:0]  in_sample_t;
  typedef logic signed [LW-1:0]    lut_word_t;
  typedef logic signed [ACC_W-1:0] acc_t;
  typedef int coef_t   [TAPS];   // one 8-tap filter, integer coefficients
  typedef int branch_t [PTAPS];  // one polyphase branch of a filter

  // Daubechies 8-tap coefficients times 2**CF.
  localparam int H0 [TAPS] = '{  -174,    539,    505,  -3064,   -458,  10336,  11712,   3775};
  localparam int H1 [TAPS] = '{ -3775,  11712, -10336,   -458,   3064,    505,   -539,   -174};
  localparam int G0 [TAPS] = '{  3775,  11712,  10336,   -458,  -3064,    505,    539,   -174};
  localparam int G1 [TAPS] = '{  -174,   -539,    505,   3064,   -458, -10336,  11712,  -3775};

  // Polyphase branch p (0 = even taps, 1 = odd taps) of an 8-tap filter.
  function automatic branch_t branch_of(coef_t c, int p);
    branch_t b;
    for (int i = 0; i < PTAPS; i++) b[i] = c[2*i + p];
    return b;
  endfunction

  // Round an inner product carrying FRAC+CF fractional bits back to a sample
  // (round half up, then keep the low DW bits).
  function automatic sample_t round_acc(acc_t a);
    return sample_t'((a + (acc_t'(1) <<< (CF - 1))) >>> CF);
  endfunction

endpackage

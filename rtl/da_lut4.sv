// da_lut4: 4-input distributed-arithmetic look-up table.
//
// Holds the 16 partial sums of a 4-coefficient inner product: entry a is the
// sum of COEF[i] over the address bits i that are set. In a distributed-
// arithmetic filter the address is bit j of four tap samples, so the entry is
// that bit plane's contribution to the inner product. Splitting an 8-tap
// filter into two such tables (instead of one 256-entry table) follows the
// partitioned-LUT structure of the published design; here each table holds
// one polyphase branch of a filter. The table contents are computed at
// elaboration from the coefficient parameter, so retargeting to another
// wavelet only needs new coefficients.
//
// Interface: addr (bit i selects COEF[i]) -> value, purely combinational.
// The default coefficients are the even-phase taps of the analysis low-pass
// filter H0.
module da_lut4
  import dwt_pkg::*;
#(
  parameter int COEF [PTAPS] = '{H0[0], H0[2], H0[4], H0[6]}
) (
  input  logic [PTAPS-1:0] addr,
  output lut_word_t        value
);

  typedef lut_word_t table_t [2**PTAPS];

  function automatic table_t build_table();
    table_t t;
    for (int a = 0; a < 2**PTAPS; a++) begin
      int s;
      s = 0;
      for (int i = 0; i < PTAPS; i++)
        if (a[i]) s += COEF[i];
      t[a] = lut_word_t'(s);
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  assign value = TABLE[addr];

endmodule

// da_filter: partitioned-LUT distributed-arithmetic inner product of 8 taps.
//
// Computes sum_i COEF_A[i]*taps_a[i] + sum_i COEF_B[i]*taps_b[i] without
// multipliers. Every tap is a DW-bit two's-complement sample. For each bit
// position j the bits j of the four A taps address one da_lut4 and the bits j
// of the four B taps address a second one; the two LUT words are added (the
// two-input adder that replaces one 256-entry LUT) giving the bit-plane sum
// F_j. The result is sum_{j<DW-1} F_j*2^j - F_{DW-1}*2^{DW-1}: the sign bit
// plane is subtracted, as the two's-complement distributed-arithmetic
// identity requires.
//
// DA_BITS sets how many bit planes are evaluated per clock (it must divide
// DW); there is one LUT pair per plane evaluated in the same clock.
//  * DA_BITS = DW (default): all planes in one clock, summed by an adder
//    tree. One result per clock, latency 1. This meets the published rate of
//    one input sample per clock for the first octave.
//  * DA_BITS < DW: the published bit-serial organisation. On in_valid the
//    taps are loaded into parallel-to-serial shift registers; each clock
//    the next DA_BITS bit planes (LSB first) address the LUTs and a scaling
//    accumulator adds their sum weighted by 2^j. DA_BITS = 1 is the fully
//    bit-serial filter. STEPS = DW/DA_BITS clocks per result; the result
//    appears STEPS+1 clocks after in_valid, and a new in_valid is accepted in
//    the last step of the previous one (ready), so one result per STEPS
//    clocks.
// The published description uses bit-serial evaluation and also quotes one
// sample per clock; the default follows the rate, the option the structure.
//
// Reset (synchronous, active low) clears out_valid, result and the serial
// state.
module da_filter
  import dwt_pkg::*;
#(
  parameter int COEF_A [PTAPS] = '{H0[0], H0[2], H0[4], H0[6]},
  parameter int COEF_B [PTAPS] = '{H0[1], H0[3], H0[5], H0[7]},
  parameter int DA_BITS = DW
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t taps_a [PTAPS],
  input  sample_t taps_b [PTAPS],
  output logic    ready,
  output logic    out_valid,
  output acc_t    result
);

  localparam int STEPS = DW / DA_BITS;

  // Bit planes presented to the LUTs in this clock: plane b of this clock is
  // bit (step*DA_BITS + b) of every tap.
  sample_t   src_a [PTAPS], src_b [PTAPS];
  lut_word_t word_a [DA_BITS];
  lut_word_t word_b [DA_BITS];
  logic      sign_step;     // the planes of this clock include the sign bit

  for (genvar b = 0; b < DA_BITS; b++) begin : g_plane
    logic [PTAPS-1:0] addr_a, addr_b;
    for (genvar i = 0; i < PTAPS; i++) begin : g_addr
      assign addr_a[i] = src_a[i][b];
      assign addr_b[i] = src_b[i][b];
    end
    da_lut4 #(.COEF(COEF_A)) u_lut_a (.addr(addr_a), .value(word_a[b]));
    da_lut4 #(.COEF(COEF_B)) u_lut_b (.addr(addr_b), .value(word_b[b]));
  end

  // Weighted sum of this clock's planes, relative to the lowest of them.
  acc_t partial;
  always_comb begin
    partial = '0;
    for (int b = 0; b < DA_BITS; b++) begin
      acc_t plane;
      plane = (acc_t'(word_a[b]) + acc_t'(word_b[b])) <<< b;
      if (sign_step && b == DA_BITS - 1) partial = partial - plane;
      else                               partial = partial + plane;
    end
  end

  if (STEPS == 1) begin : g_parallel

    assign src_a     = taps_a;
    assign src_b     = taps_b;
    assign sign_step = 1'b1;
    assign ready     = 1'b1;

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        out_valid <= 1'b0;
        result    <= '0;
      end else begin
        out_valid <= in_valid;
        if (in_valid) result <= partial;
      end
    end

  end else begin : g_serial

    localparam int SW = $clog2(STEPS);

    sample_t       shift_a [PTAPS], shift_b [PTAPS];  // parallel-to-serial
    logic          busy;
    logic [SW-1:0] step;
    acc_t          acc;                                // scaling accumulator
    acc_t          acc_next;
    logic          last;

    assign src_a     = shift_a;
    assign src_b     = shift_b;
    assign last      = busy && (step == SW'(STEPS - 1));
    assign sign_step = (step == SW'(STEPS - 1));
    assign ready     = !busy || last;
    assign acc_next  = acc + (partial <<< (int'(step) * DA_BITS));

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        busy      <= 1'b0;
        step      <= '0;
        acc       <= '0;
        out_valid <= 1'b0;
        result    <= '0;
        for (int i = 0; i < PTAPS; i++) begin
          shift_a[i] <= '0;
          shift_b[i] <= '0;
        end
      end else begin
        out_valid <= last;
        if (last) result <= acc_next;
        if (in_valid && ready) begin
          for (int i = 0; i < PTAPS; i++) begin
            shift_a[i] <= taps_a[i];
            shift_b[i] <= taps_b[i];
          end
          busy <= 1'b1;
          step <= '0;
          acc  <= '0;
        end else if (busy) begin
          for (int i = 0; i < PTAPS; i++) begin
            shift_a[i] <= shift_a[i] >>> DA_BITS;
            shift_b[i] <= shift_b[i] >>> DA_BITS;
          end
          acc  <= acc_next;
          step <= step + SW'(1);
          if (last) busy <= 1'b0;
        end
      end
    end

  end

  a_accept_only_when_ready: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> ready)
    else $error("da_filter: new taps while the previous inner product is in progress");

  initial begin
    assert (DW % DA_BITS == 0) else $error("da_filter: DA_BITS must divide DW");
  end

endmodule

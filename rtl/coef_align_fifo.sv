// coef_align_fifo: delays a stream of detail (high-pass) coefficients by a
// fixed number of samples so that it meets the reconstructed low-pass stream
// of the same octave in the inverse transform.
//
// A one-octave analysis/synthesis pair with the 8-tap filters returns its
// input delayed by 7 samples, so the low-pass sequence rebuilt from deeper
// octaves lags the detail sequence of the same octave. This FIFO starts,
// after reset, holding DELAY zero samples (the zero history before the
// first coefficient); every push appends a detail coefficient and every pop
// hands the oldest one to the synthesis bank. The published design shows
// only the filter-bank tree; this alignment buffer is this design's way of
// pairing the streams.
//
// Interface: push/push_data, pop (read pop_data in the same cycle; it is the
// head of the FIFO). DEPTH must cover DELAY plus the samples in flight.
// Synchronous active-low reset. Assertions flag overflow and underflow.
module coef_align_fifo
  import dwt_pkg::*;
#(
  parameter int DELAY = 7,
  parameter int DEPTH = 32
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    push,
  input  sample_t push_data,
  input  logic    pop,
  output sample_t pop_data
);

  localparam int PW = $clog2(DEPTH);

  sample_t        mem [DEPTH];
  logic [PW-1:0]  wr_ptr, rd_ptr;
  logic [PW:0]    count;

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + PW'(1);
  endfunction

  assign pop_data = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
      wr_ptr <= PW'(DELAY % DEPTH);
      rd_ptr <= '0;
      count  <= (PW+1)'(DELAY);
    end else begin
      if (push) begin
        mem[wr_ptr] <= push_data;
        wr_ptr      <= next_ptr(wr_ptr);
      end
      if (pop) rd_ptr <= next_ptr(rd_ptr);
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n)
                                   !(push && !pop && count == (PW+1)'(DEPTH)));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   !(pop && count == '0));

  initial begin
    assert (DELAY < DEPTH) else $error("coef_align_fifo: DEPTH must exceed DELAY");
  end

endmodule

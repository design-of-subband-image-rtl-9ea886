// downsampler: the two down-by-2 boxes after the filter bank.
//
// Keeps the outputs of even index within each row or column (index 0 is the
// sample flagged in_first) and drops the odd ones, for the lowpass and the
// highpass branch together. Kept samples leave as 19-bit words (valid bit
// plus 18-bit float), one cycle after they arrive; so a row of N samples
// gives N/2 average and N/2 detail coefficients, at most one per two cycles.
//
// Keeping the even phase, restarted at each sequence, matches the data flow
// of the original design (outputs C(0), C(2), ... and D(0), D(2), ...).
module downsampler
  import dwt_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_first,
  input  fp18_t        lo_in,
  input  fp18_t        hi_in,
  output coef_stream_t avg,
  output coef_stream_t det
);
  logic odd;   // next sample has odd index
  logic keep;

  assign keep = in_valid & (in_first | ~odd);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      odd <= 1'b0;
      avg <= '0;
      det <= '0;
    end else begin
      if (in_valid) odd <= in_first ? 1'b1 : ~odd;
      avg.valid <= keep;
      det.valid <= keep;
      if (keep) begin
        avg.data <= lo_in;
        det.data <= hi_in;
      end
    end
  end
endmodule

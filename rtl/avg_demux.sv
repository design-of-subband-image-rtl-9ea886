// avg_demux: routes the average (lowpass) coefficients.
//
// During every pass but the last, average coefficients go to the RAM write
// path to be filtered again by the next pass; during the last pass they
// leave the encoder as its average-signal output. The 19-bit words (valid
// bit plus float) are passed on unregistered; the unused side carries a
// zero word. The routing rule is the original design's ("according to the
// input parameter").
module avg_demux
  import dwt_pkg::*;
(
  input  logic         last_pass,
  input  coef_stream_t in_avg,
  output coef_stream_t to_ram,
  output coef_stream_t to_out
);
  always_comb begin
    to_ram = '0;
    to_out = '0;
    if (last_pass) to_out = in_avg;
    else           to_ram = in_avg;
  end
endmodule

// dwt_filter_bank: one Daubechies-4 analysis cell that produces the lowpass
// (average) and highpass (detail) outputs of the same input sample in the
// same clock cycle.
//
// Structure (the original design's): each input sample x(n) is multiplied
// once by each of the four lowpass coefficients h0..h3, so only four
// multipliers serve both filters. The products then pass through delay
// lines placed after the multipliers; delay line k holds h_k*x(n-j) for
// j = 0..3. Because the highpass coefficients are the lowpass ones in
// reverse order with alternating sign, both filters read the same products:
//   lo(n) = h0 x(n) + h1 x(n-1) + h2 x(n-2) + h3 x(n-3)
//   hi(n) = -h3 x(n) + h2 x(n-1) - h1 x(n-2) + h0 x(n-3)
// (highpass taps g = [-h3, h2, -h1, h0], the signs of the printed
// coefficient table). The sign change is a flip of the float sign bit.
// Each output is a tree of three floating-point adders.
//
// Sequence boundaries: a sample with in_first set starts a new row or
// column. The older taps are cleared as it is loaded, so samples before the
// start count as zero (zero padding at the start of each sequence).
//
// Timing: one sample per cycle when in_valid is high; lo/hi for sample n
// appear two cycles after it, with out_valid and out_first. Clearing on
// in_first and the two-cycle pipeline are this design's choices.
module dwt_filter_bank
  import dwt_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_first,
  input  fp18_t x,
  input  fp18_t h [4],
  output logic  out_valid,
  output logic  out_first,
  output fp18_t lo,
  output fp18_t hi
);
  fp18_t prod [4];
  fp18_t dl [4][4];         // dl[k][j] = h_k * x(n-j)
  logic  ld_valid, ld_first;

  for (genvar k = 0; k < 4; k++) begin : g_mul
    fp_mul u_mul (.a(x), .b(h[k]), .y(prod[k]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 4; k++)
        for (int j = 0; j < 4; j++) dl[k][j] <= FP_ZERO;
      ld_valid <= 1'b0;
      ld_first <= 1'b0;
    end else begin
      ld_valid <= in_valid;
      ld_first <= in_valid & in_first;
      if (in_valid) begin
        for (int k = 0; k < 4; k++) begin
          dl[k][0] <= prod[k];
          for (int j = 1; j < 4; j++) dl[k][j] <= in_first ? FP_ZERO : dl[k][j-1];
        end
      end
    end
  end

  // lowpass adder tree: (h3 + h2 taps) + (h1 + h0 taps)
  fp18_t lo_a, lo_b, lo_sum;
  fp_add u_lo_a (.a(dl[3][3]), .b(dl[2][2]), .y(lo_a));
  fp_add u_lo_b (.a(dl[1][1]), .b(dl[0][0]), .y(lo_b));
  fp_add u_lo_s (.a(lo_a),     .b(lo_b),     .y(lo_sum));

  // highpass adder tree on the same products, sign bits converted
  fp18_t hi_a, hi_b, hi_sum;
  fp_add u_hi_a (.a(fp_neg(dl[3][0])), .b(dl[2][1]),         .y(hi_a));
  fp_add u_hi_b (.a(fp_neg(dl[1][2])), .b(dl[0][3]),         .y(hi_b));
  fp_add u_hi_s (.a(hi_a),             .b(hi_b),             .y(hi_sum));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      lo        <= FP_ZERO;
      hi        <= FP_ZERO;
    end else begin
      out_valid <= ld_valid;
      out_first <= ld_first;
      if (ld_valid) begin
        lo <= lo_sum;
        hi <= hi_sum;
      end
    end
  end
endmodule

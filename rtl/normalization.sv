// normalization: input stage of the DWT filter bank.
//
// Converts an 8-bit unsigned pixel to the 18-bit float of dwt_pkg and
// selects between that value and an 18-bit float read back from RAM (the
// average signal of the previous pass). Pixel value 0 becomes float zero;
// otherwise the position k of the leading one sets the exponent (bias + k)
// and the bits below it, left-aligned, form the mantissa, so every pixel is
// represented exactly. Combinational.
//
// The conversion and the image/RAM selection are the original design's;
// the exact encoding follows the number format chosen in dwt_pkg.
module normalization
  import dwt_pkg::*;
(
  input  logic [7:0] pix,
  input  fp18_t      ram_data,
  input  logic       sel_ram,   // 1: RAM data, 0: pixel
  output fp18_t      y
);
  fp18_t pix_fp;
  logic [MAN_W-1:0] shifted;

  always_comb begin
    pix_fp  = FP_ZERO;
    shifted = '0;
    for (int k = 0; k < 8; k++) begin
      if (pix[k]) begin
        pix_fp.exp = EXP_W'(EXP_BIAS + k);
        shifted    = MAN_W'(pix) << (MAN_W - k);
      end
    end
    pix_fp.man = shifted;
    y = sel_ram ? ram_data : pix_fp;
  end
endmodule

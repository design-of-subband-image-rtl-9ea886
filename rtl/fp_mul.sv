// fp_mul: 18-bit floating-point multiplier (1 sign, 6 exponent, 11 mantissa
// bits, format in dwt_pkg).
//
// The two 12-bit mantissas (hidden one restored) are multiplied by the
// radix-4 Booth multiplier. The 24-bit product lies in [1,4); it is
// normalised by at most one right shift, the exponent becomes
// ea + eb - bias (+1 after a shift) and the mantissa is truncated to 11 bits.
// A zero operand or an exponent underflow gives zero; an overflow saturates.
// Combinational; the sign is the XOR of the operand signs.
//
// The format and the Booth multiplier follow the original design; bias,
// truncation and saturation are this design's choices.
module fp_mul
  import dwt_pkg::*;
(
  input  fp18_t a,
  input  fp18_t b,
  output fp18_t y
);
  logic [MAN_W:0]       ma, mb;
  logic [2*MAN_W+1:0]   prod;
  logic signed [EXP_W+2:0] e;

  assign ma = {1'b1, a.man};
  assign mb = {1'b1, b.man};

  booth_mul #(.W(MAN_W + 1)) u_booth (.a(ma), .b(mb), .p(prod));

  always_comb begin
    e = (EXP_W+3)'(a.exp) + (EXP_W+3)'(b.exp) - (EXP_W+3)'(EXP_BIAS)
        + (EXP_W+3)'(prod[2*MAN_W+1]);
    y.sign = a.sign ^ b.sign;
    y.exp  = e[EXP_W-1:0];
    y.man  = prod[2*MAN_W+1] ? prod[2*MAN_W -: MAN_W] : prod[2*MAN_W-1 -: MAN_W];
    if (a.exp == '0 || b.exp == '0 || e <= 0) begin
      y = FP_ZERO;
    end else if (e > (EXP_W+3)'(EXP_MAX)) begin
      y.exp = '1;
      y.man = '1;
    end
  end
endmodule

// fp_add: 18-bit floating-point adder (format in dwt_pkg).
//
// The operand of larger magnitude is found by comparing {exponent, mantissa}.
// The other mantissa is shifted right by the exponent difference, keeping
// three guard bits. Equal signs add (one possible right shift), unequal
// signs subtract the smaller from the larger and renormalise with a leading
// zero count. The result takes the sign of the larger operand and its
// mantissa is truncated to 11 bits. An exact zero, an exponent underflow or
// an operand with exponent 0 follows the zero rules of dwt_pkg; an overflow
// saturates. Combinational.
//
// The word format is the original design's; the guard bits, truncation and
// special cases are this design's choices.
module fp_add
  import dwt_pkg::*;
(
  input  fp18_t a,
  input  fp18_t b,
  output fp18_t y
);
  localparam int MW = MAN_W + 4;   // hidden one + mantissa + 3 guard bits

  fp18_t            op_big, op_small;
  logic [EXP_W-1:0] d;
  logic [MW-1:0]    mbig, msmall;
  logic [MW:0]      sum;
  logic [MW:0]      norm;
  logic signed [EXP_W+2:0] e;
  int               lz;

  always_comb begin
    if ({a.exp, a.man} >= {b.exp, b.man}) begin
      op_big = a; op_small = b;
    end else begin
      op_big = b; op_small = a;
    end
    d      = op_big.exp - op_small.exp;
    mbig   = {1'b1, op_big.man, 3'b000};
    msmall = (op_small.exp == '0 || d >= EXP_W'(MW)) ? '0 : ({1'b1, op_small.man, 3'b000} >> d);
    if (op_big.sign == op_small.sign) sum = {1'b0, mbig} + {1'b0, msmall};
    else                        sum = {1'b0, mbig} - {1'b0, msmall};

    // leading zero count below the carry bit
    lz = MW;
    for (int i = 0; i < MW; i++) begin
      if (sum[i]) lz = MW - 1 - i;
    end

    e    = (EXP_W+3)'(op_big.exp);
    norm = sum;
    if (sum[MW]) begin
      norm = sum >> 1;
      e    = e + 1;
    end else begin
      norm = sum << lz;
      e    = e - (EXP_W+3)'(lz);
    end

    y.sign = op_big.sign;
    y.exp  = e[EXP_W-1:0];
    y.man  = norm[MW-2 -: MAN_W];
    if (a.exp == '0) begin
      y = b;
      if (b.exp == '0) y = FP_ZERO;
    end else if (b.exp == '0) begin
      y = a;
    end else if (sum == '0 || e <= 0) begin
      y = FP_ZERO;
    end else if (e > (EXP_W+3)'(EXP_MAX)) begin
      y.exp = '1;
      y.man = '1;
    end
  end
endmodule

// booth_mul: unsigned W x W multiplier using modified (radix-4) Booth
// recoding, as used for the mantissa product of the floating-point
// multiplier.
//
// The multiplier b is extended with a zero below its LSB and zeros above its
// MSB, then scanned in overlapping 3-bit groups. Each group selects one
// partial product from {0, +a, +2a, -a, -2a}, weighted by 4^i, so a W-bit
// operand needs only ceil((W+1)/2) partial products instead of W. The partial
// products are summed in two's complement and the low 2W bits are the exact
// unsigned product. Purely combinational.
//
// The original design names the radix-4 Booth algorithm; the summation as a
// plain adder chain (no Wallace tree) is this design's choice.
module booth_mul #(
  parameter int W = 12
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  localparam int NG = (W + 2) / 2;      // number of Booth groups
  localparam int XW = 2 * NG + 1;       // extended multiplier width
  localparam int SW = 2 * W + 4;        // accumulator width

  logic [XW-1:0] bx;
  assign bx = {{(XW - W - 1){1'b0}}, b, 1'b0};

  logic signed [SW-1:0] acc;
  logic signed [SW-1:0] a_ext;
  logic signed [SW-1:0] pp;

  assign a_ext = SW'(signed'({1'b0, a}));

  always_comb begin
    acc = '0;
    for (int i = 0; i < NG; i++) begin
      unique case (bx[2*i +: 3])
        3'b001, 3'b010: pp = a_ext;
        3'b011:         pp = a_ext <<< 1;
        3'b100:         pp = -(a_ext <<< 1);
        3'b101, 3'b110: pp = -a_ext;
        default:        pp = '0;
      endcase
      acc = acc + (pp <<< (2 * i));
    end
  end

  assign p = acc[2*W-1:0];
endmodule

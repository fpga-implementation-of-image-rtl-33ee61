// csd_precompute: precomputing unit of the DCT (multiplier-free).
//
// Multiplies one signed input X by all seven cosine basis values a..g of
// imgproc_pkg (8-bit, 7 fractional bits) using only shifts and additions.
// Following the paper, the odd multiples 1X, 3X and 5X are formed once,
// 3X = X + (X << 1) and 5X = X + (X << 2), and every product is built from
// shifted copies of these shared terms (Horner's rule on the CSD digits):
//   a*X = 64X - X            (0100 000-1)
//   b*X = 64X - 8X + 3X      (0100 -1011)
//   c*X = (3X << 4) + 5X     (0011 0101)
//   d*X = (5X << 3) + 5X     (0010 1101)
//   e*X = (3X << 3) + (3X << 2)  (0010 0100)
//   f*X = 3X << 3            (0001 1000)
//   g*X = 3X << 2            (0000 1100)
// The c and g decompositions are the paper's; the others are chosen here
// in the same style. Products are full precision (not yet divided by 128).
//
// Ports: x (signed IN_W), prod[K_A..K_G] (signed IN_W+7). Purely combinational.
module csd_precompute
  import imgproc_pkg::*;
#(
  parameter int unsigned IN_W = 9
) (
  input  logic signed [IN_W-1:0]   x,
  output logic signed [IN_W+6:0]   prod [7]
);
  localparam int unsigned PW = IN_W + 7;

  logic signed [PW-1:0] x1, x3, x5;

  always_comb begin
    x1 = PW'(x);
    x3 = x1 + (x1 <<< 1);
    x5 = x1 + (x1 <<< 2);
    prod[K_A] = (x1 <<< 6) - x1;
    prod[K_B] = (x1 <<< 6) - (x1 <<< 3) + x3;
    prod[K_C] = (x3 <<< 4) + x5;
    prod[K_D] = (x5 <<< 3) + x5;
    prod[K_E] = (x3 <<< 3) + (x3 <<< 2);
    prod[K_F] = x3 <<< 3;
    prod[K_G] = x3 <<< 2;
  end
endmodule

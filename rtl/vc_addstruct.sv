// vc_addstruct: addition structure of a vertical-crosswise multiplier.
//
// For operands split into halves of H bits, x = xh:xl and y = yh:yl, the four
// 2H-bit partial products are
//   P = xl*yl,  Q = xl*yh,  R = xh*yl,  T = xh*yh,
// and the product is P + (Q + R) << H + T << 2H. The low H bits of P are
// final at once. At weight 2^H three 2H-bit rows overlap:
//   {R[2H-1:H], P[2H-1:H]},  {Q[2H-1:H], R[H-1:0]},  {T[H-1:0], Q[H-1:0]}
// A row of 2H full adders reduces them to a sum word S and a carry word C
// (carry-save). S[0] is final. One (3H-1)-bit carry-propagate adder then adds
// {T[2H-1:H], S[2H-1:1]} and C, giving Z, and the product is {Z, S[0], P[H-1:0]}.
// With H = 4 this is 8 full adders and an 11-bit adder, with H = 8 it is 16
// full adders and a 23-bit adder, as in the design. The row grouping follows
// the design's addition-structure drawings; the parameterisation over H is
// this implementation's.
//
// Interface: combinational; p, q, r, t are 2H bits, z is 4H bits. z is exact
// whenever p, q, r, t are true half products (their sum then fits 4H bits).
module vc_addstruct #(
  parameter int unsigned H = 4
) (
  input  logic [2*H-1:0] p,
  input  logic [2*H-1:0] q,
  input  logic [2*H-1:0] r,
  input  logic [2*H-1:0] t,
  output logic [4*H-1:0] z
);

  logic [2*H-1:0] row_a, row_b, row_c;
  logic [2*H-1:0] s, c;
  logic [3*H-2:0] zc;

  assign row_a = {r[2*H-1:H], p[2*H-1:H]};
  assign row_b = {q[2*H-1:H], r[H-1:0]};
  assign row_c = {t[H-1:0],   q[H-1:0]};

  // 2H full adders (carry-save row)
  always_comb begin
    for (int i = 0; i < 2*H; i++) begin
      s[i] = row_a[i] ^ row_b[i] ^ row_c[i];
      c[i] = (row_a[i] & row_b[i]) | (row_a[i] & row_c[i]) | (row_b[i] & row_c[i]);
    end
  end

  // (3H-1)-bit carry-propagate adder
  assign zc = {t[2*H-1:H], s[2*H-1:1]} + {{(H-1){1'b0}}, c};

  assign z = {zc, s[0], p[H-1:0]};

endmodule

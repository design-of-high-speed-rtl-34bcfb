// vc_mult8: 8x8 unsigned binary multiplier, vertical-crosswise form.
//
// The operands are split into nibbles. Four 4x4 products are formed in
// parallel: the vertical ones P = x[3:0]*y[3:0] and T = x[7:4]*y[7:4], and the
// crosswise ones Q = x[3:0]*y[7:4] and R = x[7:4]*y[3:0]. The addition
// structure (8 full adders and an 11-bit adder) combines them into the 16-bit
// product. Structure as in the design; fully combinational.
//
// Interface: z = x * y.
module vc_mult8 (
  input  logic [7:0]  x,
  input  logic [7:0]  y,
  output logic [15:0] z
);

  logic [7:0] p, q, r, t;

  vc_mult4 u_p (.x(x[3:0]), .y(y[3:0]), .z(p));
  vc_mult4 u_q (.x(x[3:0]), .y(y[7:4]), .z(q));
  vc_mult4 u_r (.x(x[7:4]), .y(y[3:0]), .z(r));
  vc_mult4 u_t (.x(x[7:4]), .y(y[7:4]), .z(t));

  vc_addstruct #(.H(4)) u_add (.p(p), .q(q), .r(r), .t(t), .z(z));

endmodule

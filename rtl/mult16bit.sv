// mult16bit: 16x16 unsigned binary multiplier, vertical-crosswise form.
//
// The same scheme as the 8-bit multiplier one level up: the operands are
// split into bytes, four 8x8 crosswise products are formed in parallel,
// P = x[7:0]*y[7:0] and T = x[15:8]*y[15:8] (vertical), Q = x[7:0]*y[15:8] and
// R = x[15:8]*y[7:0] (crosswise), and the addition structure (16 full adders
// and a 23-bit adder) combines them into the 32-bit product. Structure and
// port names as in the design; fully combinational.
//
// Interface: z = x * y.
module mult16bit (
  input  logic [15:0] x,
  input  logic [15:0] y,
  output logic [31:0] z
);

  logic [15:0] p, q, r, t;

  vc_mult8 u_p (.x(x[7:0]),  .y(y[7:0]),  .z(p));
  vc_mult8 u_q (.x(x[7:0]),  .y(y[15:8]), .z(q));
  vc_mult8 u_r (.x(x[15:8]), .y(y[7:0]),  .z(r));
  vc_mult8 u_t (.x(x[15:8]), .y(y[15:8]), .z(t));

  vc_addstruct #(.H(8)) u_add (.p(p), .q(q), .r(r), .t(t), .z(z));

endmodule

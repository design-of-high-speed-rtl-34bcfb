// bcd2bin: 4-digit BCD to 16-bit binary converter, purely combinational.
//
// The value d3*1000 + d2*100 + d1*10 + d0 is formed from shifts and adds only:
//   1000 = 1024 - 16 - 8,   100 = 64 + 32 + 4,   10 = 8 + 2.
// The thousands digit feeds a Wallace adder (WA) of d3<<4 and d3<<3 whose
// sum is subtracted (WS) from d3<<10; the subtraction is an addition of the
// one's complement with a carry-in of 1 (two's complement). The hundreds and
// tens digits each feed a Wallace adder of their shifted copies, and a final
// Wallace adder sums the three branch results with the units digit. This
// branch structure and the constants follow the design; the widths (all 16
// bit, modulo 2^16) are this implementation's choice: every intermediate
// result of a valid input is below 2^16, so nothing is lost.
//
// Interface: x[15:12] is the thousands digit, x[3:0] the units digit; y is
// the binary value. Digit codes above 9 are not checked; they are weighted
// like any other 4-bit value.
module bcd2bin (
  input  logic [15:0] x,
  output logic [15:0] y
);

  logic [15:0] d3, d2, d1, d0;
  logic [15:0] wa3, ws3, wa2, wa1;

  assign d3 = {12'd0, x[15:12]};
  assign d2 = {12'd0, x[11:8]};
  assign d1 = {12'd0, x[7:4]};
  assign d0 = {12'd0, x[3:0]};

  // thousands: (d3<<10) - ((d3<<4) + (d3<<3))
  wallace_add #(.N(2), .W(16)) u_wa3 (.ops({d3 << 4, d3 << 3}), .cin(1'b0), .sum(wa3));
  wallace_add #(.N(2), .W(16)) u_ws3 (.ops({d3 << 10, ~wa3}),   .cin(1'b1), .sum(ws3));
  // hundreds: (d2<<6) + (d2<<5) + (d2<<2)
  wallace_add #(.N(3), .W(16)) u_wa2 (.ops({d2 << 6, d2 << 5, d2 << 2}), .cin(1'b0), .sum(wa2));
  // tens: (d1<<3) + (d1<<1)
  wallace_add #(.N(2), .W(16)) u_wa1 (.ops({d1 << 3, d1 << 1}), .cin(1'b0), .sum(wa1));
  // final adder
  wallace_add #(.N(4), .W(16)) u_wa  (.ops({ws3, wa2, wa1, d0}), .cin(1'b0), .sum(y));

endmodule

// vc_mult4: 4x4 unsigned binary multiplier, combinational.
//
// This is the leaf product of the crosswise multiplier tree: each arrow of
// the 8-bit crosswise multiplication is one 4x4 product. The design names
// this block but does not detail it, so it is built here as the plain array
// form: four AND rows, each shifted by its multiplier bit position, summed.
//
// Interface: z = x * y, 8 bits, no rounding or overflow.
module vc_mult4 (
  input  logic [3:0] x,
  input  logic [3:0] y,
  output logic [7:0] z
);

  always_comb begin
    z = '0;
    for (int i = 0; i < 4; i++)
      z = z + ({4'd0, x & {4{y[i]}}} << i);
  end

endmodule

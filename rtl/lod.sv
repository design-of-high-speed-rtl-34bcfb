// lod: leading-one detector.
//
// Returns the position of the most significant 1 of v counted from 1, that
// is the bit length of v (0 when v is zero). The binary-to-BCD converter
// compares this length with the length of 10^k to skip subtractions that
// cannot succeed. Combinational priority scan; the design gives only the
// function of this block.
//
// Interface: v is W bits, len is $clog2(W+1) bits.
module lod #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0]         v,
  output logic [$clog2(W+1)-1:0] len
);

  always_comb begin
    len = '0;
    for (int i = 0; i < W; i++)
      if (v[i]) len = ($clog2(W+1))'(i + 1);
  end

endmodule

// wallace_add: multi-operand adder built as a Wallace (carry-save) tree.
//
// N operands of W bits are summed modulo 2^W, plus a carry-in. While more
// than two operands remain, they are taken in groups of three and each
// group is reduced by a row of W full adders to a sum word and a carry word
// (the carry word shifted up one place); operands left over pass to the
// next level unchanged. The number of operands at each level is worked
// out at elaboration time by the function ops_at(). The last two
// words go to one carry-propagate adder, where the carry-in enters, which
// lets a two's-complement subtraction (one's complement plus 1) be folded
// into the tree. The design names these Wallace adders (WA) and the
// subtracting one (WS) without detailing them; this tree is the textbook
// form of that name.
//
// Interface: combinational; ops[i] is operand i, sum = (sum of ops + cin)
// mod 2^W. N >= 1.
module wallace_add #(
  parameter int unsigned N = 3,
  parameter int unsigned W = 16
) (
  input  logic [N-1:0][W-1:0] ops,
  input  logic                cin,
  output logic [W-1:0]        sum
);

  // operands left after s levels of 3:2 reduction
  function automatic int unsigned ops_at(input int unsigned s);
    int unsigned c;
    c = N;
    for (int unsigned i = 0; i < s; i++)
      if (c > 2) c = 2 * (c / 3) + (c % 3);
    return c;
  endfunction

  // number of levels until at most two operands remain
  function automatic int unsigned n_levels();
    int unsigned s;
    s = 0;
    while (ops_at(s) > 2) s++;
    return s;
  endfunction

  localparam int unsigned S = n_levels();

  logic [N-1:0][W-1:0] lvl [S+1];

  assign lvl[0] = ops;

  for (genvar s = 0; s < S; s++) begin : g_level
    localparam int unsigned C  = ops_at(s);
    localparam int unsigned G  = C / 3;          // full-adder rows
    localparam int unsigned NN = ops_at(s + 1);  // operands at next level
    for (genvar g = 0; g < G; g++) begin : g_fa_row
      logic [W-1:0] a, b, c;
      assign a = lvl[s][3*g];
      assign b = lvl[s][3*g+1];
      assign c = lvl[s][3*g+2];
      assign lvl[s+1][2*g]   = a ^ b ^ c;
      assign lvl[s+1][2*g+1] = {((a[W-2:0] & b[W-2:0]) | (a[W-2:0] & c[W-2:0]) | (b[W-2:0] & c[W-2:0])), 1'b0};
    end
    for (genvar i = 2*G; i < N; i++) begin : g_pass
      if (i < NN) begin : g_op
        assign lvl[s+1][i] = lvl[s][i + G];
      end else begin : g_zero
        assign lvl[s+1][i] = '0;
      end
    end
  end

  // carry-propagate adder with the carry-in
  if (N == 1) begin : g_one
    assign sum = lvl[S][0] + W'(cin);
  end else begin : g_cpa
    assign sum = lvl[S][0] + lvl[S][1] + W'(cin);
  end

endmodule

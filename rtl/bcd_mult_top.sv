// bcd_mult_top: 4-digit x 4-digit BCD multiplier.
//
// The BCD operands are converted to binary, multiplied in binary and the
// product converted back to BCD:
//   a --bcd2bin--\
//                 mult16bit (16x16 vertical-crosswise) -- bin2bcd --> bcd_out
//   b --bcd2bin--/
// Both converters to binary and the multiplier are combinational; the
// binary-to-BCD converter is a clocked, free-running subtraction machine
// that re-samples the product after each conversion. The chain of blocks
// and the instance names follow the design; the done output is added by
// this implementation so that a user can tell when bcd_out is fresh.
//
// Timing: when a and b change, bcd_out holds the new product after at most
// two conversions (the one in progress, then one on the new inputs), each
// at most 72 cycles. done pulses for one cycle whenever bcd_out is written.
// reset is synchronous and active high.
module bcd_mult_top
  import bcd_pkg::*;
(
  input  logic                 clk,
  input  logic                 reset,
  input  logic [OP_BITS-1:0]   a,
  input  logic [OP_BITS-1:0]   b,
  output logic [PROD_BITS-1:0] bcd_out,
  output logic                 done
);

  logic [OP_BITS-1:0]   bin_a, bin_b;
  logic [PROD_BITS-1:0] bin_prod;

  bcd2bin ruchi1 (.x(a), .y(bin_a));
  bcd2bin ruchi2 (.x(b), .y(bin_b));

  mult16bit ruchi3 (.x(bin_a), .y(bin_b), .z(bin_prod));

  bin2bcd #(.WIDTH(PROD_BITS), .DIGITS(PROD_DIGITS)) ruchi4 (
    .clk       (clk),
    .reset     (reset),
    .binary_in (bin_prod),
    .bcd       (bcd_out),
    .done      (done)
  );

endmodule

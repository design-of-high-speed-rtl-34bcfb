// bin2bcd: sequential binary-to-BCD converter by repeated subtraction.
//
// The binary input is converted one decimal digit at a time, from the
// highest power of ten down. For digit k (k = DIGITS-1 .. 1) the working
// remainder is compared, through a leading-one detector, with the bit length
// of 10^k. If it is shorter the digit is finished at once (the subtraction
// cannot succeed). Otherwise 10^k is subtracted; a non-negative difference
// replaces the remainder and the digit counter is incremented, and the test
// repeats. A negative difference is discarded (the remainder before the
// subtraction is kept, i.e. restored) and the converter moves to the next
// digit. What is left after the tens digit is the units digit. The LOD test,
// the subtract / restore loop and the digit counters follow the design; the
// generalisation from three to DIGITS-1 powers of ten, the state encoding,
// the free-running operation and the done pulse are this implementation's.
//
// Operation is free running: after reset it loads binary_in, converts it,
// writes all digits to bcd together and pulses done for one cycle, then
// loads binary_in again. bcd therefore always holds a complete result.
//
// Timing: one cycle to load, one cycle per subtraction and one more per
// digit k >= 1 to finish that digit, one cycle to write the result. With
// digits d_k, done pulses every 2 + (DIGITS-1) + sum_{k>=1} d_k cycles
// (9 + sum for DIGITS = 8; at most 72). The input must be below 10^DIGITS.
// reset is synchronous and active high.
module bin2bcd
  import bcd_pkg::*;
#(
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned DIGITS = 8
) (
  input  logic                  clk,
  input  logic                  reset,
  input  logic [WIDTH-1:0]      binary_in,
  output logic [4*DIGITS-1:0]   bcd,
  output logic                  done
);

  localparam int unsigned LW = $clog2(WIDTH + 1);
  localparam int unsigned KW = (DIGITS > 2) ? $clog2(DIGITS) : 1;

  typedef enum logic [1:0] {S_LOAD, S_CONV, S_DONE} state_t;

  state_t                      state;
  logic [WIDTH-1:0]            rem;
  bcd_digit_t [DIGITS-1:1]     dig;
  logic [KW-1:0]               k;

  // Constant tables: 10^k and its bit length
  logic [DIGITS-1:0][WIDTH-1:0] p10_tab;
  logic [DIGITS-1:0][LW-1:0]    len_tab;
  for (genvar i = 0; i < DIGITS; i++) begin : g_tab
    assign p10_tab[i] = WIDTH'(pow10(i));
    assign len_tab[i] = LW'(bitlen(pow10(i)));
  end

  logic [LW-1:0]    rem_len;
  logic             try_sub;    // LOD says a subtraction may succeed
  logic             borrow;     // subtraction went negative
  logic [WIDTH-1:0] diff;

  lod #(.W(WIDTH)) u_lod (.v(rem), .len(rem_len));

  always_comb begin
    try_sub        = (rem_len >= len_tab[k]);
    {borrow, diff} = {1'b0, rem} - {1'b0, p10_tab[k]};
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= S_LOAD;
      rem   <= '0;
      dig   <= '0;
      k     <= KW'(DIGITS - 1);
      bcd   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_LOAD: begin
          rem   <= binary_in;
          dig   <= '0;
          k     <= KW'(DIGITS - 1);
          state <= S_CONV;
        end
        S_CONV: begin
          if (try_sub && !borrow) begin
            rem    <= diff;
            dig[k] <= dig[k] + 4'd1;
          end else if (k == KW'(1)) begin
            state <= S_DONE;
          end else begin
            k <= k - KW'(1);
          end
        end
        S_DONE: begin
          bcd   <= {dig, rem[3:0]};
          done  <= 1'b1;
          state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // The input must have no more than DIGITS decimal digits.
  a_in_range: assert property (@(posedge clk) disable iff (reset)
    (state == S_LOAD) |-> (64'(binary_in) < 64'(pow10(DIGITS))));

  // A digit never counts past 9.
  a_digit: assert property (@(posedge clk) disable iff (reset)
    (state == S_CONV && try_sub && !borrow) |-> (dig[k] != 4'd9));

endmodule

// tb_wallace_add: test of the carry-save multi-operand adder.
// Trees of 1, 2, 3, 4, 5 and 9 operands of 16 bits get the same random
// operands and carry-in; each sum is compared with the modulo-2^16 sum of
// its operands worked out here. All-ones operands are included.
module tb_wallace_add;
  localparam int W = 16;
  logic [8:0][W-1:0] v;
  logic              cin;
  logic [W-1:0]      s1, s2, s3, s4, s5, s9;
  int checks = 0, failures = 0;

  wallace_add #(.N(1), .W(W)) d1 (.ops(v[0:0]), .cin(cin), .sum(s1));
  wallace_add #(.N(2), .W(W)) d2 (.ops(v[1:0]), .cin(cin), .sum(s2));
  wallace_add #(.N(3), .W(W)) d3 (.ops(v[2:0]), .cin(cin), .sum(s3));
  wallace_add #(.N(4), .W(W)) d4 (.ops(v[3:0]), .cin(cin), .sum(s4));
  wallace_add #(.N(5), .W(W)) d5 (.ops(v[4:0]), .cin(cin), .sum(s5));
  wallace_add #(.N(9), .W(W)) d9 (.ops(v),      .cin(cin), .sum(s9));

  function automatic logic [W-1:0] ref_sum(input int n);
    logic [W-1:0] r;
    r = W'(cin);
    for (int i = 0; i < n; i++) r += v[i];
    return r;
  endfunction

  task automatic chk(input logic [W-1:0] got, input int n);
    checks++;
    if (got !== ref_sum(n)) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d got %h expected %h", n, got, ref_sum(n));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      for (int i = 0; i < 9; i++) v[i] = W'($urandom);
      cin = 1'($urandom);
      if (n == 0) begin v = '1; cin = 1'b1; end
      #1;
      chk(s1, 1); chk(s2, 2); chk(s3, 3); chk(s4, 4); chk(s5, 5); chk(s9, 9);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

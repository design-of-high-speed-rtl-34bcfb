// tb_mult16bit: test of the 16x16 crosswise multiplier with corner cases,
// the worked example 0x05B0 * 0x066D = 0x00248BF0 and 50000 random pairs.
module tb_mult16bit;
  logic [15:0] x, y;
  logic [31:0] z;
  int checks = 0, failures = 0;

  mult16bit dut (.x(x), .y(y), .z(z));

  task automatic check(input logic [15:0] a, input logic [15:0] b);
    logic [63:0] e;
    e = 64'(a) * 64'(b);
    x = a; y = b; #1;
    checks++;
    if (z !== e[31:0]) begin
      failures++;
      if (failures < 10) $display("FAIL %h*%h=%h expected %h", a, b, z, e[31:0]);
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
    check(16'h0000, 16'h0000);
    check(16'hffff, 16'hffff);
    check(16'hffff, 16'h0001);
    check(16'h00ff, 16'hff00);
    check(16'h270f, 16'h270f);
    check(16'h05b0, 16'h066d);
    checks++; if (z !== 32'h00248bf0) failures++;
    for (int n = 0; n < 50000; n++) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

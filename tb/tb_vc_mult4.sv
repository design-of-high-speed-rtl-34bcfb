// tb_vc_mult4: exhaustive test of the 4x4 leaf multiplier (256 cases),
// against the product computed here by repeated addition.
module tb_vc_mult4;
  logic [3:0] x, y;
  logic [7:0] z;
  int checks = 0, failures = 0;

  vc_mult4 dut (.x(x), .y(y), .z(z));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        int e;
        e = 0;
        for (int n = 0; n < j; n++) e += i;
        x = 4'(i); y = 4'(j); #1;
        checks++;
        if (z !== 8'(e)) begin
          failures++;
          $display("FAIL %0d*%0d=%0d expected %0d", i, j, z, e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

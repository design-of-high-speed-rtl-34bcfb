// tb_vc_mult8: exhaustive test of the 8x8 crosswise multiplier (65536 cases).
module tb_vc_mult8;
  logic [7:0]  x, y;
  logic [15:0] z;
  int checks = 0, failures = 0;

  vc_mult8 dut (.x(x), .y(y), .z(z));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        x = 8'(i); y = 8'(j); #1;
        checks++;
        if (z !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d=%0d", i, j, z);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

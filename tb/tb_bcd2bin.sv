// tb_bcd2bin: exhaustive test of the BCD-to-binary converter.
// Every 4-digit BCD code 0000..9999 is applied and y is compared with
// d3*1000 + d2*100 + d1*10 + d0 computed here. Includes the operands of the
// worked example 1456 (0x05B0) and 1645 (0x066D).
module tb_bcd2bin;
  logic [15:0] x, y;
  int checks = 0, failures = 0;

  bcd2bin dut (.x(x), .y(y));

  task automatic check(input int v);
    int d3, d2, d1, d0;
    d3 = v / 1000; d2 = (v / 100) % 10; d1 = (v / 10) % 10; d0 = v % 10;
    x = {4'(d3), 4'(d2), 4'(d1), 4'(d0)};
    #1;
    checks++;
    if (y !== 16'(v)) begin
      failures++;
      if (failures < 10) $display("FAIL x=%h y=%h expected %h", x, y, 16'(v));
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
    for (int v = 0; v < 10000; v++) check(v);
    x = 16'h1456; #1; checks++; if (y !== 16'h05b0) failures++;
    x = 16'h1645; #1; checks++; if (y !== 16'h066d) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

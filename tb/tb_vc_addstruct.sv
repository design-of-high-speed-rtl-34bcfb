// tb_vc_addstruct: test of the crosswise addition structure.
// For H = 4 every pair of 8-bit operands is split into nibbles, the four
// half products P, Q, R, T are formed here and the structure's result is
// compared with the full product. For H = 8 random operand pairs are used.
module tb_vc_addstruct;
  logic [7:0]  p4, q4, r4, t4;
  logic [15:0] z4;
  logic [15:0] p8, q8, r8, t8;
  logic [31:0] z8;
  int checks = 0, failures = 0;

  vc_addstruct #(.H(4)) dut4 (.p(p4), .q(q4), .r(r4), .t(t4), .z(z4));
  vc_addstruct #(.H(8)) dut8 (.p(p8), .q(q8), .r(r8), .t(t8), .z(z8));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        p4 = 8'((a % 16) * (b % 16));
        q4 = 8'((a % 16) * (b / 16));
        r4 = 8'((a / 16) * (b % 16));
        t4 = 8'((a / 16) * (b / 16));
        #1;
        checks++;
        if (z4 !== 16'(a * b)) begin
          failures++;
          if (failures < 10) $display("FAIL H=4 %0d*%0d -> %0d", a, b, z4);
        end
      end
    for (int n = 0; n < 20000; n++) begin
      logic [15:0] a, b;
      logic [31:0] e;
      a = 16'($urandom); b = 16'($urandom);
      if (n == 0) begin a = 16'hffff; b = 16'hffff; end
      p8 = 16'(a[7:0]) * 16'(b[7:0]);
      q8 = 16'(a[7:0]) * 16'(b[15:8]);
      r8 = 16'(a[15:8]) * 16'(b[7:0]);
      t8 = 16'(a[15:8]) * 16'(b[15:8]);
      e  = 32'(a) * 32'(b);
      #1;
      checks++;
      if (z8 !== e) begin
        failures++;
        if (failures < 10) $display("FAIL H=8 %h*%h -> %h expected %h", a, b, z8, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_lod: test of the leading-one detector: zero, every single bit, every
// bit with random lower bits, and the example value 0xD82 (length 12).
module tb_lod;
  logic [31:0] v;
  logic [5:0]  len;
  int checks = 0, failures = 0;

  lod #(.W(32)) dut (.v(v), .len(len));

  task automatic check(input logic [31:0] val, input int exp_len);
    v = val; #1;
    checks++;
    if (len !== 6'(exp_len)) begin
      failures++;
      $display("FAIL v=%h len=%0d expected %0d", val, len, exp_len);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'd0, 0);
    check(32'hd82, 12);
    for (int i = 0; i < 32; i++) begin
      logic [31:0] low;
      check(32'd1 << i, i + 1);
      low = (i == 0) ? 32'd0 : (32'($urandom) & ((32'd1 << i) - 32'd1));
      check((32'd1 << i) | low, i + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bcd_mult_top: end-to-end test of the 4-digit BCD multiplier.
// Operand pairs are applied and held; after the second done pulse bcd_out is
// compared with the decimal product worked out here, and the time from the
// operand change to that pulse must stay within two conversions (144
// cycles). Pairs: the worked example 1456 x 1645 = 2395120, zero, one,
// 9999 x 9999 = 99980001, and random 4-digit operands. The converter's step
// kinds (subtraction kept, subtraction restored, digit skipped by the
// leading-one test) are counted and each must occur.
module tb_bcd_mult_top;
  logic        clk = 1'b0, reset;
  logic [15:0] a, b;
  logic [31:0] bcd_out;
  logic        done;
  int checks = 0, failures = 0;
  int n_sub = 0, n_restore = 0, n_skip = 0;

  bcd_mult_top dut (.clk(clk), .reset(reset), .a(a), .b(b), .bcd_out(bcd_out), .done(done));

  always #5 clk = ~clk;

  always @(posedge clk) if (!reset && dut.ruchi4.state == 2'd1) begin
    if (!dut.ruchi4.try_sub)     n_skip++;
    else if (dut.ruchi4.borrow)  n_restore++;
    else                         n_sub++;
  end

  function automatic logic [31:0] to_bcd(input int unsigned v, input int nd);
    logic [31:0] r;
    r = '0;
    for (int i = 0; i < nd; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  task automatic run(input int unsigned x, input int unsigned y);
    int cyc;
    a = 16'(to_bcd(x, 4));
    b = 16'(to_bcd(y, 4));
    cyc = 0;
    do begin @(posedge clk); cyc++; end while (!done);
    do begin @(posedge clk); cyc++; end while (!done);
    checks++;
    if (bcd_out !== to_bcd(x * y, 8)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d x %0d -> %h expected %h", x, y, bcd_out, to_bcd(x * y, 8));
    end
    checks++;
    if (cyc > 144) begin
      failures++;
      if (failures < 10) $display("FAIL %0d x %0d took %0d cycles", x, y, cyc);
    end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; a = '0; b = '0;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    run(1456, 1645);
    checks++;
    if (bcd_out !== 32'h02395120) begin failures++; $display("FAIL example"); end
    run(0, 0);
    run(1, 9999);
    run(9999, 9999);
    run(1000, 1000);
    for (int n = 0; n < 3000; n++) run($urandom % 10000, $urandom % 10000);
    $display("steps: subtract=%0d restore=%0d lod_skip=%0d", n_sub, n_restore, n_skip);
    checks++; if (n_sub == 0)     begin failures++; $display("FAIL no subtraction kept"); end
    checks++; if (n_restore == 0) begin failures++; $display("FAIL no restore"); end
    checks++; if (n_skip == 0)    begin failures++; $display("FAIL no LOD skip"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

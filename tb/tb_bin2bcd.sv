// tb_bin2bcd: test of the subtracting binary-to-BCD converter.
// Each value is held on binary_in until two done pulses have been seen; the
// BCD result after the second is compared with digits computed here by
// division, and the number of cycles between the two pulses with
// 9 + (sum of digits 7..1), the converter's cycle budget. Values: the
// worked example 3458 (0xD82), 0, 99999999, 99980001 (9999*9999), powers of
// ten and their neighbours, and random values below 10^8. The testbench also
// counts how often each step kind occurs: a subtraction kept, a subtraction
// restored, and a digit skipped by the leading-one test. A second instance
// with 4 digits (powers 1000, 100, 10 only) converts every value 0..9999 and
// is checked the same way, with 5 + (sum of digits 3..1) cycles.
module tb_bin2bcd;
  logic        clk = 1'b0, reset;
  logic [31:0] binary_in, bcd;
  logic        done;
  int checks = 0, failures = 0;
  int n_sub = 0, n_restore = 0, n_skip = 0;

  bin2bcd dut (.clk(clk), .reset(reset), .binary_in(binary_in), .bcd(bcd), .done(done));

  logic [15:0] bin4, bcd4;
  logic        done4;
  bin2bcd #(.WIDTH(16), .DIGITS(4)) dut4 (.clk(clk), .reset(reset), .binary_in(bin4), .bcd(bcd4), .done(done4));

  always #5 clk = ~clk;

  // step kinds, sampled in the conversion state
  always @(posedge clk) if (!reset && dut.state == 2'd1) begin
    if (!dut.try_sub)     n_skip++;
    else if (dut.borrow)  n_restore++;
    else                  n_sub++;
  end

  function automatic logic [31:0] to_bcd(input int unsigned v);
    logic [31:0] r;
    for (int i = 0; i < 8; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  task automatic run(input int unsigned v);
    int c0, c1, cyc, exp_cyc;
    logic [31:0] e;
    binary_in = v;
    e = to_bcd(v);
    exp_cyc = 9;
    for (int i = 1; i < 8; i++) exp_cyc += int'(e[4*i +: 4]);
    cyc = 0;
    do begin @(posedge clk); cyc++; end while (!done);
    c0 = cyc;
    do begin @(posedge clk); cyc++; end while (!done);
    c1 = cyc;
    checks++;
    if (bcd !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %0d -> %h expected %h", v, bcd, e);
    end
    checks++;
    if (c1 - c0 != exp_cyc) begin
      failures++;
      if (failures < 10) $display("FAIL %0d took %0d cycles expected %0d", v, c1 - c0, exp_cyc);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run4(input int unsigned v);
    int c0, c1, cyc, exp_cyc;
    logic [15:0] e;
    bin4 = 16'(v);
    e = 16'(to_bcd(v));
    exp_cyc = 5 + int'(e[15:12]) + int'(e[11:8]) + int'(e[7:4]);
    cyc = 0;
    do begin @(posedge clk); cyc++; end while (!done4);
    c0 = cyc;
    do begin @(posedge clk); cyc++; end while (!done4);
    c1 = cyc;
    checks++;
    if (bcd4 !== e) begin
      failures++;
      if (failures < 10) $display("FAIL 4-digit %0d -> %h expected %h", v, bcd4, e);
    end
    checks++;
    if (c1 - c0 != exp_cyc) begin
      failures++;
      if (failures < 10) $display("FAIL 4-digit %0d took %0d cycles expected %0d", v, c1 - c0, exp_cyc);
    end
  endtask

  initial begin
    reset = 1'b1; binary_in = '0; bin4 = '0;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    run(3458);
    checks++; if (bcd !== 32'h00003458) failures++;
    run(0);
    run(99999999);
    run(99980001);
    for (int k = 1; k < 8; k++) begin
      int unsigned p;
      p = 1;
      for (int i = 0; i < k; i++) p *= 10;
      run(p - 1); run(p); run(p + 1);
    end
    for (int n = 0; n < 1500; n++) run($urandom % 100000000);
    for (int v = 0; v < 10000; v++) run4(v);
    $display("steps: subtract=%0d restore=%0d lod_skip=%0d", n_sub, n_restore, n_skip);
    checks++; if (n_sub == 0)     begin failures++; $display("FAIL no subtraction kept"); end
    checks++; if (n_restore == 0) begin failures++; $display("FAIL no restore"); end
    checks++; if (n_skip == 0)    begin failures++; $display("FAIL no LOD skip"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

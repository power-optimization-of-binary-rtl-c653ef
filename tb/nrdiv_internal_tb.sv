// nrdiv_internal_tb: self-checking testbench for the combinational divider nrdiv_internal.
//
// Applies directed operand pairs (the -10 / 3 example, sign combinations,
// the extreme values -32768 and 32767, quotients with a 0 LSB) and 20000
// random pairs with a non-zero divisor, and compares y after a settling
// delay with a reference computed here with 64-bit integer arithmetic: the
// magnitude is floor(|dvd| * 2^N / |dvr|) with its LSB forced to 1, negated when the operand
// signs differ and cut to 2N bits.
module nrdiv_internal_tb;

  localparam int unsigned N  = 16;
  localparam int unsigned YW = 2 * N;

  logic signed [N-1:0]  dvd = '0, dvr = 16'sd1;
  logic signed [YW-1:0] y;

  int checks = 0, failures = 0;

  nrdiv_internal dut (.dvd, .dvr, .y);

  function automatic logic [YW-1:0] ref_div(logic signed [N-1:0] a, logic signed [N-1:0] b);
    longint unsigned ma, mb, qm;
    ma = (a < 0) ? longint'(-longint'(a)) : longint'(a);
    mb = (b < 0) ? longint'(-longint'(b)) : longint'(b);
    qm = (ma << N) / mb;
    qm = qm | 64'd1;   // last quotient bit is forced to 1
    if ((a < 0) != (b < 0)) qm = -qm;
    return YW'(qm);
  endfunction

  task automatic run(logic signed [N-1:0] a, logic signed [N-1:0] b);
    dvd = a;
    dvr = b;
    #10;
    checks++;
    if (y !== ref_div(a, b)) begin
      failures++;
      $display("FAIL %0d / %0d: y=%h expected %h", a, b, y, ref_div(a, b));
    end
  endtask

  initial begin
    run(-16'sd10, 16'sd3);
    checks++;
    if (y !== YW'(-64'sd218453)) begin
      failures++;
      $display("FAIL -10/3 gave %h", y);
    end
    run(16'sd10, 16'sd3);
    run(16'sd10, -16'sd3);
    run(-16'sd10, -16'sd3);
    run(16'sd0, 16'sd5);
    run(16'sd1, 16'sd1);
    run(16'sd6, 16'sd4);
    run(16'sd7, 16'sd2);
    run(16'sd1, 16'sd3);
    run(16'sd32767, 16'sd1);
    run(-16'sd32768, 16'sd1);
    run(-16'sd32768, -16'sd1);
    run(16'sd32767, -16'sd32768);
    run(-16'sd32768, -16'sd32768);
    run(16'sd1, -16'sd32768);
    run(16'sd12345, 16'sd32767);
    for (int i = 0; i < 20000; i++) begin
      logic signed [N-1:0] a, b;
      a = N'($urandom);
      b = N'($urandom);
      if (i % 4 == 1) b = N'($urandom_range(1, 40));
      if (i % 4 == 2) a = N'($urandom_range(0, 300)) - 16'sd150;
      if (b == 0) b = 16'sd1;
      run(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: 10 time units per vector plus margin.
  initial begin
    #(10 * (20000 + 100));
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

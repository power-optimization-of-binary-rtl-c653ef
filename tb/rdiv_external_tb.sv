// rdiv_external_tb: self-checking testbench for rdiv_external.
//
// Runs directed operand pairs (the -10 / 3 example, sign combinations, the
// extreme values -32768 and 32767, quotients with a 0 LSB) and 3000 random
// pairs with a non-zero divisor. Each result is compared with a reference
// computed here with 64-bit integer arithmetic: the magnitude is
// floor(|dvd| * 2^N / |dvr|), negated when the operand signs differ
// and cut to the output width. It also checks that done arrives exactly
// 32 clock edges after start (counting the start edge), that busy is high
// meanwhile and that changing the operands after start has no effect.
module rdiv_external_tb;

  localparam int unsigned N   = 16;
  localparam int unsigned YW  = 32;
  localparam int unsigned LAT = 32;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 start = 1'b0;
  logic signed [N-1:0]  dvd = '0, dvr = 16'sd1;
  logic                 busy, done;
  logic signed [YW-1:0] y;

  int checks = 0, failures = 0;

  rdiv_external dut (.clk, .rst_n, .start, .dvd, .dvr, .busy, .done, .y);

  always #5 clk = ~clk;

  function automatic logic [YW-1:0] ref_div(logic signed [N-1:0] a, logic signed [N-1:0] b);
    longint unsigned ma, mb, qm;
    ma = (a < 0) ? longint'(-longint'(a)) : longint'(a);
    mb = (b < 0) ? longint'(-longint'(b)) : longint'(b);
    qm = (ma << N) / mb;
    // truncated quotient, no LSB change
    if ((a < 0) != (b < 0)) qm = -qm;
    return YW'(qm);
  endfunction

  task automatic run(logic signed [N-1:0] a, logic signed [N-1:0] b);
    int edges;
    logic [YW-1:0] expect_y;
    expect_y = ref_div(a, b);
    @(negedge clk);
    dvd = a; dvr = b; start = 1'b1;
    @(posedge clk);
    edges = 1;
    @(negedge clk);
    start = 1'b0;
    while (!done) begin
      checks++;
      if (!busy) begin
        failures++;
        $display("FAIL busy low during division %0d / %0d", a, b);
      end
      dvd = N'($urandom); dvr = N'($urandom);   // latched at start, may change
      @(posedge clk);
      edges++;
      @(negedge clk);
      if (edges > LAT + 4) break;
    end
    checks++;
    if (edges != LAT) begin
      failures++;
      $display("FAIL latency %0d / %0d: %0d edges, expected %0d", a, b, edges, LAT);
    end
    checks++;
    if (y !== expect_y) begin
      failures++;
      $display("FAIL %0d / %0d: y=%h expected %h", a, b, y, expect_y);
    end
    @(negedge clk);
    checks++;
    if (done || busy) begin
      failures++;
      $display("FAIL done/busy not cleared after %0d / %0d", a, b);
    end
    checks++;
    if (y !== expect_y) begin
      failures++;
      $display("FAIL result not held after done for %0d / %0d", a, b);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
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
    for (int i = 0; i < 3000; i++) begin
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

  initial begin
    repeat (117800) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

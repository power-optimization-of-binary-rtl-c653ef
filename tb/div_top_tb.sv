// div_top_tb: end-to-end testbench for div_top at its default size (N = 16).
//
// Each operand pair goes to all six dividers at once: the four sequential
// ones are started on the same clock edge and the two combinational ones
// are read after the sequential results are in. Every result is compared
// with a reference computed here with 64-bit integer arithmetic: the
// quotient magnitude floor(|dvd| * 2^16 / |dvr|), with the LSB forced to 1
// for the two non-restoring designs that end with a 1-forcing shift,
// negated when the operand signs differ and cut to each output width. The
// latency of each sequential divider (34, 32, 35 and 32 edges after the
// start edge) is checked too.
//
// The mechanisms of the design are counted and each must occur at least
// once: the load path of the block-diagram dividers, restore and no-restore
// iterations, add and subtract iterations of the non-restoring dividers,
// negation of the result, negative operands going through the magnitude
// step, the forced quotient LSB changing a result, and a start request
// arriving while busy (which must be ignored).
module div_top_tb;

  localparam int unsigned N = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, restart = 1'b0;
  logic signed [N-1:0] dvd = '0, dvr = 16'sd1;
  logic p1_busy, p1_done, p2_busy, p2_done, p4_busy, p4_done, p5_busy, p5_done;
  logic signed [2*N:0]   p1_y, p4_y;
  logic signed [2*N-1:0] p2_y, p3_y, p5_y, p6_y;

  int checks = 0, failures = 0;

  // Mechanism counters
  int n_load = 0, n_restore = 0, n_norestore = 0, n_add = 0, n_sub = 0;
  int n_negate = 0, n_negop = 0, n_lsbforce = 0, n_ignored = 0;

  div_top dut (
    .clk, .rst_n,
    .p1_start(start | restart), .p1_dvd(dvd), .p1_dvr(dvr), .p1_busy, .p1_done, .p1_y,
    .p2_start(start | restart), .p2_dvd(dvd), .p2_dvr(dvr), .p2_busy, .p2_done, .p2_y,
    .p3_dvd(dvd), .p3_dvr(dvr), .p3_y,
    .p4_start(start | restart), .p4_dvd(dvd), .p4_dvr(dvr), .p4_busy, .p4_done, .p4_y,
    .p5_start(start | restart), .p5_dvd(dvd), .p5_dvr(dvr), .p5_busy, .p5_done, .p5_y,
    .p6_dvd(dvd), .p6_dvr(dvr), .p6_y
  );

  always #5 clk = ~clk;

  // Count iterations by kind, observed inside the dividers.
  always @(posedge clk) begin
    if (dut.u_p1.busy && dut.u_p1.sel) begin
      if (dut.u_p1.q0) n_restore++; else n_norestore++;
    end
    if (dut.u_p2.busy) begin
      if (!dut.u_p2.t[N]) n_restore++; else n_norestore++;
    end
    if (dut.u_p4.busy && dut.u_p4.sel) begin
      if (dut.u_p4.q0) n_sub++; else n_add++;
    end
    if (dut.u_p5.busy) begin
      if (dut.u_p5.digit) n_sub++; else n_add++;
    end
    if (start && !dut.u_p1.busy && !dut.u_p1.sel) n_load++;
    if (restart && p1_busy && p2_busy && p4_busy && p5_busy) n_ignored++;
  end

  function automatic longint unsigned mag_q(logic signed [N-1:0] a, logic signed [N-1:0] b);
    longint unsigned ma, mb;
    ma = (a < 0) ? longint'(-longint'(a)) : longint'(a);
    mb = (b < 0) ? longint'(-longint'(b)) : longint'(b);
    return (ma << N) / mb;
  endfunction

  function automatic longint unsigned apply_sign(longint unsigned m, logic signed [N-1:0] a,
                                                 logic signed [N-1:0] b);
    return ((a < 0) != (b < 0)) ? -m : m;
  endfunction

  task automatic check(string name, longint unsigned got, longint unsigned expect_v, int w,
                       logic signed [N-1:0] a, logic signed [N-1:0] b);
    longint unsigned mask;
    mask = (w == 64) ? '1 : ((64'd1 << w) - 1);
    checks++;
    if ((got & mask) != (expect_v & mask)) begin
      failures++;
      $display("FAIL %s %0d / %0d: got %h expected %h", name, a, b, got & mask, expect_v & mask);
    end
  endtask

  task automatic run(logic signed [N-1:0] a, logic signed [N-1:0] b, bit poke);
    int edges, e1, e2, e4, e5;
    longint unsigned qx, qn;
    qx = mag_q(a, b);
    qn = qx | 64'd1;
    if (qn != qx) n_lsbforce++;
    if ((a < 0) != (b < 0)) n_negate++;
    if (a < 0 || b < 0) n_negop++;
    @(negedge clk);
    dvd = a; dvr = b; start = 1'b1;
    @(posedge clk);
    edges = 1; e1 = 0; e2 = 0; e4 = 0; e5 = 0;
    @(negedge clk);
    start = 1'b0;
    while (edges < 40 && !(e1 && e2 && e4 && e5)) begin
      restart = poke && (edges == 5);
      @(posedge clk);
      edges++;
      @(negedge clk);
      restart = 1'b0;
      if (p1_done) e1 = edges;
      if (p2_done) e2 = edges;
      if (p4_done) e4 = edges;
      if (p5_done) e5 = edges;
    end
    checks++;
    if (e1 != 34 || e2 != 32 || e4 != 35 || e5 != 32) begin
      failures++;
      $display("FAIL latency %0d / %0d: p1 %0d p2 %0d p4 %0d p5 %0d", a, b, e1, e2, e4, e5);
    end
    check("p1", longint'(p1_y), apply_sign(qx, a, b), 2*N+1, a, b);
    check("p2", longint'(p2_y), apply_sign(qx, a, b), 2*N, a, b);
    check("p3", longint'(p3_y), apply_sign(qx, a, b), 2*N, a, b);
    check("p4", longint'(p4_y), apply_sign(qx, a, b), 2*N+1, a, b);
    check("p5", longint'(p5_y), apply_sign(qn, a, b), 2*N, a, b);
    check("p6", longint'(p6_y), apply_sign(qn, a, b), 2*N, a, b);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(-16'sd10, 16'sd3, 1'b0);
    run(16'sd10, 16'sd3, 1'b1);
    run(16'sd1, 16'sd3, 1'b0);
    run(16'sd7, -16'sd2, 1'b0);
    run(-16'sd32768, 16'sd1, 1'b0);
    run(16'sd32767, -16'sd32768, 1'b0);
    run(-16'sd32768, -16'sd32768, 1'b0);
    for (int i = 0; i < 1000; i++) begin
      logic signed [N-1:0] a, b;
      a = N'($urandom);
      b = (i % 3 == 0) ? N'($urandom_range(1, 100)) : N'($urandom);
      if (b == 0) b = 16'sd7;
      run(a, b, (i % 50) == 0);
    end
    $display("mechanisms: load=%0d restore=%0d no_restore=%0d add=%0d sub=%0d negate=%0d",
             n_load, n_restore, n_norestore, n_add, n_sub, n_negate);
    $display("mechanisms: negative_operand=%0d lsb_forced=%0d start_ignored=%0d",
             n_negop, n_lsbforce, n_ignored);
    begin
      int counts[9];
      counts = '{n_load, n_restore, n_norestore, n_add, n_sub, n_negate, n_negop, n_lsbforce,
                 n_ignored};
      foreach (counts[k]) begin
        checks++;
        if (counts[k] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never happened", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1007 * 45 + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

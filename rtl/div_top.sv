// div_top: the six 16-by-16-bit signed divider organisations side by side.
//
// The six designs compute the same function, the signed quotient dvd/dvr in
// fixed point with N fraction bits, and differ in how the digit recurrence
// is turned into hardware:
//   p1  rdiv_blocks     restoring, block-diagram datapath, 34 cycles
//   p2  rdiv_external   restoring, one iteration per clock, 32 cycles
//   p3  rdiv_internal   restoring, fully unrolled, combinational
//   p4  nrdiv_blocks    non-restoring, block-diagram datapath, 35 cycles
//   p5  nrdiv_external  non-restoring, one iteration per clock, 32 cycles
//   p6  nrdiv_internal  non-restoring, fully unrolled, combinational
// None of them uses another, so each keeps its own operand, handshake and
// result ports here; only clock and asynchronous active-low reset are
// shared by the four sequential ones. Port timing is that of each divider:
// see the header of its module. Keeping them in one top is this design's
// own choice, made so that all six can be exercised and compared together.
module div_top #(
  parameter int unsigned N = div_pkg::DIV_N
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // p1: restoring, block-diagram datapath
  input  logic                  p1_start,
  input  logic signed [N-1:0]   p1_dvd,
  input  logic signed [N-1:0]   p1_dvr,
  output logic                  p1_busy,
  output logic                  p1_done,
  output logic signed [2*N:0]   p1_y,
  // p2: restoring, external loop
  input  logic                  p2_start,
  input  logic signed [N-1:0]   p2_dvd,
  input  logic signed [N-1:0]   p2_dvr,
  output logic                  p2_busy,
  output logic                  p2_done,
  output logic signed [2*N-1:0] p2_y,
  // p3: restoring, internal loop
  input  logic signed [N-1:0]   p3_dvd,
  input  logic signed [N-1:0]   p3_dvr,
  output logic signed [2*N-1:0] p3_y,
  // p4: non-restoring, block-diagram datapath
  input  logic                  p4_start,
  input  logic signed [N-1:0]   p4_dvd,
  input  logic signed [N-1:0]   p4_dvr,
  output logic                  p4_busy,
  output logic                  p4_done,
  output logic signed [2*N:0]   p4_y,
  // p5: non-restoring, external loop
  input  logic                  p5_start,
  input  logic signed [N-1:0]   p5_dvd,
  input  logic signed [N-1:0]   p5_dvr,
  output logic                  p5_busy,
  output logic                  p5_done,
  output logic signed [2*N-1:0] p5_y,
  // p6: non-restoring, internal loop
  input  logic signed [N-1:0]   p6_dvd,
  input  logic signed [N-1:0]   p6_dvr,
  output logic signed [2*N-1:0] p6_y
);

  rdiv_blocks #(.N(N)) u_p1 (
    .clk, .rst_n, .start(p1_start), .dvd(p1_dvd), .dvr(p1_dvr),
    .busy(p1_busy), .done(p1_done), .y(p1_y)
  );

  rdiv_external #(.N(N)) u_p2 (
    .clk, .rst_n, .start(p2_start), .dvd(p2_dvd), .dvr(p2_dvr),
    .busy(p2_busy), .done(p2_done), .y(p2_y)
  );

  rdiv_internal #(.N(N)) u_p3 (
    .dvd(p3_dvd), .dvr(p3_dvr), .y(p3_y)
  );

  nrdiv_blocks #(.N(N)) u_p4 (
    .clk, .rst_n, .start(p4_start), .dvd(p4_dvd), .dvr(p4_dvr),
    .busy(p4_busy), .done(p4_done), .y(p4_y)
  );

  nrdiv_external #(.N(N)) u_p5 (
    .clk, .rst_n, .start(p5_start), .dvd(p5_dvd), .dvr(p5_dvr),
    .busy(p5_busy), .done(p5_done), .y(p5_y)
  );

  nrdiv_internal #(.N(N)) u_p6 (
    .dvd(p6_dvd), .dvr(p6_dvr), .y(p6_y)
  );

endmodule

// nrdiv_internal: combinational signed non-restoring divider ("internal
// loop"), the lowest-power of the six divider organisations.
//
// The non-restoring recurrence is unrolled into 2N add/subtract stages with
// no flip-flops, so the result settles within one clock period. Each stage
// shifts A = {A1, A2} and Q left, takes the quotient digit from the sign S of
// the shifted partial remainder (Q[0] = ~(S ^ B_sign), B_sign being 0 for the
// divisor magnitude), and subtracts B from A1 when the digit is 1, adds B
// when it is 0. The remainder is never restored. After the last stage Q is
// shifted once more with a 1 entering the LSB, which turns the digit string
// into a binary quotient; no correction for a negative final remainder
// follows, so the magnitude is the truncated quotient with its LSB forced to
// 1 (at most 1 LSB = 2^-N above it). Operands are divided as magnitudes and
// the quotient is negated when their signs differ.
//
// Interface: dvd, dvr  signed N-bit operands
//            y         signed 2N-bit quotient, N fraction bits (16.16)
// Timing:    purely combinational.
//
// Follows the described algorithm, including the forced LSB. Own choice: A1
// is N+1 bits wide (one extra sign bit) so that every 16-bit operand pair
// stays in range.
module nrdiv_internal #(
  parameter int unsigned N = div_pkg::DIV_N
) (
  input  logic signed [N-1:0]   dvd,
  input  logic signed [N-1:0]   dvr,
  output logic signed [2*N-1:0] y
);

  logic [N-1:0]   dvd_mag;
  logic [N:0]     b;      // divisor magnitude, b[N] is its (zero) sign bit
  logic           sgn;
  logic [2*N:0]   a;      // {A1 (N+1 bits, signed), A2 (N bits)}
  logic [2*N-1:0] q;

  always_comb begin
    dvd_mag = dvd[N-1] ? N'(-dvd) : N'(dvd);
    b       = {1'b0, dvr[N-1] ? N'(-dvr) : N'(dvr)};
    sgn     = dvd[N-1] ^ dvr[N-1];

    a = {{(N+1){1'b0}}, dvd_mag};
    q = '0;
    for (int unsigned i = 0; i < 2*N; i++) begin
      a    = {a[2*N-1:0], 1'b0};
      q    = {q[2*N-2:0], 1'b0};
      q[0] = ~(a[2*N] ^ b[N]);
      if (q[0]) a[2*N:N] = a[2*N:N] - b;
      else      a[2*N:N] = a[2*N:N] + b;
    end
    q = {q[2*N-2:0], 1'b1};

    y = sgn ? -(2*N)'(q) : (2*N)'(q);
  end

endmodule

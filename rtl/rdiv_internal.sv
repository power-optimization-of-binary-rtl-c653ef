// rdiv_internal: combinational signed restoring divider ("internal loop").
//
// The restoring recurrence is unrolled into a chain of 2N subtract/restore
// stages, so the quotient settles within one clock period and the block
// holds no flip-flops: the loop of the algorithm is run by the synthesis
// tool, not by a clock. Each stage shifts the 2N-bit register A = {A1, A2}
// (A1 = partial remainder, A2 = remaining dividend bits) and Q left by one,
// forms T = A1 - B, takes the quotient bit as the complement of T's sign and
// keeps T as the new A1 when that bit is 1. Operands are divided as
// magnitudes and the quotient is negated when their signs differ.
//
// Interface: dvd, dvr  signed N-bit operands
//            y         signed 2N-bit quotient, N fraction bits (16.16)
// Timing:    purely combinational.
//
// Follows the described algorithm: register names, the T = A1 - B step,
// Q[0] = ~sign(T), 2N iterations and the final two's-complement sign step.
// Own choices: T is formed on N+1 bits so every 16-bit operand pair,
// including a divisor magnitude of 2^(N-1), gives the right bit; dividing
// by zero yields all-ones magnitude, which has no meaning.
module rdiv_internal #(
  parameter int unsigned N = div_pkg::DIV_N
) (
  input  logic signed [N-1:0]   dvd,
  input  logic signed [N-1:0]   dvr,
  output logic signed [2*N-1:0] y
);

  logic [N-1:0]   dvd_mag, dvr_mag;
  logic           sgn;
  logic [2*N-1:0] a;      // {A1, A2}
  logic [2*N-1:0] q;
  logic [N:0]     t;      // A1 - B with a sign bit

  always_comb begin
    dvd_mag = dvd[N-1] ? N'(-dvd) : N'(dvd);
    dvr_mag = dvr[N-1] ? N'(-dvr) : N'(dvr);
    sgn     = dvd[N-1] ^ dvr[N-1];

    a = {{N{1'b0}}, dvd_mag};
    q = '0;
    t = '0;
    for (int unsigned i = 0; i < 2*N; i++) begin
      a    = {a[2*N-2:0], 1'b0};
      q    = {q[2*N-2:0], 1'b0};
      t    = {1'b0, a[2*N-1:N]} - {1'b0, dvr_mag};
      q[0] = ~t[N];
      if (q[0]) a[2*N-1:N] = t[N-1:0];   // restore step: keep the difference
    end

    y = sgn ? -(2*N)'(q) : (2*N)'(q);
  end

endmodule

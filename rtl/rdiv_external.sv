// rdiv_external: sequential signed restoring divider ("external loop").
//
// One restoring iteration per clock edge. The clock stands for the external
// pulse generator that steps the loop. An iteration shifts A = {A1, A2} and
// Q left, forms T = A1 - B, takes the quotient bit as the complement of T's
// sign and keeps T as the new A1 when that bit is 1. After 2N iterations Q
// holds the quotient magnitude with N integer and N fraction bits; y is Q,
// two's-complement negated when the operand signs differed.
//
// Interface: start  one-cycle request, sampled while idle; dvd and dvr are
//                   read only on that edge
//            busy   high while iterations remain
//            done   one-cycle pulse when y becomes valid; y then holds until
//                   the next start
//            y      signed 2N-bit quotient, N fraction bits (16.16)
// Timing:    the first iteration runs on the start edge itself, so done is
//            seen 2N (32) clock edges after start, counting the start edge.
//
// Follows the described algorithm: the A, B, Q registers, the T = A1 - B
// step, Q[0] = ~sign(T), the restore, 2N iterations (one of the two counts
// given for this design; the other, 64, cannot leave a 16.16 quotient in a
// 32-bit Q) and the final two's complement. Own choices: the start/busy/done
// handshake and reset, storing the result sign at start, forming the sign
// step combinationally at the output, and an (N+1)-bit T. Dividing by zero
// yields all-ones magnitude, which has no meaning.
module rdiv_external #(
  parameter int unsigned N = div_pkg::DIV_N
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic signed [N-1:0]   dvd,
  input  logic signed [N-1:0]   dvr,
  output logic                  busy,
  output logic                  done,
  output logic signed [2*N-1:0] y
);

  localparam int unsigned ITERS = 2 * N;
  localparam int unsigned CW    = $clog2(ITERS + 1);

  logic [2*N-1:0] a_q, q_q;          // A = {A1, A2} and Q registers
  logic [N-1:0]   b_q;               // B register (divisor magnitude)
  logic           sgn_q;
  logic [CW-1:0]  cnt_q;             // iterations done

  // Operand set-up (the initial register values of the algorithm)
  logic [N-1:0]   dvd_mag, dvr_mag;
  assign dvd_mag = dvd[N-1] ? N'(-dvd) : N'(dvd);
  assign dvr_mag = dvr[N-1] ? N'(-dvr) : N'(dvr);

  // One iteration, applied to the registers or, on the start edge, to the
  // initial values.
  logic [2*N-1:0] a_in, q_in, a_sh, q_sh, a_nx, q_nx;
  logic [N-1:0]   b_in;
  logic [N:0]     t;

  always_comb begin
    if (busy) begin
      a_in = a_q;
      q_in = q_q;
      b_in = b_q;
    end else begin
      a_in = {{N{1'b0}}, dvd_mag};
      q_in = '0;
      b_in = dvr_mag;
    end
    a_sh = {a_in[2*N-2:0], 1'b0};
    q_sh = {q_in[2*N-2:0], 1'b0};
    t    = {1'b0, a_sh[2*N-1:N]} - {1'b0, b_in};
    q_nx = {q_sh[2*N-1:1], ~t[N]};
    a_nx = t[N] ? a_sh : {t[N-1:0], a_sh[N-1:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= '0;
      q_q   <= '0;
      b_q   <= '0;
      sgn_q <= 1'b0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (busy || start) begin
        a_q   <= a_nx;
        q_q   <= q_nx;
        cnt_q <= cnt_q + 1'b1;
        if (!busy) begin
          b_q   <= b_in;
          sgn_q <= dvd[N-1] ^ dvr[N-1];
          cnt_q <= CW'(1);
        end
        if (busy ? (cnt_q == CW'(ITERS - 1)) : (ITERS == 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          busy <= 1'b1;
        end
      end
    end
  end

  // Sign step: Q = ~Q + 1 when the operand signs differ.
  assign y = sgn_q ? -(2*N)'(q_q) : (2*N)'(q_q);

endmodule

// nrdiv_external: sequential signed non-restoring divider ("external loop").
//
// One non-restoring iteration per clock edge; the clock stands for the
// external pulse generator that steps the loop. An iteration shifts
// A = {A1, A2} and Q left, takes the quotient digit from the sign S of the
// shifted partial remainder (Q[0] = ~(S ^ B_sign), B_sign being 0 for the
// divisor magnitude) and subtracts B from A1 when the digit is 1, adds B when
// it is 0; the remainder is never restored. After 2N iterations the output
// stage shifts Q once more with a 1 entering the LSB and applies the sign.
// As no correction for a negative final remainder follows, the magnitude is
// the truncated quotient with its LSB forced to 1 (at most 2^-N above it).
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
// Follows the described algorithm: registers A, B, Q, the digit rule, the
// add/subtract choice, 2N iterations, the final 1-forcing shift and the
// two's complement. Own choices: the start/busy/done handshake and reset,
// storing the result sign at start, doing the final shift and sign step
// combinationally at the output, and an (N+1)-bit A1.
module nrdiv_external #(
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

  logic [2*N:0]   a_q;               // {A1 (N+1 bits, signed), A2 (N bits)}
  logic [2*N-1:0] q_q;
  logic [N:0]     b_q;               // divisor magnitude, b_q[N] = 0
  logic           sgn_q;
  logic [CW-1:0]  cnt_q;

  logic [N-1:0]   dvd_mag;
  logic [N:0]     dvr_mag;
  assign dvd_mag = dvd[N-1] ? N'(-dvd) : N'(dvd);
  assign dvr_mag = {1'b0, dvr[N-1] ? N'(-dvr) : N'(dvr)};

  // One iteration, applied to the registers or, on the start edge, to the
  // initial values.
  logic [2*N:0]   a_in, a_sh, a_nx;
  logic [2*N-1:0] q_in, q_nx;
  logic [N:0]     b_in;
  logic           digit;

  always_comb begin
    if (busy) begin
      a_in = a_q;
      q_in = q_q;
      b_in = b_q;
    end else begin
      a_in = {{(N+1){1'b0}}, dvd_mag};
      q_in = '0;
      b_in = dvr_mag;
    end
    a_sh  = {a_in[2*N-1:0], 1'b0};
    digit = ~(a_sh[2*N] ^ b_in[N]);
    q_nx  = {q_in[2*N-2:0], digit};
    a_nx  = a_sh;
    if (digit) a_nx[2*N:N] = a_sh[2*N:N] - b_in;
    else       a_nx[2*N:N] = a_sh[2*N:N] + b_in;
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

  // Final shift with Q[0] = 1, then Q = ~Q + 1 when the signs differ.
  logic [2*N-1:0] q_fin;
  assign q_fin = {q_q[2*N-2:0], 1'b1};
  assign y     = sgn_q ? -(2*N)'(q_fin) : (2*N)'(q_fin);

endmodule

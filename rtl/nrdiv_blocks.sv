// nrdiv_blocks: sequential signed non-restoring divider, organised as the
// block-diagram ("hard FPGA blocks") version: counter, load/shift mux,
// A register, an adder and a subtractor in parallel, add/subtract mux,
// digit expression, Q shift register, sign xor and negate mux.
//
// While the counter is 0 the load mux puts {0, |dvd|} into A and Q is
// cleared. On every later cycle the digit Q[0] = ~A1_sign ^ B_sign is formed
// from the sign of A1 (B_sign is 0 for the divisor magnitude); the mux
// passes A1 - B when Q[0] = 1 and A1 + B when it is 0; that new A1 is
// joined with A2, shifted left by one into A, and Q[0] shifts into Q. The
// remainder is never restored. Because the add/subtract comes before the
// shift, the first two digits are not quotient bits; the digit of each
// later cycle equals the true quotient bit of two steps earlier, so 2N+2
// iterations after the load cycle leave exactly the 2N quotient bits in Q.
// The result sign is the xor of the operand MSBs, taken straight from the
// inputs, and selects between Q and its negation.
//
// Interface: start  one-cycle request, sampled while idle
//            dvd, dvr  must be held stable from start until y has been
//                   read: the divisor magnitude and the sign are not
//                   registered (an assertion checks this while busy)
//            busy   high from the cycle after start until the result
//            done   one-cycle pulse when y becomes valid
//            y      signed 2N+1-bit quotient, N fraction bits (17.16)
// Timing:    1 load cycle + 2N+2 iterations = 35 cycles for N = 16: done is
//            seen 35 clock edges after start, counting the start edge.
//
// Follows the block diagram, its digit expression, its 35-cycle count and
// its 33-bit output. Own choices: the start/busy/done handshake and reset,
// a counter wide enough for 35 cycles, and an (N+1)-bit A1 so the partial
// remainder, which ranges over [-2B, 2B), never overflows.
module nrdiv_blocks #(
  parameter int unsigned N = div_pkg::DIV_N
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic signed [N-1:0]   dvd,
  input  logic signed [N-1:0]   dvr,
  output logic                  busy,
  output logic                  done,
  output logic signed [2*N:0]   y
);

  localparam int unsigned ITERS = 2 * N + 2;
  localparam int unsigned CW    = $clog2(ITERS + 1);

  logic [2*N:0]   a_q;               // register A = {A1 (N+1, signed), A2}
  logic [2*N-1:0] q_q;               // register Q
  logic [CW-1:0]  cnt_q;             // counter; 0 selects the load path

  // Absolute and Absolute1 blocks
  logic [N-1:0] dvd_mag;
  logic [N:0]   b;
  assign dvd_mag = dvd[N-1] ? N'(-dvd) : N'(dvd);
  assign b       = {1'b0, dvr[N-1] ? N'(-dvr) : N'(dvr)};

  // Iteration datapath
  logic [N:0]     a1;                // BitBasher1: A1 (high)
  logic [N:0]     sum, diff;         // AddSub (a + b), AddSub1 (a - b)
  logic           q0;                // Expression: (~a) ^ b on the MSBs
  logic [N:0]     mux1;              // add / subtract mux
  logic [2*N:0]   bb2;               // BitBasher2: {new A1, A2}
  logic [2*N:0]   shift1;            // X << 1
  logic           sel;               // Relational: counter != 0
  logic [2*N:0]   mux;               // load / shift mux

  assign a1     = a_q[2*N:N];
  assign sum    = a1 + b;
  assign diff   = a1 - b;
  assign q0     = (~a1[N]) ^ b[N];
  assign mux1   = q0 ? diff : sum;
  assign bb2    = {mux1, a_q[N-1:0]};
  assign shift1 = {bb2[2*N-1:0], 1'b0};
  assign sel    = (cnt_q != '0);
  assign mux    = sel ? shift1 : {{(N+1){1'b0}}, dvd_mag};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= '0;
      q_q   <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        a_q   <= mux;
        q_q   <= {q_q[2*N-2:0], q0};
        cnt_q <= cnt_q + 1'b1;
        if (cnt_q == CW'(ITERS)) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          cnt_q <= '0;
        end
      end else if (start) begin
        a_q   <= mux;                // counter is 0: load path
        q_q   <= '0;
        cnt_q <= CW'(1);
        busy  <= 1'b1;
      end
    end
  end

  // Sign bit (xor of the operand MSBs), Negate and Mux2
  logic           sgn;
  logic [2*N:0]   q_ext;
  assign sgn   = dvd[N-1] ^ dvr[N-1];
  assign q_ext = {1'b0, q_q};
  assign y     = sgn ? -q_ext : q_ext;

  operands_held : assert property (@(posedge clk) disable iff (!rst_n)
                                   busy |-> ($stable(dvd) && $stable(dvr)));

endmodule

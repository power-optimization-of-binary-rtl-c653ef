// rdiv_blocks: sequential signed restoring divider, organised as the
// block-diagram ("hard FPGA blocks") version: counter, load/shift mux,
// A register, subtractor, restore mux, Q shift register, sign xor and
// negate mux.
//
// While the counter is 0 the load mux puts {0, |dvd|} into A and Q is
// cleared. On every later cycle A1 (the high half of A) has |dvr| subtracted
// (T = A1 - B), Q[0] is the complement of T's sign, the restore mux passes
// {T, A2} when Q[0] = 1 and A unchanged otherwise, and the mux output is
// shifted left by one into A while Q[0] shifts into Q. Because the subtract
// comes before the shift, the first decision (0 against B) is not a quotient
// bit: 2N+1 iterations after the load cycle leave the 2N quotient bits in Q.
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
// Timing:    1 load cycle + 2N+1 iterations = 34 cycles for N = 16: done is
//            seen 34 clock edges after start, counting the start edge.
//
// Follows the block diagram and its 34-cycle count and 33-bit output. Own
// choices: the start/busy/done handshake and reset (the diagram's counter
// runs freely), a counter wide enough for 34 cycles, and an (N+1)-bit
// subtractor so that every 16-bit operand pair gives the right sign.
module rdiv_blocks #(
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

  localparam int unsigned ITERS = 2 * N + 1;
  localparam int unsigned CW    = $clog2(ITERS + 1);

  logic [2*N-1:0] a_q;               // register A = {A1 (high), A2 (low)}
  logic [2*N-1:0] q_q;               // register Q
  logic [CW-1:0]  cnt_q;             // counter; 0 selects the load path

  // Absolute and Absolute1 blocks
  logic [N-1:0] dvd_mag, dvr_mag;
  assign dvd_mag = dvd[N-1] ? N'(-dvd) : N'(dvd);
  assign dvr_mag = dvr[N-1] ? N'(-dvr) : N'(dvr);

  // Iteration datapath
  logic [N-1:0]   a1;                // BitBasher1: A1 (high)
  logic [N:0]     t;                 // AddSub: T = A1 - B
  logic           q0;                // Inverter: Q[0] = ~T sign
  logic [2*N-1:0] mux1;              // restore mux
  logic [2*N-1:0] shift1;            // X << 1
  logic           sel;               // Relational: counter != 0
  logic [2*N-1:0] mux;               // load / shift mux

  assign a1     = a_q[2*N-1:N];
  assign t      = {1'b0, a1} - {1'b0, dvr_mag};
  assign q0     = ~t[N];
  assign mux1   = q0 ? {t[N-1:0], a_q[N-1:0]} : a_q;
  assign shift1 = {mux1[2*N-2:0], 1'b0};
  assign sel    = (cnt_q != '0);
  assign mux    = sel ? shift1 : {{N{1'b0}}, dvd_mag};

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

  // The operands feed the datapath directly, so they must not change
  // while a division is running.
  operands_held : assert property (@(posedge clk) disable iff (!rst_n)
                                   busy |-> ($stable(dvd) && $stable(dvr)));

endmodule

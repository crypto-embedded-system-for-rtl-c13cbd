// Montgomery modular multiplier, bit-serial (radix 2).
//
// Computes result = A * B * 2^-N mod M for an odd modulus M and A, B < M.
// This is the modular-multiplication primitive of the RSA core: both the
// squarings and the multiplications of a modular exponentiation are
// Montgomery products.
//
// How it works: the accumulator P starts at zero. Each cycle one bit of A is
// consumed, least significant first:
//     P = P + a_i * B;  if P is odd, P = P + M;  P = P / 2
// After N cycles P = A*B*2^-N (mod M) with P < 2M; one more cycle subtracts M
// if P >= M. P needs N+1 bits, the sum before halving N+2 bits.
//
// Interface: start (one cycle, while busy is low) latches a, b and m.
// busy is high from the cycle after start until done. done pulses for one
// cycle together with a valid result, which then holds until the next start.
// Timing: done is high N+1 clock edges after the edge that sampled start, so
// one product takes N+2 cycles counting the start cycle.
//
// The co-processor's internal architecture is not published; the bit-serial
// radix-2 form is this design's own choice as the simplest correct one.
module mont_mult #(
  parameter int unsigned N = 512
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] m,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] result
);

  localparam int unsigned CW = $clog2(N + 1);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FIX} state_e;

  state_e         state_q;
  logic [N-1:0]   a_q, b_q, m_q;
  logic [N:0]     p_q;          // accumulator, < 2M
  logic [CW-1:0]  cnt_q;        // bits of A consumed

  logic [N+1:0]   sum_ab, sum_m;
  logic [N:0]     p_next;
  logic [N+1:0]   p_minus_m;

  always_comb begin
    sum_ab    = {1'b0, p_q} + (a_q[0] ? {2'b00, b_q} : '0);
    sum_m     = sum_ab + (sum_ab[0] ? {2'b00, m_q} : '0);
    p_next    = sum_m[N+1:1];
    p_minus_m = {1'b0, p_q} - {2'b00, m_q};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      a_q     <= '0;
      b_q     <= '0;
      m_q     <= '0;
      p_q     <= '0;
      cnt_q   <= '0;
      done    <= 1'b0;
      result  <= '0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          a_q     <= a;
          b_q     <= b;
          m_q     <= m;
          p_q     <= '0;
          cnt_q   <= '0;
          state_q <= S_RUN;
        end
        S_RUN: begin
          p_q   <= p_next;
          a_q   <= a_q >> 1;
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == CW'(N - 1)) state_q <= S_FIX;
        end
        S_FIX: begin
          // p_minus_m is negative (top bit set) exactly when P < M
          result  <= p_minus_m[N+1] ? p_q[N-1:0] : p_minus_m[N-1:0];
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q != S_IDLE);

endmodule

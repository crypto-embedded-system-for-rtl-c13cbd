// RSA core: operand registers, one Montgomery multiplier and the sequencer of
// a modular exponentiation.
//
// The core holds four N-bit operand registers, M (modulus, odd), E
// (exponent), R and X, and an N-bit result register. It runs one of two
// commands:
//   CMD_MONMULT  result = X * R * 2^-N mod M   (one Montgomery product)
//   CMD_MODEXP   result = X^E mod M, with R = 2^(2N) mod M supplied by
//                software (the processor computes this constant)
// Modular exponentiation is left-to-right square-and-multiply in the
// Montgomery domain:
//   XM = MonMult(X, R)              X in Montgomery form
//   skip the leading zero bits of E, one bit per cycle
//   A = XM                          for the top set bit of E
//   for every following bit: A = MonMult(A, A); if bit, A = MonMult(A, XM)
//   result = MonMult(A, 1)          back out of Montgomery form
// E = 0 gives result = MonMult(MonMult(R, 1), 1) = 1 mod M, in
// 1 + P + (N + 1) + P + P cycles.
//
// Operands are written 32 bits at a time (wr_en, wr_sel, wr_idx, least
// significant word at index 0); writes are ignored while busy. The result is
// read a word at a time through rd_idx/rd_data (combinational).
// Control: start (one cycle) with cmd; busy is high from the next cycle until
// the operation ends; done is sticky from the end until the next start.
//
// Timing, with P = N+3 cycles per Montgomery product (start, N+1 cycles in the
// multiplier, one cycle to take its result) and t the index of the top set
// bit of E, k the number of further set bits:
//   MODEXP  = 1 + P + (N - t) + (t + 1) + (t + k) * P + P cycles, start to done
//   MONMULT = 1 + P cycles.
// The operand registers, command set and sequencing are this design's own
// reading of the co-processor's software interface (operands M, E, R, X, an
// output, a Montgomery-product call and a software-computed R); the reference
// system description only fixes the 512-bit width and the role of the block.
module rsa_core
  import crypto_pkg::*;
#(
  parameter int unsigned N = 512
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // operand write port
  input  logic                 wr_en,
  input  rsa_operand_e         wr_sel,
  input  logic [$clog2(N/32)-1:0] wr_idx,
  input  logic [31:0]          wr_data,
  // result read port
  input  logic [$clog2(N/32)-1:0] rd_idx,
  output logic [31:0]          rd_data,
  // control
  input  logic                 start,
  input  rsa_cmd_e             cmd,
  output logic                 busy,
  output logic                 done
);

  localparam int unsigned CW = $clog2(N + 1);

  typedef enum logic [3:0] {
    S_IDLE, S_MONMULT, S_XM, S_SCAN, S_ONE, S_NEXT, S_SQR, S_MUL, S_FINAL, S_DONE
  } state_e;

  state_e         state_q;
  logic [N-1:0]   m_q, e_q, r_q, x_q, res_q;
  logic [N-1:0]   xm_q, acc_q, esh_q;
  logic [CW-1:0]  left_q;      // bits of E not yet consumed
  logic           done_q;

  // Montgomery multiplier and its operand selection
  logic           mm_start, mm_busy, mm_done, mm_pending_q;
  logic [N-1:0]   mm_a, mm_b, mm_res;
  logic [N-1:0]   one;
  assign one = N'(1);

  mont_mult #(.N(N)) u_mm (
    .clk, .rst_n,
    .start (mm_start),
    .a     (mm_a),
    .b     (mm_b),
    .m     (m_q),
    .busy  (mm_busy),
    .done  (mm_done),
    .result(mm_res)
  );

  logic mult_state;
  always_comb begin
    mm_a = x_q;
    mm_b = r_q;
    mult_state = 1'b1;
    unique case (state_q)
      S_MONMULT: begin mm_a = x_q;   mm_b = r_q;   end
      S_XM:      begin mm_a = x_q;   mm_b = r_q;   end
      S_ONE:     begin mm_a = r_q;   mm_b = one;   end
      S_SQR:     begin mm_a = acc_q; mm_b = acc_q; end
      S_MUL:     begin mm_a = acc_q; mm_b = xm_q;  end
      S_FINAL:   begin mm_a = acc_q; mm_b = one;   end
      default:   mult_state = 1'b0;
    endcase
    mm_start = mult_state && !mm_pending_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      m_q          <= '0;
      e_q          <= '0;
      r_q          <= '0;
      x_q          <= '0;
      res_q        <= '0;
      xm_q         <= '0;
      acc_q        <= '0;
      esh_q        <= '0;
      left_q       <= '0;
      done_q       <= 1'b0;
      mm_pending_q <= 1'b0;
    end else begin
      if (mm_start) mm_pending_q <= 1'b1;
      if (mm_done)  mm_pending_q <= 1'b0;

      unique case (state_q)
        S_IDLE: begin
          if (wr_en) begin
            unique case (wr_sel)
              OP_M: m_q[wr_idx*32 +: 32] <= wr_data;
              OP_E: e_q[wr_idx*32 +: 32] <= wr_data;
              OP_R: r_q[wr_idx*32 +: 32] <= wr_data;
              OP_X: x_q[wr_idx*32 +: 32] <= wr_data;
              default: ;
            endcase
          end
          if (start) begin
            done_q  <= 1'b0;
            esh_q   <= e_q;
            left_q  <= CW'(N);
            state_q <= (cmd == CMD_MONMULT) ? S_MONMULT : S_XM;
          end
        end
        S_MONMULT: if (mm_done) begin
          res_q   <= mm_res;
          state_q <= S_DONE;
        end
        S_XM: if (mm_done) begin
          xm_q    <= mm_res;
          state_q <= S_SCAN;
        end
        S_SCAN: begin
          if (left_q == '0) begin
            state_q <= S_ONE;                  // E == 0
          end else begin
            esh_q  <= esh_q << 1;
            left_q <= left_q - 1'b1;
            if (esh_q[N-1]) begin
              acc_q   <= xm_q;
              state_q <= S_NEXT;
            end
          end
        end
        S_ONE: if (mm_done) begin
          acc_q   <= mm_res;
          state_q <= S_FINAL;
        end
        S_NEXT: state_q <= (left_q == '0) ? S_FINAL : S_SQR;
        S_SQR: if (mm_done) begin
          acc_q <= mm_res;
          if (esh_q[N-1]) begin
            state_q <= S_MUL;
          end else begin
            esh_q   <= esh_q << 1;
            left_q  <= left_q - 1'b1;
            state_q <= S_NEXT;
          end
        end
        S_MUL: if (mm_done) begin
          acc_q   <= mm_res;
          esh_q   <= esh_q << 1;
          left_q  <= left_q - 1'b1;
          state_q <= S_NEXT;
        end
        S_FINAL: if (mm_done) begin
          res_q   <= mm_res;
          state_q <= S_DONE;
        end
        S_DONE: begin
          done_q  <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy    = (state_q != S_IDLE);
  assign done    = done_q;
  assign rd_data = res_q[rd_idx*32 +: 32];

  // The multiplier is only started from a multiplication state and only
  // when it is free.
  assert property (@(posedge clk) disable iff (!rst_n) mm_start |-> !mm_busy);

endmodule

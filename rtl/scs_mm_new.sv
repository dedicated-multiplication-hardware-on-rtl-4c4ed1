// scs_mm_new: radix-2 Montgomery modular multiplier built around a single
// one-level configurable carry-save adder (CCSA).
//
// It computes result = A * B * 2^-(K+2) mod N (a value congruent to it, see
// below) for an odd K-bit modulus N and operands A, B < 2N. All additions,
// including the operand pre-computation D^ = B^ + N^ and the conversion of the
// carry-save result to binary, run on the same CCSA, so there is no
// carry-propagate adder in the iteration path.
//
// Operation, one mm_ctrl operation code per cycle:
//   1. LOAD: B^ = 8B and N^ (N+1 or 3N+1, a multiple of 4) from
//      mm_operand_prep; SS = B^, SC = N^.
//   2. PRE_ADD: (SS,SC) = 1F_CSA(SS + SC + 0).
//   3. CONV: (SS,SC) = 2H_CSA(SS,SC) until Zero_D sees SC = 0.
//   4. DLATCH: D^ = SS; SS = SC = 0; A^ = q^ = 0; iteration i = -1.
//   5. ITER, i = -1 .. K+4: x = SM3(A^, q^) in {0, N^, B^, D^};
//      (SS,SC) = 1F_CSA(SS + SC + x) / 2. Skip_D pre-computes q_{i+1}, q_{i+2}
//      and skip_{i+1}; when skip is set the pair is shifted once more and
//      iteration i+1 is not executed. Iterations 0 .. K+1 consume the bits of
//      A; the three after them (A bits zero) undo the factor 8 of B^.
//   6. CONV again until SC = 0, then FINISH: result = SS, done pulses.
// Dropping the low sum bit in the divide-by-two is what turns N^ back into N
// (or 3N): that bit equals q_i, the 1 that N^ carries in excess.
//
// Interface: start is sampled while busy is low; done is a one-cycle pulse
// and result stays valid until the next start. Latency is 3 + c1 + L + c2
// cycles from the start cycle to done, where c1 and c2 are the conversion
// cycles (SC != 0 count, at most about W/2 each) and L = K+6 minus the number
// of skipped iterations. Synchronous active-low reset.
//
// Output range: with N mod 4 = 3 the result is below 2N, so it can be fed
// back as an operand. With N mod 4 = 1 the iteration adds 3N and the result
// is only guaranteed below 4N (this follows from the formulas; it is not
// discussed by the source). The datapath width W = K+6 keeps every
// intermediate carry-save value (below 19N) in range.
//
// From the source: the algorithm, CCSA, SM3, Zero_D, Skip_D, B^ and N^, the
// loop bounds and the default K = 32. This design's own: port widths, the
// handshake, the controller encoding, the skip guard on the last iteration and
// the register layout.
module scs_mm_new
  import mm_pkg::*;
#(
  parameter int unsigned K = 32  // modulus width in bits
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [K:0]   a,       // multiplier, A < 2N
  input  logic [K:0]   b,       // multiplicand, B < 2N
  input  logic [K-1:0] n,       // odd modulus
  output logic         busy,
  output logic         done,
  output logic [K+1:0] result   // congruent to A*B*2^-(K+2) mod N
);
  localparam int unsigned W = K + 6;

  mm_op_e        op;
  logic          skip_en, skip, sc_zero;
  logic          q_next, a_next;
  logic          alpha;

  logic [W-1:0]  ss_q, sc_q, d_q, b_hat_q, n_hat_q;
  logic [K:0]    a_sh_q;            // a_sh_q[0] = A_{i+1}, a_sh_q[1] = A_{i+2}
  logic          a_hat_q, q_hat_q;  // A^_i, q^_i
  logic [W-1:0]  b_hat, n_hat;
  logic [W-1:0]  x, s, c;

  mm_operand_prep #(.K(K), .W(W)) u_prep (
    .b    (b),
    .n    (n),
    .b_hat(b_hat),
    .n_hat(n_hat)
  );

  mm_sm3 #(.W(W)) u_sm3 (
    .a_hat(a_hat_q),
    .q_hat(q_hat_q),
    .n_hat(n_hat_q),
    .b_hat(b_hat_q),
    .d_hat(d_q),
    .x    (x)
  );

  assign alpha = (op == OP_ITER || op == OP_PRE_ADD) ? CCSA_1F : CCSA_2H;

  mm_ccsa #(.W(W)) u_ccsa (
    .alpha(alpha),
    .ss   (ss_q),
    .sc   (sc_q),
    .x    (x),
    .s    (s),
    .c    (c)
  );

  mm_zero_d #(.W(W)) u_zero (
    .sc  (sc_q),
    .zero(sc_zero)
  );

  mm_skip_d u_skip (
    .ss_lo  (ss_q[1:0]),
    .sc_lo  (sc_q[1:0]),
    .sum2   (s[2]),
    .a_nxt1 (a_sh_q[0]),
    .a_nxt2 (a_sh_q[1]),
    .skip_en(skip_en),
    .skip   (skip),
    .q_next (q_next),
    .a_next (a_next)
  );

  mm_ctrl #(.K(K)) u_ctrl (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (start),
    .sc_zero(sc_zero),
    .skip   (skip),
    .op     (op),
    .skip_en(skip_en),
    .busy   (busy),
    .done   (done)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ss_q    <= '0;
      sc_q    <= '0;
      d_q     <= '0;
      b_hat_q <= '0;
      n_hat_q <= '0;
      a_sh_q  <= '0;
      a_hat_q <= 1'b0;
      q_hat_q <= 1'b0;
      result  <= '0;
    end else begin
      unique case (op)
        OP_LOAD: begin
          b_hat_q <= b_hat;
          n_hat_q <= n_hat;
          ss_q    <= b_hat;
          sc_q    <= n_hat;
          a_sh_q  <= a;
          a_hat_q <= 1'b0;
          q_hat_q <= 1'b0;
        end
        OP_PRE_ADD, OP_CONV: begin
          ss_q    <= s;
          sc_q    <= c << 1;
          a_hat_q <= 1'b0;
          q_hat_q <= 1'b0;
        end
        OP_DLATCH: begin
          d_q     <= ss_q;
          ss_q    <= '0;
          sc_q    <= '0;
          a_hat_q <= 1'b0;
          q_hat_q <= 1'b0;
        end
        OP_ITER: begin
          if (skip) begin
            ss_q   <= s >> 2;
            sc_q   <= c >> 1;
            a_sh_q <= a_sh_q >> 2;
          end else begin
            ss_q   <= s >> 1;
            sc_q   <= c;
            a_sh_q <= a_sh_q >> 1;
          end
          a_hat_q <= a_next;
          q_hat_q <= q_next;
        end
        OP_FINISH: begin
          result <= ss_q[K+1:0];
        end
        default: ;
      endcase
    end
  end

  // Every operand the iteration adds has its two low bits zero.
  a_x_aligned : assert property (@(posedge clk) disable iff (!rst_n)
    (op == OP_ITER) |-> (x[1:0] == 2'b00));
  // A skipped iteration starts from an even pair with both low bits zero.
  a_skip_even : assert property (@(posedge clk) disable iff (!rst_n)
    (op == OP_ITER && skip) |-> (s[1] == 1'b0 && c[0] == 1'b0));
  // The converted result fits the output.
  a_result_fits : assert property (@(posedge clk) disable iff (!rst_n)
    (op == OP_FINISH) |-> (ss_q[W-1:K+2] == '0));
endmodule

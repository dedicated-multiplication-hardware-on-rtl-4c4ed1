// mm_operand_prep: forms the modified operands of the multiplier.
//
//   B^ = 8 * B                  (three low bits zero)
//   N^ = N + 1     if N mod 4 = 3
//   N^ = 3N + 1    if N mod 4 = 1
// Both choices make N^ a multiple of 4, so that every operand the iteration
// adds has its two low bits zero. N must be odd. Adding N^ in place of N (or
// 3N) is exact because the bit dropped by the divide-by-two shift is then the
// 1 that was added. The document gives the formulas; computing N^ with one
// plain adder (shift-and-add for 3N+1) is this design's own choice.
// Purely combinational; outputs are zero-extended to W bits, so b_hat[2:0]
// and the upper bits of both outputs are constant zero by construction.
module mm_operand_prep #(
  parameter int unsigned K = 32,     // modulus width in bits
  parameter int unsigned W = K + 6   // datapath width
) (
  input  logic [K:0]   b,      // multiplicand, B < 2N
  input  logic [K-1:0] n,      // odd modulus
  output logic [W-1:0] b_hat,
  output logic [W-1:0] n_hat
);
  logic [W-1:0] n_w;

  always_comb begin
    n_w   = W'(n);
    b_hat = W'(b) << 3;
    if (n[1]) n_hat = n_w + W'(1);
    else      n_hat = (n_w << 1) + n_w + W'(1);
  end
endmodule

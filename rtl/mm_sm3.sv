// mm_sm3: simplified 4-to-1 multiplexer SM3 that selects the third operand x
// of the carry-save adder in each Montgomery iteration:
//
//   A^ q^ | x
//   0  0  | 0
//   0  1  | N^
//   1  0  | B^
//   1  1  | D^ = B^ + N^
//
// Because one of the four inputs is zero, the multiplexer reduces to a 2-to-1
// multiplexer between B^ and D^ (steered by q^), a second 2-to-1 stage that
// takes N^ when A^ = 0, and an AND with (A^ | q^). This structure is this
// design's own reading of the simplified multiplexer. Purely combinational.
module mm_sm3 #(
  parameter int unsigned W = 38
) (
  input  logic         a_hat,  // A^_i, multiplier bit of this iteration
  input  logic         q_hat,  // q^_i, quotient bit of this iteration
  input  logic [W-1:0] n_hat,
  input  logic [W-1:0] b_hat,
  input  logic [W-1:0] d_hat,
  output logic [W-1:0] x
);
  logic [W-1:0] bd;

  always_comb begin
    bd = q_hat ? d_hat : b_hat;
    x  = (a_hat ? bd : n_hat) & {W{a_hat | q_hat}};
  end
endmodule

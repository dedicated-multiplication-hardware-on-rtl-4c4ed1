// mm_skip_d: skip detector Skip_D with quotient pre-computation.
//
// In iteration i the carry-save adder forms (SS[i] + SC[i] + x) / 2. Because
// every operand x (0, N^, B^, D^) has its two low bits zero, the low bits of
// the next carry-save pair are known from the current pair and the adder's
// bit-2 sum alone:
//   SS[i+1]_0 = SS[i]_1 ^ SC[i]_1                 (adder sum bit 1)
//   SC[i+1]_0 = SS[i]_0 & SC[i]_0                 (adder carry bit 0)
//   SS[i+1]_1 = SS[i]_2 ^ SC[i]_2 ^ x_2           (adder sum bit 2)
//   SC[i+1]_1 = SS[i]_1 & SC[i]_1                 (adder carry bit 1)
// giving the next quotient bits
//   q_{i+1} = SS[i+1]_0 ^ SC[i+1]_0
//   q_{i+2} = SS[i+1]_1 ^ SC[i+1]_1   (used only when iteration i+1 is skipped)
// and the skip flag
//   skip_{i+1} = ~(A_{i+1} | q_{i+1} | SS[i+1]_0).
// When skip is set, iteration i+1 would add zero to an even carry-save pair
// with both low bits zero, so it is replaced by an extra right shift and the
// multiplexers hand A_{i+2}, q_{i+2} to iteration i+2 instead of A_{i+1},
// q_{i+1}. The skip_en input (this design's addition) blocks a skip that would
// run past the last iteration of the loop. Purely combinational.
module mm_skip_d (
  input  logic [1:0] ss_lo,   // SS[i] bits 1:0
  input  logic [1:0] sc_lo,   // SC[i] bits 1:0
  input  logic       sum2,    // carry-save adder sum bit 2 (SS[i]_2 ^ SC[i]_2 ^ x_2)
  input  logic       a_nxt1,  // A_{i+1}
  input  logic       a_nxt2,  // A_{i+2}
  input  logic       skip_en, // iteration i+1 may be skipped
  output logic       skip,    // skip_{i+1}
  output logic       q_next,  // q^ for the next executed iteration
  output logic       a_next   // A^ for the next executed iteration
);
  logic ss1_next0;  // SS[i+1]_0
  logic q1, q2;

  always_comb begin
    ss1_next0 = ss_lo[1] ^ sc_lo[1];
    q1        = ss1_next0 ^ (ss_lo[0] & sc_lo[0]);
    q2        = sum2 ^ (ss_lo[1] & sc_lo[1]);
    skip      = skip_en & ~(a_nxt1 | q1 | ss1_next0);
    q_next    = skip ? q2 : q1;
    a_next    = skip ? a_nxt2 : a_nxt1;
  end
endmodule

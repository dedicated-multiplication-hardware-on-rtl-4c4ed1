// mm_cfa: configurable full adder (CFA) cell of the one-level configurable
// carry-save adder.
//
// With alpha = 1 the cell is an ordinary full adder of ss, sc and x: s is the
// sum bit and c the carry (weight of the next bit). With alpha = 0 the row of
// cells acts as two serial rows of half adders on (ss, sc): the first half
// adder of bit j is the XOR g1 = ss ^ sc plus the AND c1_out = ss & sc, whose
// result is passed to the neighbouring cell j+1; the second half adder of bit j
// adds g1 to the first-row carry c1_in arriving from cell j-1. So in that mode
// s and c are the outputs of the second half-adder row, and the value
// ss + sc of the whole row equals s + 2c.
//
// The gate-level split (one XOR, one AND shared with the neighbour, an input
// multiplexer choosing x or c1_in, an XOR and an AND/OR for the carry) follows
// the description of the CFA; the exact gate choice is this design's own.
// Purely combinational.
module mm_cfa (
  input  logic alpha,   // 1: full adder (1F_CSA), 0: two serial half adders (2H_CSA)
  input  logic ss,      // sum-vector bit
  input  logic sc,      // carry-vector bit
  input  logic x,       // third operand bit (used when alpha = 1)
  input  logic c1_in,   // first half-adder row carry from the cell below (alpha = 0)
  output logic s,       // sum bit
  output logic c,       // carry bit, weight of the next position
  output logic c1_out   // first half-adder row carry to the cell above
);
  logic g1;  // ss ^ sc
  logic y;   // selected third input

  always_comb begin
    g1     = ss ^ sc;
    c1_out = ss & sc;
    y      = alpha ? x : c1_in;
    s      = g1 ^ y;
    c      = (alpha & c1_out) | (g1 & y);
  end
endmodule

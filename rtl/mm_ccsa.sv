// mm_ccsa: one-level configurable carry-save adder (CCSA), a row of W
// configurable full adder cells (mm_cfa).
//
// alpha = 1 (1F_CSA): s + 2c = ss + sc + x, one three-input carry-save addition.
// alpha = 0 (2H_CSA): s + 2c = ss + sc, computed as two serial half-adder
//   carry-save additions; x is ignored. Repeating this step until the carry
//   vector is zero converts a carry-save number to binary in about half as
//   many cycles as a single half-adder row would need.
// c[j] has weight 2^(j+1); carries out of bit W-1 are dropped (the top
// cell's first-row carry c1[W] is deliberately left unused), so callers keep
// all values below 2^W. Purely combinational, no carry propagation.
module mm_ccsa #(
  parameter int unsigned W = 38  // vector width
) (
  input  logic         alpha,
  input  logic [W-1:0] ss,
  input  logic [W-1:0] sc,
  input  logic [W-1:0] x,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W:0] c1;  // first half-adder row carries, c1[j+1] from cell j

  assign c1[0] = 1'b0;

  for (genvar j = 0; j < W; j++) begin : g_cell
    mm_cfa u_cfa (
      .alpha (alpha),
      .ss    (ss[j]),
      .sc    (sc[j]),
      .x     (x[j]),
      .c1_in (c1[j]),
      .s     (s[j]),
      .c     (c[j]),
      .c1_out(c1[j+1])
    );
  end
endmodule

// mm_zero_d: zero detector Zero_D. Signals that the carry vector SC of the
// carry-save pair is all zero, i.e. that SS alone holds the binary value and
// the repeated carry-save additions used for B+N and for the final format
// conversion can stop. It is a single wide NOR, as the source describes.
// Purely combinational.
module mm_zero_d #(
  parameter int unsigned W = 38
) (
  input  logic [W-1:0] sc,
  output logic         zero
);
  assign zero = ~|sc;
endmodule

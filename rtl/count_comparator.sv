// count_comparator: unsigned greater-than of two crosstalk counts.
//
// gt is 1 when count a (taken from the Z1-masked candidate) is larger than
// count b (Z2-masked candidate), otherwise 0, so equal counts favour Z1. In the
// 4-bit cluster encoder it compares the two 2-bit type-2 counts; the width is a
// parameter so that the 8-bit cluster encoder can use it on 3-bit counts too.
//
// Timing: purely combinational.
module count_comparator #(
  parameter int unsigned CW = 2
) (
  input  logic [CW-1:0] a,
  input  logic [CW-1:0] b,
  output logic          gt
);
  assign gt = (a > b);
endmodule

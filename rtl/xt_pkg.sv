// xt_pkg: shared constants and helpers of the crosstalk-avoiding bus codec.
//
// Each cluster of W bus wires (W = 4 in schemes I and II, W = 8 in scheme III)
// is sent either as d XOR Z1 or as d XOR Z2, where Z1 = ...0101 and Z2 = ...1010
// are the two alternate-bit masks. A single decode bit per cluster tells the
// receiver which mask was used (0 = Z1, 1 = Z2).
//
// Scheme II sends the two decode bits of an 8-bit group on three wires with the
// thermometer-like code 000/001/011/111; dinfo_encode/dinfo_decode implement
// that mapping. On those four code words two neighbouring decode wires never
// switch in opposite directions. Which cluster is "first" (the low nibble here)
// is this design's choice.
package xt_pkg;

  // Which alternate-bit mask a cluster was sent with.
  typedef enum logic {
    SEL_Z1 = 1'b0,
    SEL_Z2 = 1'b1
  } basis_e;

  // 3-wire decode information of one 8-bit group (scheme II).
  typedef logic [2:0] dinfo_t;

  // Z1 = 0101...01 (bit 0 set), Z2 = its complement 1010...10.
  function automatic logic [31:0] z1_mask32();
    return 32'h5555_5555;
  endfunction

  // first: mask of the low nibble, second: mask of the high nibble.
  // Z1,Z1 -> 000  Z1,Z2 -> 001  Z2,Z1 -> 011  Z2,Z2 -> 111
  function automatic dinfo_t dinfo_encode(basis_e first, basis_e second);
    logic f, s;
    f = (first == SEL_Z2);
    s = (second == SEL_Z2);
    return {f & s, f, f | s};
  endfunction

  // Inverse of dinfo_encode: the first mask is wire 1, the second is the
  // parity of the three wires.
  function automatic logic [1:0] dinfo_decode(dinfo_t di);
    return {^di, di[1]};  // {second_is_z2, first_is_z2}
  endfunction

endpackage

// n4_count: type-4 crosstalk counter for one W-wire cluster.
//
// A type-4 coupling on a centre wire means it and both neighbours switch, each
// opposite to its neighbours. The detector follows the gate-level scheme of the
// codec: y(i) = x_i(n) XOR x_i(n-1) marks a switching wire, and one extra term,
// x_a(n) XOR x_b(n) of the two middle wires of a centre pair, separates the
// alternating case from all wires moving together (000 -> 111). For a centre
// pair (a, b) = (2g+1, 2g+2) two 4-input ANDs are formed,
//   y(a-1) & y(a) & y(a+1) & (x_a(n) ^ x_b(n))
//   y(b-1) & y(b) & y(b+1) & (x_a(n) ^ x_b(n))
// and ORed into one flag. With W = 4 there is one pair (wires 1 and 2), which is
// the published 1-bit counter. For W = 8 the same cell is repeated for the pairs
// (1,2), (3,4), (5,6) and the three flags are summed, giving the 0..3 range and
// 2-bit output stated for the 8-bit variant; the pairing is this design's
// reading of that extension. Note that the shared middle-pair term also flags a
// few transitions that are strictly type-2 (e.g. 110 -> 001 on wires 0..2);
// every true type-4 is flagged, and a code word and its complement are never
// both flagged by the same AND.
//
// Interface: cur = candidate code word x(n), prev = bus state x(n-1).
// Timing: purely combinational.
module n4_count #(
  parameter int unsigned W  = 4,                 // cluster width (even, >= 4)
  parameter int unsigned CW = $clog2((W-2)/2 + 1) // count width
) (
  input  logic [W-1:0]  cur,
  input  logic [W-1:0]  prev,
  output logic [CW-1:0] count
);
  localparam int unsigned NPAIR = (W - 2) / 2;

  logic [W-1:0]     y;
  logic [NPAIR-1:0] flag;

  assign y = cur ^ prev;

  always_comb begin
    for (int unsigned g = 0; g < NPAIR; g++) begin
      automatic int unsigned a = 2*g + 1;
      automatic int unsigned b = 2*g + 2;
      automatic logic        yab = cur[a] ^ cur[b];
      flag[g] = (y[a-1] & y[a] & y[a+1] & yab) | (y[b-1] & y[b] & y[b+1] & yab);
    end
  end

  always_comb begin
    count = '0;
    for (int unsigned g = 0; g < NPAIR; g++)
      count = count + CW'(flag[g]);
  end

endmodule

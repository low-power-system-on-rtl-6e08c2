// n2_count: type-2 crosstalk counter for one W-wire cluster.
//
// A type-2 coupling is counted for every pair of neighbouring wires that switch
// in opposite directions. Each pair check is a 3-input AND of the two
// switching terms y(i) = x_i(n) XOR x_i(n-1), y(i+1), and x_i(n) XOR x_{i+1}(n),
// the last term separating 01 -> 10 from 00 -> 11. The W-1 pair flags are then
// added. For W = 4 that is three checks summed to 0..3 on 2 bits; for W = 8 it
// is seven checks summed to 0..7 on 3 bits, as the codec requires.
//
// Interface: cur = candidate code word x(n), prev = bus state x(n-1).
// Timing: purely combinational.
module n2_count #(
  parameter int unsigned W  = 4,          // cluster width (>= 2)
  parameter int unsigned CW = $clog2(W)   // count width, holds 0..W-1
) (
  input  logic [W-1:0]  cur,
  input  logic [W-1:0]  prev,
  output logic [CW-1:0] count
);
  logic [W-1:0] y;
  logic [W-2:0] pair;

  assign y = cur ^ prev;

  always_comb begin
    for (int unsigned i = 0; i < W - 1; i++)
      pair[i] = y[i] & y[i+1] & (cur[i] ^ cur[i+1]);
  end

  always_comb begin
    count = '0;
    for (int unsigned i = 0; i < W - 1; i++)
      count = count + CW'(pair[i]);
  end

endmodule

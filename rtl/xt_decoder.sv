// xt_decoder: decoder for one W-wire cluster of the crosstalk-avoiding code.
//
// A selector picks the mask named by the decode bit (0 = Z1 = ..0101,
// 1 = Z2 = ..1010) and the incoming code word is XORed with it, which restores
// the original data because (d ^ Z) ^ Z = d.
//
// Interface: bus/dbit from the encoded bus, d the recovered data word.
// Timing: purely combinational (one XOR level after a 2:1 selector).
module xt_decoder
  import xt_pkg::*;
#(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] bus,
  input  logic         dbit,
  output logic [W-1:0] d
);
  localparam logic [W-1:0] Z1 = W'(z1_mask32());
  localparam logic [W-1:0] Z2 = ~Z1;

  logic [W-1:0] mask;

  assign mask = dbit ? Z2 : Z1;
  assign d    = bus ^ mask;
endmodule

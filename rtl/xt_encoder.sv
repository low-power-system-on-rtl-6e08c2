// xt_encoder: crosstalk-avoiding encoder for one W-wire bus cluster.
//
// The data word d(n) is XORed with the two alternate-bit masks Z1 (..0101) and
// Z2 (..1010). Each candidate goes through its own crosstalk check, a type-4
// counter (n4_count) and a type-2 counter (n2_count), against the previous bus
// state x(n-1). The selection rule is:
//   * the candidate with fewer type-4 couplings is sent;
//   * when both have the same type-4 count (for W = 4: both zero, since the
//     two candidates are complements and can never both be flagged), the
//     type-2 comparator decides: Z2 is sent only if the Z1 candidate has more
//     type-2 couplings, so ties go to Z1.
// The decode bit is 1 when the Z2 candidate is sent. With W = 4 the sent word
// never carries a type-4 transition inside the cluster.
//
// The multiplexer output (W code bits plus decode bit) is registered on the
// rising clock edge; the register drives the bus and is also x(n-1) for the next
// word. The load enable en and the reset state (all bus wires and the decode bit
// at 0) are this design's choices: with en low the bus simply holds and no wire
// switches. (The published block diagram also draws x(n-1) into the
// multiplexer without describing its use; holding the bus is done here by the
// register's enable.)
//
// Interface: d is the W-bit data word, bus/dbit the registered code word.
// Timing: one cycle from d (with en) to bus/dbit; the check path is a few gate
// levels.
module xt_encoder
  import xt_pkg::*;
#(
  parameter int unsigned W = 4   // cluster width: 4 (schemes I/II) or 8 (scheme III)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] bus,
  output logic         dbit,
  output basis_e       sel_next  // mask the next word will use (combinational)
);
  localparam int unsigned C4 = $clog2((W-2)/2 + 1);
  localparam int unsigned C2 = $clog2(W);
  localparam logic [W-1:0] Z1 = W'(z1_mask32());
  localparam logic [W-1:0] Z2 = ~Z1;

  logic [W-1:0]  xz1, xz2;
  logic [C4-1:0] n4_z1, n4_z2;
  logic [C2-1:0] n2_z1, n2_z2;
  logic          n4_gt, n4_lt, n2_gt;

  assign xz1 = d ^ Z1;
  assign xz2 = d ^ Z2;

  // crosstalk check of the Z1 candidate
  n4_count #(.W(W)) u_n4_z1 (.cur(xz1), .prev(bus), .count(n4_z1));
  n2_count #(.W(W)) u_n2_z1 (.cur(xz1), .prev(bus), .count(n2_z1));
  // crosstalk check of the Z2 candidate
  n4_count #(.W(W)) u_n4_z2 (.cur(xz2), .prev(bus), .count(n4_z2));
  n2_count #(.W(W)) u_n2_z2 (.cur(xz2), .prev(bus), .count(n2_z2));

  count_comparator #(.CW(C4)) u_cmp4_gt (.a(n4_z1), .b(n4_z2), .gt(n4_gt));
  count_comparator #(.CW(C4)) u_cmp4_lt (.a(n4_z2), .b(n4_z1), .gt(n4_lt));
  count_comparator #(.CW(C2)) u_cmp2    (.a(n2_z1), .b(n2_z2), .gt(n2_gt));

  always_comb begin
    if (n4_gt)      sel_next = SEL_Z2;
    else if (n4_lt) sel_next = SEL_Z1;
    else            sel_next = n2_gt ? SEL_Z2 : SEL_Z1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus  <= '0;
      dbit <= 1'b0;
    end else if (en) begin
      bus  <= (sel_next == SEL_Z2) ? xz2 : xz1;
      dbit <= (sel_next == SEL_Z2);
    end
  end

  // The two candidates are complements, so one AND of a type-4 cell can never
  // fire for both; for a 4-bit cluster at most one candidate is flagged.
  if (W == 4) begin : g_excl
    always_comb assert (!(n4_z1 != '0 && n4_z2 != '0))
      else $error("xt_encoder: both candidates flagged type-4");
  end

endmodule

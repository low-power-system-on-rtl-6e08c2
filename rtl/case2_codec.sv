// case2_codec: scheme II of the crosstalk-avoiding bus code, with shield wires
// (62.5 % extra wires: 8 -> 13, 16 -> 27, 32 -> 55).
//
// Every 8-bit group holds two 4-bit clusters encoded exactly as in scheme I.
// Their two decode bits are sent on three wires with the code of xt_pkg
// (Z1/Z1 -> 000, Z1/Z2 -> 001, Z2/Z1 -> 011, Z2/Z2 -> 111), on which
// neighbouring decode wires never switch in opposite directions. Grounded
// shield wires (constant 0) separate the two clusters, the upper cluster from
// the decode wires, and one group from the next, so no worst-case coupling can
// cross a cluster boundary.
//
// Wire order of group g, counted from wire 14g (this design's choice; the wire
// counts are the published ones):
//   +0..+3  low cluster (data bits 8g..8g+3)   +4  shield
//   +5..+8  high cluster (data bits 8g+4..+7)  +9  shield
//   +10..+12 decode info                       +13 shield (not after the last group)
// The three decode wires are registered together with the clusters (from the
// encoders' next-mask outputs), so they switch on the same clock edge and carry
// no combinational glitch. Timing as in case1_codec.
module case2_codec
  import xt_pkg::*;
#(
  parameter int unsigned N  = 32,                 // data bus width, multiple of 8
  parameter int unsigned NW = 14 * (N / 8) - 1    // coded bus width incl. shields
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [N-1:0]  d_in,
  output logic [NW-1:0] bus_out,
  input  logic [NW-1:0] bus_in,
  output logic [N-1:0]  d_out
);
  localparam int unsigned NG = N / 8;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    localparam int unsigned B = 14 * g;
    logic [3:0] code_lo, code_hi;
    basis_e     sel_lo, sel_hi;
    dinfo_t     dinfo_q;
    logic [1:0] dsel;

    xt_encoder #(.W(4)) u_enc_lo (
      .clk, .rst_n, .en,
      .d        (d_in[8*g +: 4]),
      .bus      (code_lo),
      .dbit     (),
      .sel_next (sel_lo)
    );
    xt_encoder #(.W(4)) u_enc_hi (
      .clk, .rst_n, .en,
      .d        (d_in[8*g+4 +: 4]),
      .bus      (code_hi),
      .dbit     (),
      .sel_next (sel_hi)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  dinfo_q <= dinfo_encode(SEL_Z1, SEL_Z1);
      else if (en) dinfo_q <= dinfo_encode(sel_lo, sel_hi);
    end

    assign bus_out[B +: 4]      = code_lo;
    assign bus_out[B + 4]       = 1'b0;       // shield
    assign bus_out[B + 5 +: 4]  = code_hi;
    assign bus_out[B + 9]       = 1'b0;       // shield
    assign bus_out[B + 10 +: 3] = dinfo_q;
    if (g < NG - 1) begin : g_sh
      assign bus_out[B + 13] = 1'b0;          // shield between groups
    end

    assign dsel = dinfo_decode(bus_in[B + 10 +: 3]);

    xt_decoder #(.W(4)) u_dec_lo (
      .bus  (bus_in[B +: 4]),
      .dbit (dsel[0]),
      .d    (d_out[8*g +: 4])
    );
    xt_decoder #(.W(4)) u_dec_hi (
      .bus  (bus_in[B + 5 +: 4]),
      .dbit (dsel[1]),
      .d    (d_out[8*g+4 +: 4])
    );
  end

  initial assert (N % 8 == 0 && NW == 14 * (N / 8) - 1)
    else $error("case2_codec: N must be a multiple of 8 and NW = 14*N/8 - 1");

endmodule

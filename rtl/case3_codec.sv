// case3_codec: scheme III of the crosstalk-avoiding bus code (12.5 % extra
// wires, one decode wire per byte, the same overhead as bus-invert).
//
// The N-bit data bus is split into N/8 byte clusters, each encoded with the
// 8-bit form of the cluster encoder: masks Z1 = 01010101 and Z2 = 10101010,
// a 2-bit type-4 count and a 3-bit type-2 count per candidate. The candidate
// with fewer type-4 couplings is sent; on equal type-4 counts the one with fewer
// type-2 couplings, ties going to Z1. The coded bus has N + N/8 wires and N/8
// byte decoders restore the data at the receiver.
//
// Wire order (this design's choice): wires 8k..8k+7 carry byte k, wire N+k its
// decode bit. Timing as in case1_codec: bus_out one clock after d_in (en high),
// d_out combinational from bus_in.
module case3_codec #(
  parameter int unsigned N  = 32,          // data bus width, a multiple of 8
  parameter int unsigned NW = N + N / 8    // coded bus width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [N-1:0]  d_in,
  output logic [NW-1:0] bus_out,
  input  logic [NW-1:0] bus_in,
  output logic [N-1:0]  d_out
);
  localparam int unsigned NC = N / 8;

  for (genvar k = 0; k < NC; k++) begin : g_cl
    logic [7:0] code;
    logic       dbit;

    xt_encoder #(.W(8)) u_enc (
      .clk, .rst_n, .en,
      .d        (d_in[8*k +: 8]),
      .bus      (code),
      .dbit     (dbit),
      .sel_next ()
    );
    assign bus_out[8*k +: 8] = code;
    assign bus_out[N + k]    = dbit;

    xt_decoder #(.W(8)) u_dec (
      .bus  (bus_in[8*k +: 8]),
      .dbit (bus_in[N + k]),
      .d    (d_out[8*k +: 8])
    );
  end

  initial assert (N % 8 == 0 && NW == N + N / 8)
    else $error("case3_codec: N must be a multiple of 8 and NW = N + N/8");

endmodule

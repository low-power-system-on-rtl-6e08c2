// case1_codec: scheme I of the crosstalk-avoiding bus code (25 % extra wires).
//
// The N-bit data bus is split into N/4 clusters of 4 bits. Each cluster has its
// own 4-bit encoder (xt_encoder) and one decode wire, so the bus carries
// N + N/4 wires. On the receiving side N/4 cluster decoders (xt_decoder) restore
// the data. Inside every cluster no type-4 transition can occur; between
// clusters and next to the decode wires it still can (scheme II adds shields for
// that).
//
// Wire order on the coded bus (this design's choice): wires 4k..4k+3 carry
// cluster k (data bits 4k..4k+3 after masking), wire N+k carries the decode bit
// of cluster k, i.e. all decode wires sit together above the data wires.
//
// The transmit side (d_in -> bus_out) and the receive side (bus_in -> d_out)
// are independent so that one instance serves one end of a link; the other end
// decodes what this end sends. bus_out changes one clock after d_in is taken
// (en high); d_out follows bus_in combinationally.
module case1_codec #(
  parameter int unsigned N  = 32,          // data bus width, a multiple of 4
  parameter int unsigned NW = N + N / 4    // coded bus width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [N-1:0]  d_in,
  output logic [NW-1:0] bus_out,
  input  logic [NW-1:0] bus_in,
  output logic [N-1:0]  d_out
);
  localparam int unsigned NC = N / 4;

  for (genvar k = 0; k < NC; k++) begin : g_cl
    logic [3:0] code;
    logic       dbit;

    xt_encoder #(.W(4)) u_enc (
      .clk, .rst_n, .en,
      .d        (d_in[4*k +: 4]),
      .bus      (code),
      .dbit     (dbit),
      .sel_next ()
    );
    assign bus_out[4*k +: 4] = code;
    assign bus_out[N + k]    = dbit;

    xt_decoder #(.W(4)) u_dec (
      .bus  (bus_in[4*k +: 4]),
      .dbit (bus_in[N + k]),
      .d    (d_out[4*k +: 4])
    );
  end

  initial assert (N % 4 == 0 && NW == N + N / 4)
    else $error("case1_codec: N must be a multiple of 4 and NW = N + N/4");

endmodule

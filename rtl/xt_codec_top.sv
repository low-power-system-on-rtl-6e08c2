// xt_codec_top: the three crosstalk-avoiding bus links side by side.
//
// One data stream d_in (for example the write data an IP core sends across the
// on-chip bus to the external memory controller) is carried over three coded
// links, one per scheme, each made of a transmit-side encoder bank, the coded
// bus wires and a receive-side decoder bank:
//   scheme I   (case1_codec): N/4 4-bit clusters + N/4 decode wires   (25 %)
//   scheme II  (case2_codec): as I, decode info on 3 wires per byte,
//                             plus grounded shield wires              (62.5 %)
//   scheme III (case3_codec): N/8 8-bit clusters + N/8 decode wires   (12.5 %)
// The coded buses are brought out (bus1/bus2/bus3) so that their switching and
// coupling activity can be observed, and each link's decoded data comes back out
// as q1/q2/q3. In a real system only one scheme is used per bus and the encoder
// and decoder sit at the two ends of it; placing all three here lets them run
// the same traffic.
//
// Timing: a word presented on d_in with en high appears on the coded buses and,
// decoded, on q1..q3 after one rising clock edge. Reset (rst_n low,
// asynchronous) clears every coded wire.
module xt_codec_top #(
  parameter int unsigned N   = 32,                // data bus width (AHB HWDATA)
  parameter int unsigned NW1 = N + N / 4,         // scheme I wires
  parameter int unsigned NW2 = 14 * (N / 8) - 1,  // scheme II wires
  parameter int unsigned NW3 = N + N / 8          // scheme III wires
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic [N-1:0]   d_in,
  output logic [NW1-1:0] bus1,
  output logic [NW2-1:0] bus2,
  output logic [NW3-1:0] bus3,
  output logic [N-1:0]   q1,
  output logic [N-1:0]   q2,
  output logic [N-1:0]   q3
);
  case1_codec #(.N(N), .NW(NW1)) u_case1 (
    .clk, .rst_n, .en, .d_in,
    .bus_out (bus1),
    .bus_in  (bus1),
    .d_out   (q1)
  );

  case2_codec #(.N(N), .NW(NW2)) u_case2 (
    .clk, .rst_n, .en, .d_in,
    .bus_out (bus2),
    .bus_in  (bus2),
    .d_out   (q2)
  );

  case3_codec #(.N(N), .NW(NW3)) u_case3 (
    .clk, .rst_n, .en, .d_in,
    .bus_out (bus3),
    .bus_in  (bus3),
    .d_out   (q3)
  );
endmodule

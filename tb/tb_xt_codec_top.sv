// tb_xt_codec_top: end-to-end test of the three coded links at full size
// (N = 32: 40, 55 and 36 wires), top parameters left at their defaults.
//
// Traffic is a mix of random words, slowly varying words and idle cycles. After
// every rising edge all three coded buses are checked against the reference
// encoder, the three decoded outputs against the word of that cycle, and
// schemes I and II against the no-type-4 guarantee. The test counts how often
// each selection mechanism acted and fails if one never did:
//   z2_by_n4   Z2 sent because the Z1 candidate had more type-4 couplings
//   z1_by_n4   Z1 sent because the Z2 candidate had more type-4 couplings
//   z2_by_n2   type-4 equal, Z2 sent because Z1 had more type-2 couplings
//   z1_tie     type-4 equal, type-2 not larger for Z1, Z1 sent
//   n4_equal   scheme III: both candidates with the same non-zero type-4 count
//   hold       en low, bus unchanged
//   dinfo[c]   scheme II: each of the four 3-wire decode codes
// It also prints the net switching activity of each coded bus against the
// unencoded 32-bit bus for this traffic.
module tb_xt_codec_top;
  import xt_ref_pkg::*;

  localparam int N   = 32;
  localparam int NW1 = 40, NW2 = 55, NW3 = 36;

  int checks = 0, failures = 0;
  int z2_by_n4 = 0, z1_by_n4 = 0, z2_by_n2 = 0, z1_tie = 0, n4_equal = 0, hold = 0;
  int dinfo_seen[4] = '{0, 0, 0, 0};
  act_t a_raw, a1, a2, a3;

  logic clk = 0, rst_n = 1, en = 0;
  logic [N-1:0]   d_in, q1, q2, q3;
  logic [NW1-1:0] bus1;
  logic [NW2-1:0] bus2;
  logic [NW3-1:0] bus3;

  xt_codec_top dut (.clk, .rst_n, .en, .d_in, .bus1, .bus2, .bus3, .q1, .q2, .q3);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // classify one cluster decision and return the expected mask choice
  function automatic bit classify(logic [63:0] d, logic [63:0] prev, int w);
    logic [63:0] c1 = (d ^ ref_mask(0, w)) & ((64'd1 << w) - 1);
    logic [63:0] c2 = (d ^ ref_mask(1, w)) & ((64'd1 << w) - 1);
    int a4 = ref_n4(c1, prev, w), b4 = ref_n4(c2, prev, w);
    if (a4 > b4) begin z2_by_n4++; return 1; end
    if (a4 < b4) begin z1_by_n4++; return 0; end
    if (a4 != 0) n4_equal++;
    if (ref_n2(c1, prev, w) > ref_n2(c2, prev, w)) begin z2_by_n2++; return 1; end
    z1_tie++;
    return 0;
  endfunction

  function automatic void need(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endfunction

  initial begin
    logic [NW1-1:0] p1;
    logic [NW2-1:0] p2;
    logic [NW3-1:0] p3;
    logic [N-1:0]   word, last;
    bit             ena;
    d_in = '0; last = '0;
    #2 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 need(bus1 == '0 && bus2 == '0 && bus3 == '0, "reset clears the coded buses");
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if ((i / 1000) % 2 == 0) word = $urandom;
      else word = last + 32'($urandom % 5) - 32'd2;   // slowly varying samples
      ena = ($urandom % 16) != 0;
      d_in = word; en = ena;
      p1 = bus1; p2 = bus2; p3 = bus3;
      @(posedge clk); #1;
      if (!ena) begin
        hold++;
        need(bus1 == p1 && bus2 == p2 && bus3 == p3, "buses hold while en is low");
        continue;
      end
      ref_activity(64'(word), 64'(last), N, a_raw);
      ref_activity(64'(bus1), 64'(p1), NW1, a1);
      ref_activity(64'(bus2), 64'(p2), NW2, a2);
      ref_activity(64'(bus3), 64'(p3), NW3, a3);
      last = word;
      // scheme I
      for (int k = 0; k < N / 4; k++) begin
        automatic bit z = classify(64'(word[4*k +: 4]), 64'(p1[4*k +: 4]), 4);
        need(bus1[4*k +: 4] == (word[4*k +: 4] ^ 4'(ref_mask(z, 4))) && bus1[N+k] == z,
             "scheme I cluster code");
      end
      need(ref_true_n4(64'(bus1[3:0]), 64'(p1[3:0]), 4) == 0, "scheme I no type-4 in cluster 0");
      // scheme II
      for (int g = 0; g < N / 8; g++) begin
        automatic int b = 14 * g;
        automatic bit zl = ref_choose_z2(64'(word[8*g +: 4]), 64'(p2[b +: 4]), 4);
        automatic bit zh = ref_choose_z2(64'(word[8*g+4 +: 4]), 64'(p2[b+5 +: 4]), 4);
        automatic logic [2:0] di = zl ? (zh ? 3'b111 : 3'b011) : (zh ? 3'b001 : 3'b000);
        need(bus2[b +: 4] == (word[8*g +: 4] ^ 4'(ref_mask(zl, 4))) &&
             bus2[b+5 +: 4] == (word[8*g+4 +: 4] ^ 4'(ref_mask(zh, 4))) &&
             bus2[b+10 +: 3] == di && !bus2[b+4] && !bus2[b+9], "scheme II group code");
        dinfo_seen[{zl, zh}]++;
      end
      need(ref_true_n4(64'(bus2), 64'(p2), NW2) == 0, "scheme II bus free of type-4");
      // scheme III
      for (int k = 0; k < N / 8; k++) begin
        automatic bit z = classify(64'(word[8*k +: 8]), 64'(p3[8*k +: 8]), 8);
        need(bus3[8*k +: 8] == (word[8*k +: 8] ^ 8'(ref_mask(z, 8))) && bus3[N+k] == z,
             "scheme III byte code");
      end
      need(q1 == word && q2 == word && q3 == word, "all links deliver the word");
    end

    $display("z2_by_n4=%0d z1_by_n4=%0d z2_by_n2=%0d z1_tie=%0d n4_equal=%0d hold=%0d",
             z2_by_n4, z1_by_n4, z2_by_n2, z1_tie, n4_equal, hold);
    $display("dinfo codes 000=%0d 001=%0d 011=%0d 111=%0d",
             dinfo_seen[0], dinfo_seen[1], dinfo_seen[2], dinfo_seen[3]);
    need(z2_by_n4 > 0, "mechanism z2_by_n4 exercised");
    need(z1_by_n4 > 0, "mechanism z1_by_n4 exercised");
    need(z2_by_n2 > 0, "mechanism z2_by_n2 exercised");
    need(z1_tie > 0,   "mechanism z1_tie exercised");
    need(n4_equal > 0, "mechanism n4_equal exercised");
    need(hold > 0,     "mechanism hold exercised");
    for (int c = 0; c < 4; c++) need(dinfo_seen[c] > 0, "every scheme II decode code used");
    $display("net activity: raw %.0f  I %.0f (%.1f%%)  II %.0f (%.1f%%)  III %.0f (%.1f%%)",
             a_raw.activity,
             a1.activity, 100.0 * (1.0 - a1.activity / a_raw.activity),
             a2.activity, 100.0 * (1.0 - a2.activity / a_raw.activity),
             a3.activity, 100.0 * (1.0 - a3.activity / a_raw.activity));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

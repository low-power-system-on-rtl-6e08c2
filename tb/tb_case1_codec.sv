// tb_case1_codec: scheme I link check at N = 32 (40 wires).
//
// Random words (with occasional idle cycles) are encoded and the coded bus is
// looped back into the receive side. After each rising edge the test checks,
// per 4-bit cluster, the masked code and the decode wire against the reference
// choice made from the previous bus word, that the receive side returns the
// word applied one cycle earlier, and that no cluster shows a true type-4
// transition.
module tb_case1_codec;
  import xt_ref_pkg::*;

  localparam int N  = 32;
  localparam int NW = N + N / 4;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 1, en = 0;
  logic [N-1:0]  d_in, d_out;
  logic [NW-1:0] bus;

  case1_codec dut (.clk, .rst_n, .en, .d_in, .bus_out(bus), .bus_in(bus), .d_out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NW-1:0] prev;
    logic [N-1:0]  word;
    bit            ena;
    d_in = '0;
    #2 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (bus != '0) begin failures++; $display("reset state wrong"); end
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      word = $urandom;
      if (i % 3 == 0) word = word & 32'h0000_FFFF;  // correlated upper half
      ena  = ($urandom % 10) != 0;
      d_in = word; en = ena; prev = bus;
      @(posedge clk); #1;
      if (!ena) begin
        checks++;
        if (bus != prev) begin failures++; $display("bus moved with en low"); end
        continue;
      end
      for (int k = 0; k < N / 4; k++) begin
        automatic bit z2 = ref_choose_z2(64'(word[4*k +: 4]), 64'(prev[4*k +: 4]), 4);
        checks++;
        if (bus[4*k +: 4] != (word[4*k +: 4] ^ 4'(ref_mask(z2, 4))) || bus[N+k] != z2) begin
          failures++;
          $display("cluster %0d: prev=%b d=%b got %b/%b exp dbit %b", k,
                   prev[4*k +: 4], word[4*k +: 4], bus[4*k +: 4], bus[N+k], z2);
        end
        checks++;
        if (ref_true_n4(64'(bus[4*k +: 4]), 64'(prev[4*k +: 4]), 4) != 0) begin
          failures++; $display("type-4 inside cluster %0d", k);
        end
      end
      checks++;
      if (d_out != word) begin
        failures++; $display("decoded %h exp %h", d_out, word);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

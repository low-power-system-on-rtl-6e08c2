// tb_case2_codec: scheme II link check at N = 32 (55 wires with shields).
//
// Random words (with idle cycles) are encoded and looped back. After each
// rising edge the test checks, per 8-bit group, both 4-bit clusters against the
// reference choice, that the three decode wires hold the code of the table
// (Z1Z1 000, Z1Z2 001, Z2Z1 011, Z2Z2 111), that every shield wire is 0, that
// the receive side returns the word of the previous cycle, and that the whole
// 55-wire bus never shows a true type-4 transition. All four decode codes must
// occur.
module tb_case2_codec;
  import xt_ref_pkg::*;

  localparam int N  = 32;
  localparam int NW = 14 * (N / 8) - 1;

  int checks = 0, failures = 0;
  int seen[4] = '{0, 0, 0, 0};

  logic clk = 0, rst_n = 1, en = 0;
  logic [N-1:0]  d_in, d_out;
  logic [NW-1:0] bus;

  case2_codec dut (.clk, .rst_n, .en, .d_in, .bus_out(bus), .bus_in(bus), .d_out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2:0] table2(bit lo_z2, bit hi_z2);
    case ({lo_z2, hi_z2})
      2'b00:   return 3'b000;
      2'b01:   return 3'b001;
      2'b10:   return 3'b011;
      default: return 3'b111;
    endcase
  endfunction

  initial begin
    logic [NW-1:0] prev;
    logic [N-1:0]  word;
    bit            ena;
    checks++;
    if (NW != 55) failures++;
    d_in = '0;
    #2 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (bus != '0) begin failures++; $display("reset state wrong"); end
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      word = $urandom;
      ena  = ($urandom % 10) != 0;
      d_in = word; en = ena; prev = bus;
      @(posedge clk); #1;
      if (!ena) begin
        checks++;
        if (bus != prev) begin failures++; $display("bus moved with en low"); end
        continue;
      end
      for (int g = 0; g < N / 8; g++) begin
        automatic int b = 14 * g;
        automatic bit zl = ref_choose_z2(64'(word[8*g +: 4]), 64'(prev[b +: 4]), 4);
        automatic bit zh = ref_choose_z2(64'(word[8*g+4 +: 4]), 64'(prev[b+5 +: 4]), 4);
        checks += 4;
        if (bus[b +: 4] != (word[8*g +: 4] ^ 4'(ref_mask(zl, 4)))) begin
          failures++; $display("group %0d low cluster wrong", g);
        end
        if (bus[b+5 +: 4] != (word[8*g+4 +: 4] ^ 4'(ref_mask(zh, 4)))) begin
          failures++; $display("group %0d high cluster wrong", g);
        end
        if (bus[b+10 +: 3] != table2(zl, zh)) begin
          failures++; $display("group %0d decode info %b exp %b", g, bus[b+10 +: 3], table2(zl, zh));
        end
        if (bus[b+4] || bus[b+9] || (g < N / 8 - 1 && bus[b+13])) begin
          failures++; $display("group %0d shield not grounded", g);
        end
        seen[{zl, zh}]++;
      end
      checks += 2;
      if (ref_true_n4(64'(bus), 64'(prev), NW) != 0) begin
        failures++; $display("type-4 on shielded bus");
      end
      if (d_out != word) begin
        failures++; $display("decoded %h exp %h", d_out, word);
      end
    end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (seen[c] == 0) begin failures++; $display("decode code %0d never used", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

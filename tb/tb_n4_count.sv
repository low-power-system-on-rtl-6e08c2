// tb_n4_count: exhaustive check of the type-4 counter for 4- and 8-wire
// clusters against the reference rule, plus the property that every true
// type-4 transition is flagged in a 4-wire cluster.
module tb_n4_count;
  import xt_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [3:0] cur4, prev4;
  logic [0:0] cnt4;
  logic [7:0] cur8, prev8;
  logic [1:0] cnt8;

  n4_count #(.W(4)) dut4 (.cur(cur4), .prev(prev4), .count(cnt4));
  n4_count #(.W(8)) dut8 (.cur(cur8), .prev(prev8), .count(cnt8));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seen4 = 0;
    for (int p = 0; p < 16; p++)
      for (int c = 0; c < 16; c++) begin
        prev4 = 4'(p); cur4 = 4'(c); #1;
        checks++;
        if (int'(cnt4) != ref_n4(64'(c), 64'(p), 4)) begin
          failures++;
          $display("W=4 %b->%b: got %0d exp %0d", prev4, cur4, cnt4, ref_n4(64'(c), 64'(p), 4));
        end
        if (ref_true_n4(64'(c), 64'(p), 4) > 0) begin
          seen4++;
          checks++;
          if (cnt4 == 0) begin
            failures++;
            $display("true type-4 %b->%b missed", prev4, cur4);
          end
        end
        // a word and its complement are never both flagged
        cur4 = ~4'(c); #1;
        checks++;
        if (cnt4 != 0 && ref_n4(64'(c), 64'(p), 4) != 0) begin
          failures++;
          $display("both candidates flagged for %b->%b", prev4, 4'(c));
        end
      end
    // directed: published example 0101 -> 1010 has a type-4
    prev4 = 4'b0101; cur4 = 4'b1010; #1;
    checks++; if (cnt4 != 1) failures++;
    prev4 = 4'b0000; cur4 = 4'b1111; #1;
    checks++; if (cnt4 != 0) failures++;
    if (seen4 == 0) failures++;

    for (int p = 0; p < 256; p++)
      for (int c = 0; c < 256; c++) begin
        prev8 = 8'(p); cur8 = 8'(c); #1;
        checks++;
        if (int'(cnt8) != ref_n4(64'(c), 64'(p), 8)) begin
          failures++;
          if (failures < 10)
            $display("W=8 %b->%b: got %0d exp %0d", prev8, cur8, cnt8, ref_n4(64'(c), 64'(p), 8));
        end
      end
    prev8 = 8'h55; cur8 = 8'hAA; #1;
    checks++; if (cnt8 != 3) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

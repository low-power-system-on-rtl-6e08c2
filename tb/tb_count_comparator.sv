// tb_count_comparator: exhaustive check of the greater-than comparator at the
// 2-bit width used by 4-wire clusters and the 3-bit width used by 8-wire ones.
module tb_count_comparator;
  int checks = 0, failures = 0;

  logic [1:0] a2, b2;
  logic [2:0] a3, b3;
  logic       gt2, gt3;

  count_comparator #(.CW(2)) dut2 (.a(a2), .b(b2), .gt(gt2));
  count_comparator #(.CW(3)) dut3 (.a(a3), .b(b3), .gt(gt3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++) begin
        a2 = 2'(a); b2 = 2'(b); #1;
        checks++;
        if (gt2 !== (a > b)) begin
          failures++;
          $display("CW=2 %0d>%0d got %b", a, b, gt2);
        end
      end
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++) begin
        a3 = 3'(a); b3 = 3'(b); #1;
        checks++;
        if (gt3 !== (a > b)) begin
          failures++;
          $display("CW=3 %0d>%0d got %b", a, b, gt3);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

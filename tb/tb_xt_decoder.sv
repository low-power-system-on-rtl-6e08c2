// tb_xt_decoder: exhaustive check of the 4- and 8-wire cluster decoders: the
// data must be the bus word with the even wires inverted when the decode bit
// is 0 (mask Z1) and the odd wires inverted when it is 1 (mask Z2).
module tb_xt_decoder;
  import xt_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [3:0] bus4, d4;
  logic [7:0] bus8, d8;
  logic       db4, db8;

  xt_decoder #(.W(4)) dut4 (.bus(bus4), .dbit(db4), .d(d4));
  xt_decoder #(.W(8)) dut8 (.bus(bus8), .dbit(db8), .d(d8));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int z = 0; z < 2; z++) begin
      for (int v = 0; v < 16; v++) begin
        bus4 = 4'(v); db4 = z[0]; #1;
        checks++;
        if (d4 != (bus4 ^ 4'(ref_mask(z[0], 4)))) begin
          failures++;
          $display("W=4 bus=%b db=%0d got %b", bus4, db4, d4);
        end
      end
      for (int v = 0; v < 256; v++) begin
        bus8 = 8'(v); db8 = z[0]; #1;
        checks++;
        if (d8 != (bus8 ^ 8'(ref_mask(z[0], 8)))) begin
          failures++;
          $display("W=8 bus=%b db=%0d got %b", bus8, db8, d8);
        end
      end
    end
    // published example: 1010 sent with Z1 appears as 1111, with Z2 as 0000
    bus4 = 4'b1111; db4 = 1'b0; #1; checks++; if (d4 != 4'b1010) failures++;
    bus4 = 4'b0000; db4 = 1'b1; #1; checks++; if (d4 != 4'b1010) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

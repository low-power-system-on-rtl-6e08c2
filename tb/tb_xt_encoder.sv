// tb_xt_encoder: cycle-accurate check of the 4-wire and 8-wire cluster
// encoders against a reference model of the selection rule.
//
// Each cycle a word is applied on the falling edge; after the next rising edge
// the registered bus word and decode bit must equal the reference choice made
// against the previous bus word (one cycle latency). The test also checks that
// decoding restores the data, that a 4-wire cluster never shows a true type-4
// transition, that en low holds the bus and that reset clears it. The published
// example (bus 0101, data 1010 -> sent as 0000 with Z2) is applied directly.
module tb_xt_encoder;
  import xt_ref_pkg::*;
  import xt_pkg::*;

  int checks = 0, failures = 0;
  int n_z2 = 0, n_z1 = 0, n_hold = 0;

  logic clk = 0, rst_n = 1, en = 0;
  logic [3:0] d4, bus4;
  logic [7:0] d8, bus8;
  logic db4, db8;
  basis_e sel4, sel8;

  xt_encoder #(.W(4)) dut4 (.clk, .rst_n, .en, .d(d4), .bus(bus4), .dbit(db4), .sel_next(sel4));
  xt_encoder #(.W(8)) dut8 (.clk, .rst_n, .en, .d(d8), .bus(bus8), .dbit(db8), .sel_next(sel8));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // apply one word to both encoders and check the result one clock later
  task automatic step(logic [3:0] a4, logic [7:0] a8, bit ena);
    logic [3:0] p4;
    logic [7:0] p8;
    bit z4, z8;
    @(negedge clk);
    d4 = a4; d8 = a8; en = ena;
    p4 = bus4; p8 = bus8;
    z4 = ref_choose_z2(64'(a4), 64'(p4), 4);
    z8 = ref_choose_z2(64'(a8), 64'(p8), 8);
    @(posedge clk); #1;
    if (!ena) begin
      checks++; n_hold++;
      if (bus4 != p4 || bus8 != p8) begin
        failures++; $display("bus moved with en low");
      end
      return;
    end
    checks += 4;
    if (db4 != z4 || bus4 != (a4 ^ 4'(ref_mask(z4, 4)))) begin
      failures++;
      $display("W=4 prev=%b d=%b: got bus=%b db=%b exp db=%b", p4, a4, bus4, db4, z4);
    end
    if (db8 != z8 || bus8 != (a8 ^ 8'(ref_mask(z8, 8)))) begin
      failures++;
      $display("W=8 prev=%b d=%b: got bus=%b db=%b exp db=%b", p8, a8, bus8, db8, z8);
    end
    if ((bus4 ^ 4'(ref_mask(db4, 4))) != a4 || (bus8 ^ 8'(ref_mask(db8, 8))) != a8) begin
      failures++; $display("decode mismatch");
    end
    if (ref_true_n4(64'(bus4), 64'(p4), 4) != 0) begin
      failures++; $display("type-4 on 4-wire cluster %b->%b", p4, bus4);
    end
    if (z4) n_z2++; else n_z1++;
  endtask

  initial begin
    d4 = '0; d8 = '0;
    #2 rst_n = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (bus4 != 0 || db4 != 0 || bus8 != 0 || db8 != 0) begin
      failures++; $display("reset state wrong");
    end
    rst_n = 1;
    // bus 0000 -> 0101 first (data 0000 ^ Z1 = 0101 has no N4; N2 ties -> Z1)
    step(4'b0000, 8'h00, 1);
    checks++; if (bus4 != 4'b0101 || db4 != 0) failures++;
    // published example: bus 0101, data 1010: Z1 gives 1111, Z2 gives 0000
    step(4'b1010, 8'hAA, 1);
    checks++; if (bus4 != 4'b1111 || db4 != 0) failures++;  // neither has N4 or N2: tie -> Z1
    for (int i = 0; i < 5000; i++)
      step(4'($urandom), 8'($urandom), ($urandom % 8) != 0);
    // long random run with en always high
    for (int i = 0; i < 5000; i++)
      step(4'($urandom), 8'($urandom), 1);
    checks++;
    if (n_z1 == 0 || n_z2 == 0 || n_hold == 0) begin
      failures++; $display("coverage: z1=%0d z2=%0d hold=%0d", n_z1, n_z2, n_hold);
    end
    $display("z1=%0d z2=%0d hold=%0d", n_z1, n_z2, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_workloads: energy and crosstalk comparison of the three schemes on the
// evaluated traffic classes, at data widths of 8, 16 and 32 bits.
//
// Two streams are used: uniformly random words ("ran") and an image-like
// stream ("img"): a synthetic 64 x 64 8-bit picture made of smooth shading plus
// a little noise, sent pixel by pixel in raster order, N/8 pixels per word. For
// each width one xt_codec_top instance carries the stream; the unencoded N-wire
// bus is modelled alongside. For every bus the net switching activity of the
// lumped wire model is accumulated,
//   sum over wires ending high of  delta_i + lambda * sum_nbr (delta_i - delta_j)
// with lambda = C_I / C_L = 3.2, and the saving is (1 - Nc / Nu) * 100.
// Checks: every link returns every word, every scheme saves energy on every
// stream, scheme II never carries a type-4 transition, and scheme I and II
// carry fewer type-4 wire events than the raw bus.
module tb_workloads;
  import xt_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void need(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  // 8-bit sample number i of the synthetic picture (64 pixels per row)
  function automatic logic [7:0] pixel(int i);
    real x = real'(i % 64), y = real'((i / 64) % 64), v;
    v = 120.0 + 50.0 * $sin(x / 9.0) * $cos(y / 13.0) + 0.8 * x - 0.5 * y
        + real'(int'($urandom % 7) - 3);
    if (v < 0.0) v = 0.0;
    if (v > 255.0) v = 255.0;
    return 8'(int'(v));
  endfunction

  logic [7:0]  d8;   logic [9:0]  b8_1;  logic [12:0] b8_2;  logic [8:0]  b8_3;  logic [7:0]  q8_1, q8_2, q8_3;
  logic [15:0] d16;  logic [19:0] b16_1; logic [26:0] b16_2; logic [17:0] b16_3; logic [15:0] q16_1, q16_2, q16_3;
  logic [31:0] d32;  logic [39:0] b32_1; logic [54:0] b32_2; logic [35:0] b32_3; logic [31:0] q32_1, q32_2, q32_3;

  xt_codec_top #(.N(8))  u8  (.clk, .rst_n, .en(1'b1), .d_in(d8),  .bus1(b8_1),  .bus2(b8_2),  .bus3(b8_3),  .q1(q8_1),  .q2(q8_2),  .q3(q8_3));
  xt_codec_top #(.N(16)) u16 (.clk, .rst_n, .en(1'b1), .d_in(d16), .bus1(b16_1), .bus2(b16_2), .bus3(b16_3), .q1(q16_1), .q2(q16_2), .q3(q16_3));
  xt_codec_top #(.N(32)) u32 (.clk, .rst_n, .en(1'b1), .d_in(d32), .bus1(b32_1), .bus2(b32_2), .bus3(b32_3), .q1(q32_1), .q2(q32_2), .q3(q32_3));

  // run one stream of `words` words on all three widths
  task automatic run(bit img, int words);
    act_t a[3][4];   // [width][raw, I, II, III]
    logic [63:0] pr[3][4], cu[3][4];
    int nw[3][4] = '{'{8, 10, 13, 9}, '{16, 20, 27, 18}, '{32, 40, 55, 36}};
    int wid[3] = '{8, 16, 32};
    int pix = 0;
    logic [31:0] w32;
    string sname;
    foreach (a[i, j]) a[i][j] = '{0, '{0, 0, 0, 0, 0}, 0.0};
    // reset all links and the raw-bus models
    @(negedge clk);
    rst_n = 0; d8 = 0; d16 = 0; d32 = 0;
    @(negedge clk);
    rst_n = 1;
    foreach (pr[i, j]) pr[i][j] = '0;
    for (int t = 0; t < words; t++) begin
      @(negedge clk);
      if (img) begin
        for (int p = 0; p < 4; p++) w32[8*p +: 8] = pixel(pix + p);
        pix += 4;
      end else begin
        w32 = $urandom;
      end
      // the 8- and 16-bit links take the low pixels of the same samples
      d8 = w32[7:0]; d16 = w32[15:0]; d32 = w32;
      @(posedge clk); #1;
      cu[0] = '{64'(d8),  64'(b8_1),  64'(b8_2),  64'(b8_3)};
      cu[1] = '{64'(d16), 64'(b16_1), 64'(b16_2), 64'(b16_3)};
      cu[2] = '{64'(d32), 64'(b32_1), 64'(b32_2), 64'(b32_3)};
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 4; j++) begin
          ref_activity(cu[i][j], pr[i][j], nw[i][j], a[i][j]);
          if (j == 2) need(ref_true_n4(cu[i][j], pr[i][j], nw[i][j]) == 0,
                           "scheme II bus free of type-4");
          pr[i][j] = cu[i][j];
        end
      need(q8_1 == d8 && q8_2 == d8 && q8_3 == d8 &&
           q16_1 == d16 && q16_2 == d16 && q16_3 == d16 &&
           q32_1 == d32 && q32_2 == d32 && q32_3 == d32, "links deliver the word");
    end
    for (int i = 0; i < 3; i++) begin
      sname = $sformatf("%s%0d", img ? "img" : "ran", wid[i]);
      $display("%-6s saving  I %5.1f%%  II %5.1f%%  III %5.1f%% | type-4 raw %0d I %0d II %0d III %0d | type-3 raw %0d I %0d II %0d III %0d | rises raw %0d I %0d II %0d III %0d",
               sname,
               100.0 * (1.0 - a[i][1].activity / a[i][0].activity),
               100.0 * (1.0 - a[i][2].activity / a[i][0].activity),
               100.0 * (1.0 - a[i][3].activity / a[i][0].activity),
               a[i][0].ntype[4], a[i][1].ntype[4], a[i][2].ntype[4], a[i][3].ntype[4],
               a[i][0].ntype[3], a[i][1].ntype[3], a[i][2].ntype[3], a[i][3].ntype[3],
               a[i][0].self_sw, a[i][1].self_sw, a[i][2].self_sw, a[i][3].self_sw);
      for (int j = 1; j < 4; j++)
        need(a[i][j].activity < a[i][0].activity, {sname, ": coded bus saves energy"});
      need(a[i][1].ntype[4] < a[i][0].ntype[4], {sname, ": scheme I reduces type-4"});
    end
  endtask

  initial begin
    run(0, 8000);
    run(1, 1024);   // the whole 64 x 64 picture on the 32-bit link
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

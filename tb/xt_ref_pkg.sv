// xt_ref_pkg: reference models used by the codec testbenches.
//
// Everything here is written from the definitions of the crosstalk classes and
// of the code, not from the RTL structure: a wire's move is
// delta = x(n) - x(n-1) in {-1, 0, +1}, two neighbours couple in opposite
// directions when the product of their moves is -1, and the coupling factor of
// a wire is the sum over its neighbours of |delta_i - delta_j| (1 = type-1 ...
// 4 = type-4 when both neighbours exist). Words are passed in 64-bit vectors
// together with their width w.
package xt_ref_pkg;

  localparam real LAMBDA = 3.2;  // C_I / C_L for minimum-spaced 0.18 um wires

  function automatic int dlt(logic [63:0] cur, logic [63:0] prev, int i);
    return int'(cur[i]) - int'(prev[i]);
  endfunction

  // number of neighbouring pairs switching in opposite directions
  function automatic int ref_n2(logic [63:0] cur, logic [63:0] prev, int w);
    int n = 0;
    for (int i = 0; i + 1 < w; i++)
      if (dlt(cur, prev, i) * dlt(cur, prev, i + 1) == -1) n++;
    return n;
  endfunction

  // number of centre wires with a true type-4 transition (both neighbours
  // move opposite to it)
  function automatic int ref_true_n4(logic [63:0] cur, logic [63:0] prev, int w);
    int n = 0;
    for (int c = 1; c + 1 < w; c++)
      if (dlt(cur, prev, c) * dlt(cur, prev, c - 1) == -1 &&
          dlt(cur, prev, c) * dlt(cur, prev, c + 1) == -1) n++;
    return n;
  endfunction

  // The published type-4 counter rule: for each centre pair (2g+1, 2g+2) a
  // flag is raised if, for either centre c of the pair, the wires c-1, c, c+1
  // all switch while the two pair wires differ in the new word. Flags summed.
  function automatic int ref_n4(logic [63:0] cur, logic [63:0] prev, int w);
    int n = 0;
    for (int g = 0; 2 * g + 3 < w; g++) begin
      bit hit = 0;
      for (int c = 2 * g + 1; c <= 2 * g + 2; c++)
        if (dlt(cur, prev, c - 1) != 0 && dlt(cur, prev, c) != 0 &&
            dlt(cur, prev, c + 1) != 0 && cur[2*g+1] != cur[2*g+2]) hit = 1;
      if (hit) n++;
    end
    return n;
  endfunction

  // alternate-bit mask: Z1 has ones on even wires, Z2 on odd wires
  function automatic logic [63:0] ref_mask(bit z2, int w);
    logic [63:0] m = '0;
    for (int i = 0; i < w; i++) m[i] = (i % 2 == 0) ? !z2 : z2;
    return m;
  endfunction

  // Expected choice of the cluster encoder: 1 = send d ^ Z2.
  function automatic bit ref_choose_z2(logic [63:0] d, logic [63:0] prev, int w);
    logic [63:0] c1 = (d ^ ref_mask(0, w)) & ((64'd1 << w) - 1);
    logic [63:0] c2 = (d ^ ref_mask(1, w)) & ((64'd1 << w) - 1);
    int a4 = ref_n4(c1, prev, w), b4 = ref_n4(c2, prev, w);
    if (a4 != b4) return a4 > b4;
    return ref_n2(c1, prev, w) > ref_n2(c2, prev, w);
  endfunction

  // Statistics of a bus transition, used for the energy estimate.
  typedef struct {
    longint self_sw;        // wires that rise (energy drawn for C_L)
    longint ntype[5];       // wires by coupling factor 0..4
    real    activity;       // net switching activity E / (C_L Vdd^2)
  } act_t;

  // Accumulate the statistics of one transition of a w-wire bus (w <= 64).
  // Energy of wire i (lumped model): only wires ending high draw charge,
  //   E_i / (C_L Vdd^2) = delta_i + lambda * sum_nbr (delta_i - delta_j).
  function automatic void ref_activity(logic [63:0] cur, logic [63:0] prev,
                                       int w, ref act_t a);
    for (int i = 0; i < w; i++) begin
      int di = int'(cur[i]) - int'(prev[i]);
      int cf = 0;
      real e;
      e = real'(di);
      if (i > 0) begin
        int dj = int'(cur[i-1]) - int'(prev[i-1]);
        cf += (di > dj) ? di - dj : dj - di;
        e += LAMBDA * real'(di - dj);
      end
      if (i + 1 < w) begin
        int dj = int'(cur[i+1]) - int'(prev[i+1]);
        cf += (di > dj) ? di - dj : dj - di;
        e += LAMBDA * real'(di - dj);
      end
      if (di == 1) a.self_sw++;
      a.ntype[cf]++;
      if (cur[i]) a.activity += e;
    end
  endfunction

endpackage

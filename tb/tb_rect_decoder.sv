// tb_rect_decoder: end-to-end test of the rectangular decoder at its default
// size (30 scan chains, k = 2, 4-bit widths, 16-word control RAM).
//
// The testbench plays the three parties around the decoder:
//  - the test generator: random test cubes of CUBE_LEN scan slices with
//    bit-wise and pattern-wise correlation. A bit is specified with probability
//    P_SPEC %; a specified bit repeats the previous specified bit of the cube with
//    probability B %; where the previous cube was specified, the bit is specified
//    again with probability 50 % and then repeats that cube's value with
//    probability B %.
//  - the encoder: greedy clustering of the cubes by the benefit function "sum,
//    over the bit positions where the cluster is compatible, of the number of
//    cubes specified there" (every remaining cube tried as seed), then an optimal
//    cut of each cluster's slices into at most MAX_RECT rectangles by dynamic
//    programming (the cost of a rectangle is its specified control bits minus the
//    specified cube bits its fill value covers; narrow rectangles cost only their
//    width field).
//  - an ideal linear decompressor: it produces every specified bit that is not
//    covered by a fill value and random values elsewhere, including the unused
//    mask and fill fields of narrow rectangles, and stalls at random.
// Every scan slice leaving the decoder is compared with the value expected from
// the encoding, and every cube loaded into the modelled scan chains is compared
// with its specified bits. Three phases: (1) incremental loading of each cluster
// with random stalls on both handshakes, for a test set with P_SPEC = 15 % and
// test sets with 2 % at B = 50, 75, 90 and 100 %; (2) the first clusters preloaded into the RAM before the session,
// without stalls, checking that a cube takes CUBE_LEN + 1 cycles; (3) a cluster
// with more rectangles than the RAM holds, which must raise overflow.
// Counters show that each mechanism (new-cluster load, cluster repeat, narrow
// rectangle, fill 0 and fill 1, decompressor stall, control stall, preloaded
// cluster advance, overflow) happened; one that never happened is a failure.
// The specified-bit reduction the encoding achieves is printed for information.
module tb_rect_decoder;
  import rect_pkg::*;

  localparam int N = N_CHAINS_D, K = K_SHARE_D, WB = W_BITS_D, C = (N + K - 1) / K;
  localparam int T = WB + C + 1, DEPTH = DEPTH_D, MINW = MIN_WIDTH_D, LW = LEN_W_D;
  localparam int CUBE_LEN = 56;          // slices per cube (1664 scan cells / 30 chains)
  localparam int NCUBES   = 20;
  localparam int MAXW     = (1 << WB) - 1;
  localparam int MAXR     = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, cfg_preload = 1'b0;
  logic [LW-1:0] cfg_cube_len = LW'(CUBE_LEN);
  logic lin_valid = 1'b0, lin_ready;
  logic [N-1:0] lin_slice = '0;
  logic ctl_valid = 1'b0, ctl_ready;
  logic [T-1:0] ctl_data = '0;
  logic scan_en, cube_done, new_cluster, overflow, busy;
  logic [N-1:0] scan_in;

  rect_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;

  // Loop bounds held in variables keep the encoder's nested loops rolled.
  int nN = N, nC = C, nK = K, nCubes = NCUBES, nLen = CUBE_LEN, nMaxW = MAXW, nTwo = 2;
  always @(posedge clk) cycles++;

  // mechanism counters
  int n_load = 0, n_repeat = 0, n_narrow = 0, n_fill0 = 0, n_fill1 = 0;
  int n_lin_stall = 0, n_ctl_stall = 0, n_preload_adv = 0, n_overflow = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%0t: FAIL %s", $time, what);
    end
  endtask

  // ---------------------------------------------------------------- test cubes
  logic [N-1:0] cval [NCUBES][CUBE_LEN];
  logic [N-1:0] cspec[NCUBES][CUBE_LEN];

  task automatic gen_cubes(input int p_spec_x10, input int b_pct);
    for (int c = 0; c < nCubes; c++) begin
      logic prev = 1'($urandom);
      // scan-cell order: along each chain, chain after chain
      for (int i = 0; i < nN; i++)
        for (int s = 0; s < nLen; s++) begin
          logic sp, v;
          if (c > 0 && cspec[c-1][s][i]) sp = ($urandom_range(99) < 50);
          else                           sp = ($urandom_range(999) < p_spec_x10);
          v = 1'($urandom);
          if (sp) begin
            if (c > 0 && cspec[c-1][s][i] && $urandom_range(99) < b_pct) v = cval[c-1][s][i];
            else if ($urandom_range(99) < b_pct)                          v = prev;
            prev = v;
          end
          cspec[c][s][i] = sp;
          cval[c][s][i]  = sp & v;
        end
    end
  endtask

  // ----------------------------------------------------------------- clustering
  int order[NCUBES];                  // cubes in cluster order
  int first_of[NCUBES];               // 1 when order[j] starts a cluster
  int n_clusters;
  int cl_first[NCUBES], cl_size[NCUBES];

  function automatic int cl_benefit(logic [NCUBES-1:0] set);
    int b = 0;
    for (int s = 0; s < nLen; s++)
      for (int i = 0; i < nN; i++) begin
        int cnt = 0; bit z = 0, o = 0;
        for (int c = 0; c < nCubes; c++)
          if (set[c] && cspec[c][s][i]) begin
            cnt++;
            if (cval[c][s][i]) o = 1; else z = 1;
          end
        if (!(z && o)) b += cnt;
      end
    return b;
  endfunction

  task automatic make_clusters();
    logic [NCUBES-1:0] left = '1;
    int pos = 0;
    n_clusters = 0;
    while (left != '0) begin
      logic [NCUBES-1:0] best_set = '0;
      int best_b = -1;
      for (int seed = 0; seed < nCubes; seed++) begin
        logic [NCUBES-1:0] set;
        int b;
        if (!left[seed]) continue;
        set = '0; set[seed] = 1'b1;
        b = cl_benefit(set);
        forever begin
          int gain_best = 0, cand = -1;
          for (int c = 0; c < nCubes; c++) begin
            logic [NCUBES-1:0] t;
            int g;
            if (!left[c] || set[c]) continue;
            t = set; t[c] = 1'b1;
            g = cl_benefit(t) - b;
            if (g > gain_best) begin gain_best = g; cand = c; end
          end
          if (cand < 0) break;
          set[cand] = 1'b1;
          b += gain_best;
        end
        if (b > best_b) begin best_b = b; best_set = set; end
      end
      cl_first[n_clusters] = pos;
      cl_size[n_clusters]  = 0;
      for (int c = 0; c < nCubes; c++)
        if (best_set[c]) begin
          order[pos] = c;
          first_of[pos] = (cl_size[n_clusters] == 0);
          pos++;
          cl_size[n_clusters]++;
        end
      left &= ~best_set;
      n_clusters++;
    end
  endtask

  // -------------------------------------------------------------- partitioning
  // Rectangles of the cluster being encoded.
  int nrect;
  int rw[MAXR], rfill[MAXR];
  logic [C-1:0] rmask[MAXR];
  int covered_bits, control_bits;

  // Best mask/fill of rectangle (a, w) over the cubes order[f .. f+n-1].
  function automatic int rect_cover(int f, int n, int a, int w,
                                    output logic [C-1:0] m, output int fv);
    int best = -1;
    for (int v = 0; v < nTwo; v++) begin
      int tot = 0;
      logic [C-1:0] mk = '0;
      for (int g = 0; g < nC; g++) begin
        int cnt = 0; bit ok = 1;
        for (int s = a; s < a + w; s++)
          for (int i = g * K; i < (g + 1) * K && i < nN; i++)
            for (int j = f; j < f + n; j++)
              if (cspec[order[j]][s][i]) begin
                cnt++;
                if (cval[order[j]][s][i] != 1'(v)) ok = 0;
              end
        if (ok) begin mk[g] = 1'b1; tot += cnt; end
      end
      if (tot > best) begin best = tot; m = mk; fv = v; end
    end
    return best;
  endfunction

  task automatic partition(input int f, input int n, input int max_rect);
    int cost[CUBE_LEN+1][MAXR+1];
    int from_w[CUBE_LEN+1][MAXR+1];
    int cov[CUBE_LEN][MAXW+1];
    logic [C-1:0] cm[CUBE_LEN][MAXW+1];
    int cf[CUBE_LEN][MAXW+1];
    int best, br, j;
    for (int a = 0; a < nLen; a++)
      for (int w = 1; w <= nMaxW && a + w <= CUBE_LEN; w++)
        cov[a][w] = rect_cover(f, n, a, w, cm[a][w], cf[a][w]);
    for (int p = 0; p <= nLen; p++)
      for (int r = 0; r <= max_rect; r++) cost[p][r] = 1 << 30;
    cost[0][0] = 0;
    for (int p = 1; p <= nLen; p++)
      for (int r = 1; r <= max_rect; r++)
        for (int w = 1; w <= nMaxW && w <= p; w++) begin
          int c0;
          if (cost[p-w][r-1] >= (1 << 30)) continue;
          c0 = (w < MINW) ? WB : (T - cov[p-w][w]);
          if (cost[p-w][r-1] + c0 < cost[p][r]) begin
            cost[p][r] = cost[p-w][r-1] + c0;
            from_w[p][r] = w;
          end
        end
    best = 1 << 30; br = 0;
    for (int r = 1; r <= max_rect; r++)
      if (cost[CUBE_LEN][r] < best) begin best = cost[CUBE_LEN][r]; br = r; end
    nrect = br;
    j = CUBE_LEN;
    covered_bits = 0; control_bits = 0;
    for (int r = br; r >= 1; r--) begin
      int w = from_w[j][r], a = j - from_w[j][r];
      rw[r-1] = w;
      if (w < MINW) begin
        rmask[r-1] = C'($urandom);      // don't care: random
        rfill[r-1] = $urandom_range(1);
        control_bits += WB;
      end else begin
        rmask[r-1] = cm[a][w];
        rfill[r-1] = cf[a][w];
        covered_bits += cov[a][w];
        control_bits += T;
      end
      j = a;
    end
  endtask

  function automatic logic [T-1:0] ctl_word(int r);
    return {WB'(rw[r]), rmask[r], 1'(rfill[r])};
  endfunction

  // ------------------------------------------------- drivers and scan monitor
  logic [N-1:0] exp_q[$];
  logic [N-1:0] chain_img[CUBE_LEN];   // what the scan chains hold, slice by slice
  int           img_pos = 0;
  int           stall_pct = 0, ctl_stall_pct = 0;

  always @(posedge clk) begin
    if (scan_en) begin
      if (exp_q.size() == 0) chk(1'b0, "unexpected scan slice");
      else chk(scan_in == exp_q.pop_front(), "scan slice differs from expected");
      if (img_pos < CUBE_LEN) chain_img[img_pos] = scan_in;
      img_pos++;
    end
  end

  task automatic send_slice(input logic [N-1:0] d);
    while ($urandom_range(99) < stall_pct) begin
      n_lin_stall++;
      @(negedge clk);
    end
    lin_valid = 1'b1; lin_slice = d;
    @(posedge clk);
    while (!lin_ready) @(posedge clk);
    @(negedge clk);
    lin_valid = 1'b0; lin_slice = N'($urandom);
  endtask

  task automatic send_ctl(input logic [T-1:0] d);
    while ($urandom_range(99) < ctl_stall_pct) begin
      n_ctl_stall++;
      @(negedge clk);
    end
    ctl_valid = 1'b1; ctl_data = d;
    @(posedge clk);
    while (!ctl_ready) @(posedge clk);
    @(negedge clk);
    ctl_valid = 1'b0; ctl_data = T'($urandom);
  endtask

  // One cube: flag slice, optional incremental load, CUBE_LEN data slices.
  task automatic run_cube(input int c, input bit first, input bit incremental);
    int r = 0, in_r = 0;
    logic [N-1:0] flag = N'($urandom);
    flag[0] = first;
    if (first) n_load += incremental; else n_repeat++;
    send_slice(flag);
    if (first && incremental)
      for (int q = 0; q < nrect; q++) send_ctl(ctl_word(q));
    img_pos = 0;
    for (int s = 0; s < nLen; s++) begin
      logic [N-1:0] lin, e;
      bit wide = (rw[r] >= MINW);
      for (int i = 0; i < nN; i++) begin
        bit filled = wide && rmask[r][i / K];
        lin[i] = (cspec[c][s][i] && !filled) ? cval[c][s][i] : 1'($urandom);
        e[i]   = filled ? 1'(rfill[r]) : lin[i];
      end
      if (in_r == 0) begin
        if (!wide) n_narrow++;
        else if (rfill[r] != 0) n_fill1++;
        else n_fill0++;
      end
      exp_q.push_back(e);
      send_slice(lin);
      if (++in_r == rw[r]) begin r++; in_r = 0; end
    end
    repeat (2) @(negedge clk);
    chk(exp_q.size() == 0 && img_pos == CUBE_LEN, "cube fully shifted");
    begin
      bit ok = 1;
      for (int s = 0; s < nLen; s++)
        if (((chain_img[s] ^ cval[c][s]) & cspec[c][s]) != '0) ok = 0;
      chk(ok, $sformatf("cube %0d: specified bit lost in the scan chains", c));
    end
  endtask

  task automatic reset_dut();
    @(negedge clk); rst_n = 1'b0;
    @(negedge clk); rst_n = 1'b1;
  endtask

  task automatic start_session();
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
  endtask

  // Phase 1: whole test set, incremental loading, random stalls.
  task automatic incremental_run(input int p_spec_x10, input int b_pct);
    int orig = 0, total = 0;
    gen_cubes(p_spec_x10, b_pct);
    make_clusters();
    reset_dut();
    cfg_preload = 1'b0;
    stall_pct = 20; ctl_stall_pct = 30;
    start_session();
    for (int k = 0; k < n_clusters; k++) begin
      partition(cl_first[k], cl_size[k], DEPTH);
      for (int j = cl_first[k]; j < cl_first[k] + cl_size[k]; j++) begin
        for (int s = 0; s < nLen; s++) orig += $countones(cspec[order[j]][s]);
        run_cube(order[j], first_of[j] != 0, 1'b1);
      end
      total += control_bits + cl_size[k];
      total -= covered_bits;
    end
    total += orig;
    chk(!overflow, "no overflow with clusters that fit the RAM");
    $display("test set %0d.%0d%% specified, B=%0d%%: %0d cubes, %0d clusters, %0d -> %0d specified bits (reduction %0d%%)",
             p_spec_x10 / 10, p_spec_x10 % 10, b_pct, NCUBES, n_clusters, orig, total,
             (orig - total) * 100 / orig);
  endtask

  int b_sweep[4] = '{50, 75, 90, 100};

  initial begin
    int c0, ncubes_pre, words;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- phase 1
    incremental_run(150, 90);
    // 2 % care bits at several degrees of correlation B
    foreach (b_sweep[q]) incremental_run(20, b_sweep[q]);

    // ---- phase 2: preload the first clusters that fit, no stalls, rate check
    gen_cubes(150, 90);
    make_clusters();
    reset_dut();
    cfg_preload = 1'b1;
    stall_pct = 0; ctl_stall_pct = 0;
    words = 0;
    for (int k = 0; k < 2 && k < n_clusters; k++) begin
      partition(cl_first[k], cl_size[k], DEPTH / 2);
      for (int q = 0; q < nrect; q++) send_ctl(ctl_word(q));
      words += nrect;
    end
    start_session();
    ncubes_pre = 0;
    c0 = cycles;
    for (int k = 0; k < 2 && k < n_clusters; k++) begin
      partition(cl_first[k], cl_size[k], DEPTH / 2);
      for (int j = cl_first[k]; j < cl_first[k] + cl_size[k]; j++) begin
        if (first_of[j] != 0 && k > 0) n_preload_adv++;
        run_cube(order[j], first_of[j] != 0, 1'b0);
        ncubes_pre++;
        c0 += 2;                        // the check's two idle cycles per cube
      end
    end
    chk(cycles - c0 == ncubes_pre * (CUBE_LEN + 1),
        $sformatf("preloaded rate: %0d cycles for %0d cubes of %0d slices",
                  cycles - c0, ncubes_pre, CUBE_LEN));
    chk(!overflow, "no overflow after preload");

    // ---- phase 3: a cluster of DEPTH + 1 narrow rectangles
    reset_dut();
    cfg_preload = 1'b0;
    cfg_cube_len = LW'(DEPTH + 1);
    start_session();
    send_slice(N'(1));
    for (int q = 0; q <= DEPTH; q++) send_ctl({WB'(1), C'(0), 1'b0});
    @(negedge clk);
    if (overflow) n_overflow++;
    chk(overflow, "overflow for a cluster larger than the RAM");

    $display("mechanisms: load=%0d repeat=%0d narrow=%0d fill0=%0d fill1=%0d lin_stall=%0d ctl_stall=%0d preload_adv=%0d overflow=%0d",
             n_load, n_repeat, n_narrow, n_fill0, n_fill1, n_lin_stall, n_ctl_stall,
             n_preload_adv, n_overflow);
    chk(n_load > 0,        "mechanism: incremental cluster load");
    chk(n_repeat > 0,      "mechanism: cube of the same cluster");
    chk(n_narrow > 0,      "mechanism: narrow rectangle");
    chk(n_fill0 > 0,       "mechanism: fill value 0");
    chk(n_fill1 > 0,       "mechanism: fill value 1");
    chk(n_lin_stall > 0,   "mechanism: decompressor stall");
    chk(n_ctl_stall > 0,   "mechanism: control word stall");
    chk(n_preload_adv > 0, "mechanism: preloaded cluster advance");
    chk(n_overflow > 0,    "mechanism: RAM overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

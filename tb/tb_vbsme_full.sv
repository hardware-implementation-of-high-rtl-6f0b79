// tb_vbsme_full: end-to-end test of the motion estimator with every
// parameter at its default: a 72x72 search window, 57x57 candidate positions
// (vectors -28..+28 in both directions). Same procedure as tb_vbsme_top.
//
// Three macroblocks are estimated one after the other, each with a new
// random window: one copied from the window with noise added (a real match),
// one copied exactly (every block matches at the same place, so the whole
// 16x16 mode must win with cost 0), and one unrelated to the window. For
// each the testbench runs its own full search over the pixels (16 4x4 SADs
// per candidate, each of the 41 vectors summed over its rectangle, first
// minimum in scan order kept) and compares all 41 minimum SADs, all 41
// vectors, the mode and its cost. It also checks the clocks from start to
// done, that a start during the scan is ignored, and counts the mechanisms
// the design relies on: the three staggered candidates of each LPE, the
// wrap of both buffer write addresses, and more than one partition mode.
module tb_vbsme_full;
  import vbsme_pkg::*;

  localparam int SW_W = 72, SW_H = 72;   // the design's defaults
  localparam int NX = SW_W - 15, NY = SW_H - 15;
  localparam int SCAN = NY * NX / 3 * 4;
  localparam int N_MB = 3;

  logic  clk = 0, reset_n = 0;
  word_t data_input, ref_data_input;
  logic  data_input_valid, ref_data_input_valid, start;
  logic  cur_loaded, ref_loaded, busy, done;
  sad_t     [N_VEC-1:0] min_sad;
  mv_pair_t [N_VEC-1:0] min_mv;
  mode_t mode;
  logic [SAD_W+3:0] mode_cost;
  int checks = 0, failures = 0;

  vbsme_top dut (
    .clk, .reset_n, .data_input, .data_input_valid, .ref_data_input,
    .ref_data_input_valid, .start, .cur_loaded, .ref_loaded, .busy, .done,
    .min_sad, .min_mv, .mode, .mode_cost);

  always #5 clk = ~clk;

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20 * (SCAN + SW_W * SW_H / 4 + 200) * N_MB) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters
  int n_idx [3];
  int n_cur_wrap = 0, n_ref_wrap = 0, n_ignored_start = 0;
  int n_mode [N_MODE];
  always @(posedge clk)
    if (reset_n) begin
      if (dut.m_valid) n_idx[dut.m_idx]++;
      if (cur_loaded) n_cur_wrap++;
      if (ref_loaded) n_ref_wrap++;
      if (start && busy) n_ignored_start++;
    end

  pix_t win [SW_H][SW_W];
  pix_t mb  [16][16];
  int ref_sad [N_VEC], ref_x [N_VEC], ref_y [N_VEC];

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic void rect(int v, output int x0, output int y0, output int w, output int h);
    if (v < 16)      begin x0 = v % 4; y0 = v / 4; w = 1; h = 1; end
    else if (v < 20) begin x0 = 0; y0 = v - 16; w = 2; h = 1; end
    else if (v < 24) begin x0 = 2; y0 = v - 20; w = 2; h = 1; end
    else if (v < 28) begin x0 = v - 24; y0 = 0; w = 1; h = 2; end
    else if (v < 32) begin x0 = v - 28; y0 = 2; w = 1; h = 2; end
    else if (v < 36) begin x0 = 2 * ((v - 32) % 2); y0 = 2 * ((v - 32) / 2); w = 2; h = 2; end
    else if (v < 38) begin x0 = 2 * (v - 36); y0 = 0; w = 2; h = 4; end
    else if (v < 40) begin x0 = 0; y0 = 2 * (v - 38); w = 4; h = 2; end
    else             begin x0 = 0; y0 = 0; w = 4; h = 4; end
  endfunction

  // Reference full search over the pixels.
  task automatic full_search(output int best_mode, output int best_cost);
    int b4 [16];
    int x0, y0, w, h, s, d;
    int cost [N_MODE];
    for (int v = 0; v < N_VEC; v++) begin ref_sad[v] = 1 << 30; ref_x[v] = 0; ref_y[v] = 0; end
    for (int cy = 0; cy < NY; cy++)
      for (int cx = 0; cx < NX; cx++) begin
        for (int k = 0; k < 16; k++) begin
          b4[k] = 0;
          for (int r = 0; r < 4; r++)
            for (int c = 0; c < 4; c++) begin
              d = int'(mb[4 * (k / 4) + r][4 * (k % 4) + c]) -
                  int'(win[cy + 4 * (k / 4) + r][cx + 4 * (k % 4) + c]);
              b4[k] += (d < 0) ? -d : d;
            end
        end
        for (int v = 0; v < N_VEC; v++) begin
          rect(v, x0, y0, w, h);
          s = 0;
          for (int by = y0; by < y0 + h; by++)
            for (int bx = x0; bx < x0 + w; bx++) s += b4[4 * by + bx];
          if (s < ref_sad[v]) begin
            ref_sad[v] = s; ref_x[v] = cx - (NX - 1) / 2; ref_y[v] = cy - (NY - 1) / 2;
          end
        end
      end
    // mode costs: 16 | 8 | 8 | 4 | 2 | 2 | 1 vectors
    cost[0] = 0; for (int v = 0;  v < 16; v++) cost[0] += ref_sad[v];
    cost[1] = 0; for (int v = 16; v < 24; v++) cost[1] += ref_sad[v];
    cost[2] = 0; for (int v = 24; v < 32; v++) cost[2] += ref_sad[v];
    cost[3] = 0; for (int v = 32; v < 36; v++) cost[3] += ref_sad[v];
    cost[4] = ref_sad[36] + ref_sad[37];
    cost[5] = ref_sad[38] + ref_sad[39];
    cost[6] = ref_sad[40];
    best_mode = 0; best_cost = cost[0];
    for (int m = 1; m < N_MODE; m++)
      if (cost[m] <= best_cost) begin best_mode = m; best_cost = cost[m]; end
  endtask

  task automatic load(int kind);
    int px, py, n;
    for (int y = 0; y < SW_H; y++)
      for (int x = 0; x < SW_W; x++) win[y][x] = pix_t'($urandom_range(255));
    px = $urandom_range(NX - 1); py = $urandom_range(NY - 1);
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++) begin
        n = int'(win[py + y][px + x]);
        if (kind == 0) n += $urandom_range(6) - 3;
        if (kind == 2) n = $urandom_range(255);
        mb[y][x] = pix_t'((n < 0) ? 0 : (n > 255) ? 255 : n);
      end
    // Both streams at once, with idle clocks in the reference stream.
    fork
      for (int w = 0; w < 64; w++) begin
        @(negedge clk);
        data_input_valid = 1;
        for (int c = 0; c < 4; c++) data_input[c*8 +: 8] = mb[w / 4][4 * (w % 4) + c];
        if (w == 63) begin
          @(negedge clk);
          data_input_valid = 0;
        end
      end
      for (int w = 0; w < SW_W * SW_H / 4; w++) begin
        @(negedge clk);
        if ($urandom_range(3) == 0) begin
          ref_data_input_valid = 0;
          @(negedge clk);
        end
        ref_data_input_valid = 1;
        for (int c = 0; c < 4; c++)
          ref_data_input[c*8 +: 8] = win[w / (SW_W / 4)][4 * (w % (SW_W / 4)) + c];
      end
    join
    @(negedge clk);
    data_input_valid = 0;
    ref_data_input_valid = 0;
  endtask

  initial begin
    int bm, bc, t0, t1;
    data_input = '0; ref_data_input = '0; data_input_valid = 0; ref_data_input_valid = 0;
    start = 0;
    repeat (3) @(posedge clk);
    reset_n = 1;
    for (int i = 0; i < N_MB; i++) begin
      load(i);
      full_search(bm, bc);
      @(negedge clk);
      start = 1;
      t0 = cycle;
      @(negedge clk);
      start = 0;
      chk(busy, "busy after start");
      repeat (10) @(negedge clk);
      start = 1;          // must be ignored
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      t1 = cycle;
      chk(t1 - t0 == SCAN + 11, $sformatf("start to done %0d clocks, expected %0d", t1 - t0, SCAN + 11));
      chk(!busy, "idle at done");
      for (int v = 0; v < N_VEC; v++)
        chk(int'(min_sad[v]) == ref_sad[v] && int'(min_mv[v].x) == ref_x[v] &&
            int'(min_mv[v].y) == ref_y[v],
            $sformatf("mb %0d vector %0d: %0d (%0d,%0d) expected %0d (%0d,%0d)", i, v + 1,
                      min_sad[v], min_mv[v].x, min_mv[v].y, ref_sad[v], ref_x[v], ref_y[v]));
      chk(int'(mode) == bm && int'(mode_cost) == bc,
          $sformatf("mb %0d mode %0d cost %0d expected %0d cost %0d", i, mode, mode_cost, bm, bc));
      n_mode[int'(mode)]++;
      if (i == 1) chk(mode == MODE_16X16 && mode_cost == 0, "exact copy gives 16x16 mode at cost 0");
      @(negedge clk);
      chk(!done, "done is a single pulse");
    end
    // Mechanisms
    for (int j = 0; j < 3; j++)
      chk(n_idx[j] == N_MB * NX * NY / 3, $sformatf("candidate %0d of the LPEs seen %0d times", j, n_idx[j]));
    chk(n_cur_wrap == N_MB && n_ref_wrap == N_MB, "buffer write addresses wrapped once per load");
    chk(n_ignored_start == N_MB, "start during a scan was applied");
    begin
      int distinct = 0;
      for (int m = 0; m < N_MODE; m++) if (n_mode[m] > 0) distinct++;
      chk(distinct >= 2, "more than one partition mode chosen");
    end
    $display("candidates per LPE slot %0d/%0d/%0d, buffer wraps %0d/%0d, ignored starts %0d",
             n_idx[0], n_idx[1], n_idx[2], n_cur_wrap, n_ref_wrap, n_ignored_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

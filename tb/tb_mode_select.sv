// tb_mode_select: applies sets of 41 minimum SADs and checks the chosen mode
// and its cost against the per-mode sums worked out in the testbench.
// Random sets exercise the finest split winning; sets built from a common
// per-4x4 value make coarser modes tie with it, so the tie rule (fewer,
// larger blocks) is checked for every mode.
module tb_mode_select;
  import vbsme_pkg::*;

  logic clk = 0, reset_n = 0;
  logic in_valid, out_valid;
  sad_t [N_VEC-1:0] min_sad;
  mode_t mode;
  logic [SAD_W+3:0] mode_cost;
  int checks = 0, failures = 0;
  int seen [N_MODE];

  mode_select dut (.clk, .reset_n, .in_valid, .min_sad, .out_valid, .mode, .mode_cost);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // First and last vector of each mode.
  function automatic void span(int m, output int lo, output int hi);
    case (m)
      0: begin lo = 0;  hi = 15; end
      1: begin lo = 16; hi = 23; end
      2: begin lo = 24; hi = 31; end
      3: begin lo = 32; hi = 35; end
      4: begin lo = 36; hi = 37; end
      5: begin lo = 38; hi = 39; end
      default: begin lo = 40; hi = 40; end
    endcase
  endfunction

  initial begin
    int cost [N_MODE];
    int best, bcost, lo, hi, target;
    in_valid = 0; min_sad = '0;
    repeat (3) @(posedge clk);
    reset_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      in_valid = 1;
      target = t % 8;   // 0..6: make modes >= target cost as little as 4x4; 7: random
      for (int v = 0; v < 16; v++) min_sad[v] = sad_t'($urandom_range(4080));
      for (int m = 1; m < N_MODE; m++) begin
        span(m, lo, hi);
        for (int v = lo; v <= hi; v++) min_sad[v] = sad_t'($urandom_range(65535));
      end
      if (target < 7) begin
        // Each coarser mode gets the 4x4 total on its first block and zero on
        // the others, so it ties with 4x4; modes above target get one more.
        int total;
        total = 0;
        for (int k = 0; k < 16; k++) total += int'(min_sad[k]);
        for (int m = 1; m < N_MODE; m++) begin
          span(m, lo, hi);
          for (int v = lo; v <= hi; v++)
            min_sad[v] = (v == lo) ? sad_t'(total + ((m > target) ? 1 : 0)) : '0;
        end
      end
      for (int m = 0; m < N_MODE; m++) begin
        span(m, lo, hi);
        cost[m] = 0;
        for (int v = lo; v <= hi; v++) cost[m] += int'(min_sad[v]);
      end
      best = 0; bcost = cost[0];
      for (int m = 1; m < N_MODE; m++) if (cost[m] <= bcost) begin best = m; bcost = cost[m]; end
      @(posedge clk); #1;
      checks++;
      seen[best]++;
      if (!out_valid || int'(mode) != best || int'(mode_cost) != bcost) begin
        failures++;
        $display("FAIL step %0d: mode %0d cost %0d expected %0d cost %0d", t, mode, mode_cost, best, bcost);
      end
    end
    for (int m = 0; m < N_MODE; m++) begin
      checks++;
      if (seen[m] == 0) begin failures++; $display("FAIL mode %0d never chosen", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

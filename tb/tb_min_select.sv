// tb_min_select: two rounds over a 4x3 candidate grid with random SADs drawn
// from a small range (so that ties occur) and gaps between candidates.
// Checks the 41 minima and their vectors against a reference kept in the
// testbench (first minimum in scan order wins), the done pulse after the
// last candidate, and that clear restarts the search.
module tb_min_select;
  import vbsme_pkg::*;

  localparam int NX = 4, NY = 3;

  logic clk = 0, reset_n = 0;
  logic clear, in_valid, done;
  sad_t     [N_VEC-1:0] sad, min_sad;
  mv_pair_t [N_VEC-1:0] min_mv;
  int checks = 0, failures = 0;
  int n_updates = 0, n_ties = 0;

  min_select #(.NX(NX), .NY(NY)) dut (.clk, .reset_n, .clear, .in_valid, .sad,
                                      .min_sad, .min_mv, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ref_sad [N_VEC];
  int ref_x [N_VEC], ref_y [N_VEC];

  initial begin
    clear = 0; in_valid = 0; sad = '0;
    repeat (3) @(posedge clk);
    reset_n = 1;
    for (int round = 0; round < 2; round++) begin
      @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0;
      for (int v = 0; v < N_VEC; v++) begin ref_sad[v] = 65535; ref_x[v] = 0; ref_y[v] = 0; end
      for (int cy = 0; cy < NY; cy++)
        for (int cx = 0; cx < NX; cx++) begin
          if ($urandom_range(2) == 0) begin
            @(negedge clk);
            in_valid = 0;
            sad = '0;   // ignored without in_valid
          end
          @(negedge clk);
          in_valid = 1;
          for (int v = 0; v < N_VEC; v++) begin
            int s;
            s = (round == 0) ? $urandom_range(20) : $urandom_range(65535);
            sad[v] = sad_t'(s);
            if (s < ref_sad[v]) begin
              ref_sad[v] = s; ref_x[v] = cx - (NX - 1) / 2; ref_y[v] = cy - (NY - 1) / 2;
              n_updates++;
            end else if (s == ref_sad[v]) n_ties++;
          end
          @(posedge clk); #1;
          checks++;
          if (done != (cy == NY - 1 && cx == NX - 1)) begin
            failures++;
            $display("FAIL done=%0b at candidate (%0d,%0d)", done, cx, cy);
          end
        end
      @(negedge clk);
      in_valid = 0;
      for (int v = 0; v < N_VEC; v++) begin
        checks++;
        if (int'(min_sad[v]) != ref_sad[v] || int'(min_mv[v].x) != ref_x[v] ||
            int'(min_mv[v].y) != ref_y[v]) begin
          failures++;
          $display("FAIL round %0d vector %0d: %0d (%0d,%0d) expected %0d (%0d,%0d)", round, v + 1,
                   min_sad[v], min_mv[v].x, min_mv[v].y, ref_sad[v], ref_x[v], ref_y[v]);
        end
      end
    end
    checks++;
    if (n_ties == 0) begin failures++; $display("FAIL no tie was exercised"); end
    $display("updates %0d ties %0d", n_updates, n_ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

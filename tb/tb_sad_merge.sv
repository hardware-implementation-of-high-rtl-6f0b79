// tb_sad_merge: applies random sets of sixteen 4x4 SADs (and the all-4080
// worst case) and checks all 41 outputs against sums over the 4x4 blocks
// each vector's rectangle covers, taken from a table of rectangles written
// independently of the adder tree; also the one-clock latency and idx.
module tb_sad_merge;
  import vbsme_pkg::*;

  logic clk = 0, reset_n = 0;
  logic in_valid, out_valid;
  logic [1:0] in_idx, out_idx;
  sad4_t [N_BLK-1:0] sad4;
  sad_t  [N_VEC-1:0] sad;
  int checks = 0, failures = 0;

  sad_merge dut (.clk, .reset_n, .in_valid, .in_idx, .sad4, .out_valid, .out_idx, .sad);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Rectangle of vector v in 4x4-block units: x0, y0, width, height.
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

  initial begin
    int e, x0, y0, w, h;
    in_valid = 0; in_idx = 0; sad4 = '0;
    repeat (3) @(posedge clk);
    reset_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      in_valid = 1;
      in_idx = 2'(t % 3);
      for (int k = 0; k < 16; k++) sad4[k] = (t == 0) ? sad4_t'(4080) : sad4_t'($urandom_range(4080));
      @(posedge clk); #1;
      checks++;
      if (!out_valid || out_idx != 2'(t % 3)) begin
        failures++;
        $display("FAIL valid/idx at step %0d", t);
      end
      for (int v = 0; v < N_VEC; v++) begin
        rect(v, x0, y0, w, h);
        e = 0;
        for (int by = y0; by < y0 + h; by++)
          for (int bx = x0; bx < x0 + w; bx++) e += int'(sad4[4 * by + bx]);
        checks++;
        if (int'(sad[v]) != e) begin
          failures++;
          $display("FAIL step %0d vector %0d: %0d expected %0d", t, v + 1, sad[v], e);
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid without input"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_lpe: feeds random 4x4 blocks (one current block, three candidate
// blocks) through the LPE, back to back and with idle gaps, and checks that
// the three 4x4 SADs, computed in the testbench, come out in order 0,1,2 on
// the fifth, sixth and seventh clock after the block's last row entered.
module tb_lpe;
  import vbsme_pkg::*;

  logic       clk = 0, reset_n = 0;
  logic       valid;
  logic [1:0] control;
  row4_t      x_in, y_in, y_2_in, y_3_in;
  logic       sad_valid;
  logic [1:0] sad_idx;
  sad4_t      sad_4x4;
  int checks = 0, failures = 0;
  int cycle = 0;

  typedef struct { int sad; int idx; int due; } exp_t;
  exp_t exp_q [$];

  lpe dut (.clk, .reset_n, .valid, .control, .x_in, .y_in, .y_2_in, .y_3_in,
           .sad_valid, .sad_idx, .sad_4x4);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor: sample just after each rising edge.
  int n_out = 0;
  always @(posedge clk) begin
    #1;
    if (reset_n && sad_valid) begin
      checks++;
      n_out++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output at cycle %0d", cycle);
      end else begin
        exp_t e;
        e = exp_q.pop_front();
        if (int'(sad_4x4) != e.sad || int'(sad_idx) != e.idx || cycle != e.due) begin
          failures++;
          $display("FAIL cycle %0d: sad %0d idx %0d, expected %0d idx %0d at cycle %0d",
                   cycle, sad_4x4, sad_idx, e.sad, e.idx, e.due);
        end
      end
    end
  end

  function automatic int ad(pix_t a, pix_t b);
    return (a > b) ? int'(a) - int'(b) : int'(b) - int'(a);
  endfunction

  initial begin
    row4_t cur [4];
    row4_t cand [3][4];
    int    s [3];
    valid = 0; control = 0; x_in = '0; y_in = '0; y_2_in = '0; y_3_in = '0;
    repeat (3) @(posedge clk);
    reset_n = 1;
    for (int b = 0; b < 300; b++) begin
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          cur[r][c] = pix_t'($urandom_range(255));
          for (int j = 0; j < 3; j++) cand[j][r][c] = pix_t'($urandom_range(255));
        end
      if (b == 0)   // worst case: all differences 255
        for (int r = 0; r < 4; r++) begin
          cur[r] = '1;
          for (int j = 0; j < 3; j++) cand[j][r] = '0;
        end
      for (int j = 0; j < 3; j++) begin
        s[j] = 0;
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++) s[j] += ad(cur[r][c], cand[j][r][c]);
      end
      for (int r = 0; r < 4; r++) begin
        // Some blocks have idle clocks between their rows.
        if (b % 5 == 3 && $urandom_range(1) == 1) begin
          @(negedge clk);
          valid = 0;
          control = 2'($urandom_range(3));
          x_in = '1;
          @(posedge clk);
        end
        @(negedge clk);
        valid = 1; control = 2'(r);
        x_in = cur[r]; y_in = cand[0][r]; y_2_in = cand[1][r]; y_3_in = cand[2][r];
        @(posedge clk);
        if (r == 3)   // this row is in cycle (cycle - 1) as counted after the edge
          for (int j = 0; j < 3; j++) exp_q.push_back('{sad: s[j], idx: j, due: cycle + 5 + j});
      end
    end
    @(negedge clk);
    valid = 0;
    repeat (12) @(posedge clk);
    checks++;
    if (n_out != 900 || exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs seen, %0d still expected", n_out, exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

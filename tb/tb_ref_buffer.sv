// tb_ref_buffer: loads a random 24x20 search window, then reads random
// candidate groups (every offset at which an 18x16 read fits, plus the
// corners) and checks every pixel returned for every block and candidate
// against the window the testbench wrote. Also checks word_last and that a
// second window written after the wrap replaces the first.
module tb_ref_buffer;
  import vbsme_pkg::*;

  localparam int SW_W = 24, SW_H = 20;

  logic       clk = 0, reset_n = 0;
  word_t      ref_data_input;
  logic       ref_data_input_valid;
  logic [$clog2(SW_W)-1:0] rd_mx;
  logic [$clog2(SW_H)-1:0] rd_my;
  logic [1:0] rd_row;
  row4_t [N_BLK-1:0][N_CAND-1:0] ref_rows;
  logic       word_last;
  int checks = 0, failures = 0;

  ref_buffer #(.SW_W(SW_W), .SW_H(SW_H)) dut (
    .clk, .reset_n, .ref_data_input, .ref_data_input_valid,
    .rd_mx, .rd_my, .rd_row, .ref_rows, .word_last);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pix_t win [SW_H][SW_W];

  task automatic load();
    for (int y = 0; y < SW_H; y++)
      for (int x = 0; x < SW_W; x++) win[y][x] = pix_t'($urandom_range(255));
    for (int w = 0; w < SW_W * SW_H / 4; w++) begin
      @(negedge clk);
      ref_data_input_valid = 1;
      for (int c = 0; c < 4; c++)
        ref_data_input[c*8 +: 8] = win[w / (SW_W / 4)][4 * (w % (SW_W / 4)) + c];
      #1;
      checks++;
      if (word_last != (w == SW_W * SW_H / 4 - 1)) begin
        failures++;
        $display("FAIL word_last=%0b at word %0d", word_last, w);
      end
    end
    @(negedge clk);
    ref_data_input_valid = 0;
  endtask

  task automatic read_check(int mx, int my, int r);
    @(negedge clk);
    rd_mx = mx[$clog2(SW_W)-1:0]; rd_my = my[$clog2(SW_H)-1:0]; rd_row = 2'(r);
    @(posedge clk); #1;
    for (int k = 0; k < 16; k++)
      for (int j = 0; j < 3; j++)
        for (int c = 0; c < 4; c++) begin
          pix_t e;
          e = win[my + 4 * (k / 4) + r][mx + j + 4 * (k % 4) + c];
          checks++;
          if (ref_rows[k][j][c] != e) begin
            failures++;
            $display("FAIL (%0d,%0d) row %0d blk %0d cand %0d px %0d: %0d vs %0d",
                     mx, my, r, k, j, c, ref_rows[k][j][c], e);
          end
        end
  endtask

  initial begin
    ref_data_input = '0; ref_data_input_valid = 0; rd_mx = 0; rd_my = 0; rd_row = 0;
    repeat (3) @(posedge clk);
    reset_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      load();
      for (int my = 0; my <= SW_H - 16; my++)
        for (int mx = 0; mx <= SW_W - 18; mx++)
          for (int r = 0; r < 4; r++) read_check(mx, my, r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

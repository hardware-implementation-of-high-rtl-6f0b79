// tb_cur_buffer: loads two random macroblocks one after the other (the write
// address wraps between them) and checks every block row the read port
// returns, one clock after the row index is applied, against the pixels the
// testbench wrote. Also checks that word_last marks the 64th word.
module tb_cur_buffer;
  import vbsme_pkg::*;

  logic       clk = 0, reset_n = 0;
  word_t      data_input;
  logic       data_input_valid;
  logic [1:0] ra_row;
  row4_t [N_BLK-1:0] cur_rows;
  logic       word_last;
  int checks = 0, failures = 0;

  cur_buffer dut (.clk, .reset_n, .data_input, .data_input_valid, .ra_row,
                  .cur_rows, .word_last);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pix_t img [16][16];

  initial begin
    data_input = '0; data_input_valid = 0; ra_row = 0;
    repeat (3) @(posedge clk);
    reset_n = 1;
    for (int mb = 0; mb < 2; mb++) begin
      for (int y = 0; y < 16; y++)
        for (int x = 0; x < 16; x++) img[y][x] = pix_t'($urandom_range(255));
      for (int w = 0; w < 64; w++) begin
        @(negedge clk);
        data_input_valid = 1;
        for (int c = 0; c < 4; c++) data_input[c*8 +: 8] = img[w / 4][4 * (w % 4) + c];
        #1;
        checks++;
        if (word_last != (w == 63)) begin
          failures++;
          $display("FAIL word_last=%0b at word %0d", word_last, w);
        end
        // an idle clock now and then
        if (w % 9 == 4) begin
          @(negedge clk);
          data_input_valid = 0;
          data_input = '1;
        end
      end
      @(negedge clk);
      data_input_valid = 0;
      for (int r = 0; r < 4; r++) begin
        @(negedge clk);
        ra_row = 2'(r);
        @(posedge clk); #1;
        for (int k = 0; k < 16; k++)
          for (int c = 0; c < 4; c++) begin
            checks++;
            if (cur_rows[k][c] != img[4 * (k / 4) + r][4 * (k % 4) + c]) begin
              failures++;
              $display("FAIL mb %0d row %0d block %0d pixel %0d: %0d vs %0d", mb, r, k, c,
                       cur_rows[k][c], img[4 * (k / 4) + r][4 * (k % 4) + c]);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// cur_buffer: temporary buffer for the current 16x16 macroblock.
//
// Write side: 32-bit words of four pixels arrive on data_input with
// data_input_valid, in raster order (four words per pixel row, leftmost
// pixel in bits [7:0]); an internal write address wa_in_img steps through
// the 64 words and wraps, so the next macroblock can follow straight away.
// Read side: every clock the buffer returns, for a row index ra_row (0..3),
// row ra_row of each of the sixteen 4x4 blocks, so all sixteen LPEs get their
// current row at once; the output is registered (one clock of latency).
//
// The 32-bit word width and the row-by-row, four-pixels-per-clock reading
// follow the document. The word order, the automatic write address and the
// register-array storage are this design's choices.
module cur_buffer
  import vbsme_pkg::*;
(
  input  logic                  clk,
  input  logic                  reset_n,
  input  word_t                 data_input,
  input  logic                  data_input_valid,
  input  logic [1:0]            ra_row,
  output row4_t [N_BLK-1:0]     cur_rows,     // [k] = row ra_row of 4x4 block k
  output logic                  word_last     // the word written this clock completes the macroblock
);

  pix_t       mem [MB][MB];
  logic [5:0] wa_in_img;

  assign word_last = data_input_valid && (wa_in_img == 6'd63);

  always_ff @(posedge clk or negedge reset_n)
    if (!reset_n) wa_in_img <= '0;
    else if (data_input_valid) wa_in_img <= wa_in_img + 6'd1;

  always_ff @(posedge clk)
    if (data_input_valid)
      for (int c = 0; c < 4; c++)
        mem[wa_in_img[5:2]][{wa_in_img[1:0], 2'(c)}] <= data_input[c*PIX_W +: PIX_W];

  always_ff @(posedge clk or negedge reset_n)
    if (!reset_n) cur_rows <= '0;
    else
      for (int k = 0; k < N_BLK; k++)
        for (int c = 0; c < 4; c++)
          cur_rows[k][c] <= mem[{2'(k / 4), ra_row}][{2'(k % 4), 2'(c)}];

endmodule

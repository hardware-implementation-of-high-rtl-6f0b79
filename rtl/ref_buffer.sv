// ref_buffer: temporary buffer for the reference search window of
// SW_W x SW_H pixels.
//
// Write side: 32-bit words of four pixels on ref_data_input with
// ref_data_input_valid, raster order (SW_W/4 words per pixel row, leftmost
// pixel in bits [7:0]). The write position (wa_row, wa_col) steps through
// the window and wraps at its end.
// Read side: for a candidate group at window offset (rd_mx, rd_my) and a row
// index rd_row (0..3), the buffer returns for every 4x4 block k and every
// candidate j = 0..2 the four reference pixels
//   ref[rd_my + 4*(k/4) + rd_row][rd_mx + j + 4*(k%4) + 0..3],
// that is the rows the three horizontally adjacent candidates
// (rd_mx, rd_my), (rd_mx+1, rd_my), (rd_mx+2, rd_my) need. The output is
// registered (one clock of latency). Offsets must keep the 18-pixel wide,
// 16-row tall read inside the window.
//
// The default 72x72 window is the search range the document gives; the
// 32-bit word follows the document. Storage as a register array, the word
// order and the read organisation are this design's choices.
module ref_buffer
  import vbsme_pkg::*;
#(
  parameter int unsigned SW_W = 72,   // window width in pixels, multiple of 4
  parameter int unsigned SW_H = 72    // window height in pixels
) (
  input  logic                                 clk,
  input  logic                                 reset_n,
  input  word_t                                ref_data_input,
  input  logic                                 ref_data_input_valid,
  input  logic [$clog2(SW_W)-1:0]              rd_mx,
  input  logic [$clog2(SW_H)-1:0]              rd_my,
  input  logic [1:0]                           rd_row,
  output row4_t [N_BLK-1:0][N_CAND-1:0]        ref_rows,  // [k][j]
  output logic                                 word_last  // this clock's word completes the window
);

  localparam int unsigned WPR = SW_W / 4;               // words per pixel row
  localparam int unsigned RW  = MB + N_CAND - 1;        // pixels read per row: 18

  initial assert (SW_W % 4 == 0 && SW_W >= RW && SW_H >= MB)
    else $error("ref_buffer: SW_W must be a multiple of 4 and at least %0d, SW_H at least %0d", RW, MB);

  pix_t                          mem [SW_H][SW_W];
  logic [$clog2(SW_H)-1:0]       wa_row;
  logic [$clog2(WPR+1)-1:0]      wa_col;   // word index within the row

  assign word_last = ref_data_input_valid && (int'(wa_row) == SW_H - 1) && (int'(wa_col) == WPR - 1);

  always_ff @(posedge clk or negedge reset_n)
    if (!reset_n) begin
      wa_row <= '0;
      wa_col <= '0;
    end else if (ref_data_input_valid) begin
      if (int'(wa_col) == WPR - 1) begin
        wa_col <= '0;
        wa_row <= (int'(wa_row) == SW_H - 1) ? '0 : wa_row + 1'b1;
      end else begin
        wa_col <= wa_col + 1'b1;
      end
    end

  always_ff @(posedge clk)
    if (ref_data_input_valid)
      for (int c = 0; c < 4; c++)
        mem[wa_row][4 * wa_col + c] <= ref_data_input[c*PIX_W +: PIX_W];

  // Read: pick the four window rows the block rows come from, then the 18
  // pixels starting at column rd_mx from each.
  pix_t seg [4][RW];

  always_comb
    for (int by = 0; by < 4; by++)
      for (int c = 0; c < RW; c++)
        seg[by][c] = mem[int'(rd_my) + 4 * by + int'(rd_row)][int'(rd_mx) + c];

  always_ff @(posedge clk or negedge reset_n)
    if (!reset_n) ref_rows <= '0;
    else
      for (int k = 0; k < N_BLK; k++)
        for (int j = 0; j < N_CAND; j++)
          for (int c = 0; c < 4; c++)
            ref_rows[k][j][c] <= seg[k / 4][4 * (k % 4) + j + c];

endmodule

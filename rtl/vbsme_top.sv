// vbsme_top: full-search variable block size motion estimation for one
// 16x16 macroblock against a SW_W x SW_H reference search window.
//
// Data flow:
//   cur_buffer / ref_buffer  32-bit temporary buffers, loaded by word streams
//   vbsme_ctrl               walks the candidates, three at a time, four
//                            block rows per group
//   16 x lpe                 one LPE per 4x4 block; its three PEs evaluate the
//                            three candidates of a group in parallel (48 PEs)
//   sad_merge                16 4x4 SADs -> the 41 SADs of all partitions
//   min_select               minimum SAD and motion vector of each of the 41
//   mode_select              best partition mode from the 41 minima
//
// Use: stream the 64 words of the macroblock on data_input and the
// SW_W*SW_H/4 words of the window on ref_data_input (both raster order,
// leftmost pixel in bits [7:0]; cur_loaded / ref_loaded pulse with the last
// word of each), then pulse start. busy is high while the window is scanned;
// done pulses when min_sad, min_mv, mode and mode_cost are valid, and they
// hold until the next start. Vectors are window offsets minus the window
// centre ((SW_W-16)/2, (SW_H-16)/2), so the default 72x72 window covers
// -28..+28 in both directions.
//
// Timing: a scan takes (SW_H-15) * (SW_W-15)/3 * 4 clocks (4332 for the
// default window); done follows the last read by 11 clocks. The buffers must
// not be written while busy.
//
// From the document: the 4x4 bottom-up SAD scheme, the PE and LPE with three
// PEs, the 32-bit buffers and the 72x72 search range. The number of LPEs
// (sixteen, one per 4x4 block), the schedule, the handshakes and the vector
// convention are this design's choices.
module vbsme_top
  import vbsme_pkg::*;
#(
  parameter int unsigned SW_W = 72,
  parameter int unsigned SW_H = 72
) (
  input  logic                   clk,
  input  logic                   reset_n,
  input  word_t                  data_input,
  input  logic                   data_input_valid,
  input  word_t                  ref_data_input,
  input  logic                   ref_data_input_valid,
  input  logic                   start,
  output logic                   cur_loaded,
  output logic                   ref_loaded,
  output logic                   busy,
  output logic                   done,
  output sad_t     [N_VEC-1:0]   min_sad,
  output mv_pair_t [N_VEC-1:0]   min_mv,
  output mode_t                  mode,
  output logic [SAD_W+3:0]       mode_cost
);

  localparam int unsigned NX = SW_W - MB + 1;
  localparam int unsigned NY = SW_H - MB + 1;
  localparam int unsigned XW = $clog2(NX + 2);
  localparam int unsigned YW = $clog2(NY);

  // Scan controller
  logic          scan_start, rd_valid;
  logic [XW-1:0] rd_mx;
  logic [YW-1:0] rd_my;
  logic [1:0]    rd_row;

  vbsme_ctrl #(.NX(NX), .NY(NY)) u_ctrl (
    .clk, .reset_n, .start, .busy, .scan_start,
    .rd_valid, .rd_mx, .rd_my, .rd_row
  );

  // Buffers (registered reads)
  row4_t [N_BLK-1:0]             cur_rows;
  row4_t [N_BLK-1:0][N_CAND-1:0] ref_rows;

  cur_buffer u_cur_buffer (
    .clk, .reset_n, .data_input, .data_input_valid,
    .ra_row(rd_row), .cur_rows, .word_last(cur_loaded)
  );

  ref_buffer #(.SW_W(SW_W), .SW_H(SW_H)) u_ref_buffer (
    .clk, .reset_n, .ref_data_input, .ref_data_input_valid,
    .rd_mx($clog2(SW_W)'(rd_mx)), .rd_my($clog2(SW_H)'(rd_my)), .rd_row,
    .ref_rows, .word_last(ref_loaded)
  );

  // Row index and valid, aligned with the buffer outputs
  logic       pe_valid;
  logic [1:0] pe_row;

  always_ff @(posedge clk or negedge reset_n)
    if (!reset_n) begin
      pe_valid <= 1'b0;
      pe_row   <= '0;
    end else begin
      pe_valid <= rd_valid;
      pe_row   <= rd_row;
    end

  // Sixteen LPEs, one per 4x4 block
  sad4_t [N_BLK-1:0] sad4;
  logic  [N_BLK-1:0] sad4_valid;
  logic  [1:0]       sad4_idx [N_BLK];

  for (genvar k = 0; k < N_BLK; k++) begin : g_lpe
    lpe u_lpe (
      .clk, .reset_n,
      .valid(pe_valid), .control(pe_row),
      .x_in(cur_rows[k]),
      .y_in(ref_rows[k][0]), .y_2_in(ref_rows[k][1]), .y_3_in(ref_rows[k][2]),
      .sad_valid(sad4_valid[k]), .sad_idx(sad4_idx[k]), .sad_4x4(sad4[k])
    );
  end

  // All LPEs run in lock step.
  a_lpe_lockstep: assert property (@(posedge clk) disable iff (!reset_n)
    sad4_valid == '0 || sad4_valid == '1);

  // 41 SADs per candidate
  logic                 m_valid;
  logic [1:0]           m_idx;
  sad_t [N_VEC-1:0]     m_sad;

  sad_merge u_sad_merge (
    .clk, .reset_n,
    .in_valid(sad4_valid[0]), .in_idx(sad4_idx[0]), .sad4,
    .out_valid(m_valid), .out_idx(m_idx), .sad(m_sad)
  );

  // The candidate position is counted in min_select; the index within the
  // group is only checked here.
  logic [1:0] exp_idx;
  always_ff @(posedge clk or negedge reset_n)
    if (!reset_n)       exp_idx <= '0;
    else if (scan_start) exp_idx <= '0;
    else if (m_valid)   exp_idx <= (exp_idx == 2'd2) ? 2'd0 : exp_idx + 2'd1;

  a_idx_order: assert property (@(posedge clk) disable iff (!reset_n)
    m_valid |-> m_idx == exp_idx);

  logic sel_done;

  min_select #(.NX(NX), .NY(NY)) u_min_select (
    .clk, .reset_n, .clear(scan_start),
    .in_valid(m_valid), .sad(m_sad),
    .min_sad, .min_mv, .done(sel_done)
  );

  mode_select u_mode_select (
    .clk, .reset_n, .in_valid(sel_done), .min_sad,
    .out_valid(done), .mode, .mode_cost
  );

endmodule

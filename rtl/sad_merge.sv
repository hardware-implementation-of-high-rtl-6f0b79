// sad_merge: builds the SADs of all 41 blocks of the H.264 partitions of a
// macroblock from the SADs of its sixteen 4x4 blocks (bottom-up: the SAD of
// an NxN block is the sum of the SADs of its four N/2 x N/2 quarters, and
// the rectangular blocks are sums of two squares). Vector numbering is the
// one of vbsme_pkg.
//
// One set of sixteen 4x4 SADs per clock with in_valid; the 41 sums appear
// one clock later with out_valid, tagged with the same in_idx (candidate
// number within the LPE group). Adder tree: 8+8 two-block sums (16..31),
// 8x8 sums from the horizontal pairs (32..35), then the 16x8 / 8x16 halves
// (36..39) and the whole block (40) from the 8x8 sums.
//
// The decomposition is the document's; the adder arrangement and the single
// output register are this design's.
module sad_merge
  import vbsme_pkg::*;
(
  input  logic                    clk,
  input  logic                    reset_n,
  input  logic                    in_valid,
  input  logic [1:0]              in_idx,
  input  sad4_t [N_BLK-1:0]       sad4,      // [k] = SAD of 4x4 block k
  output logic                    out_valid,
  output logic [1:0]              out_idx,
  output sad_t  [N_VEC-1:0]       sad        // [v] = SAD of vector v
);

  sad_t s [N_VEC];

  always_comb begin
    for (int k = 0; k < 16; k++) s[k] = sad_t'(sad4[k]);
    for (int i = 0; i < 4; i++) begin
      s[16 + i] = s[4*i]     + s[4*i + 1];      // left 8x4 of row i
      s[20 + i] = s[4*i + 2] + s[4*i + 3];      // right 8x4 of row i
      s[24 + i] = s[i]       + s[4 + i];        // top 4x8 of column i
      s[28 + i] = s[8 + i]   + s[12 + i];       // bottom 4x8 of column i
    end
    s[32] = s[16] + s[17];                      // top-left 8x8
    s[33] = s[20] + s[21];                      // top-right 8x8
    s[34] = s[18] + s[19];                      // bottom-left 8x8
    s[35] = s[22] + s[23];                      // bottom-right 8x8
    s[36] = s[32] + s[34];                      // left 8x16
    s[37] = s[33] + s[35];                      // right 8x16
    s[38] = s[32] + s[33];                      // top 16x8
    s[39] = s[34] + s[35];                      // bottom 16x8
    s[40] = s[38] + s[39];                      // 16x16
  end

  always_ff @(posedge clk or negedge reset_n)
    if (!reset_n) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      sad       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_idx <= in_idx;
        for (int v = 0; v < N_VEC; v++) sad[v] <= s[v];
      end
    end

endmodule

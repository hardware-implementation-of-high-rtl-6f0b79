// mode_select: picks the best partition mode of the macroblock from the 41
// minimum SADs.
//
// The cost of a mode is the sum of the minimum SADs of its blocks (16 for
// 4x4, 8 for the two-block shapes, 4 for 8x8, 2 for 16x8 and 8x16, 1 for
// 16x16). The smallest cost wins; on equal cost the mode with fewer, larger
// blocks wins. Because each block keeps its own vector, the 4x4 split can
// never cost more than a coarser one, so a coarser mode is chosen exactly
// when it loses nothing against the finest split. in_valid (one clock)
// starts the choice; mode, mode_cost and out_valid appear one clock later.
//
// Choosing the mode by the minimum SAD is the document's; the cost as a
// plain sum and the tie rule are this design's choices.
module mode_select
  import vbsme_pkg::*;
(
  input  logic                  clk,
  input  logic                  reset_n,
  input  logic                  in_valid,
  input  sad_t  [N_VEC-1:0]     min_sad,
  output logic                  out_valid,
  output mode_t                 mode,
  output logic [SAD_W+3:0]      mode_cost
);

  typedef logic [SAD_W+3:0] cost_t;

  cost_t cost [N_MODE];
  cost_t best_cost;
  mode_t best_mode;

  always_comb begin
    for (int m = 0; m < N_MODE; m++) cost[m] = '0;
    for (int v = 0; v < 16; v++) cost[0] += cost_t'(min_sad[v]);
    for (int v = 16; v < 24; v++) cost[1] += cost_t'(min_sad[v]);
    for (int v = 24; v < 32; v++) cost[2] += cost_t'(min_sad[v]);
    for (int v = 32; v < 36; v++) cost[3] += cost_t'(min_sad[v]);
    cost[4] = cost_t'(min_sad[36]) + cost_t'(min_sad[37]);
    cost[5] = cost_t'(min_sad[38]) + cost_t'(min_sad[39]);
    cost[6] = cost_t'(min_sad[40]);
    // Coarsest first, replace only on a strictly smaller cost.
    best_mode = MODE_16X16;
    best_cost = cost[6];
    for (int m = 5; m >= 0; m--)
      if (cost[m] < best_cost) begin
        best_cost = cost[m];
        best_mode = mode_t'(m);
      end
  end

  always_ff @(posedge clk or negedge reset_n)
    if (!reset_n) begin
      out_valid <= 1'b0;
      mode      <= MODE_16X16;
      mode_cost <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        mode      <= best_mode;
        mode_cost <= best_cost;
      end
    end

endmodule

// min_select: keeps, for each of the 41 blocks, the smallest SAD seen so far
// and the motion vector of the candidate that produced it.
//
// clear (one clock) resets the minima to the largest value and the candidate
// position to (0,0). Every clock with in_valid brings the 41 SADs of one
// candidate; candidates must arrive in scan order (x fastest, NX per row of
// the window, NY rows), which is the order of the scan controller, so the
// position is counted here rather than carried along. A SAD replaces the
// stored one only if strictly smaller, so on a tie the earlier candidate in
// scan order stays. The vector reported is the candidate's window offset
// minus the window centre, ((NX-1)/2, (NY-1)/2). After the last of the
// NX*NY candidates done pulses for one clock and the results hold until the
// next clear.
//
// That the minimum SAD of each block gives its vector is the document's; the
// counting, the tie rule and the vector origin are this design's choices.
module min_select
  import vbsme_pkg::*;
#(
  parameter int unsigned NX = 57,
  parameter int unsigned NY = 57
) (
  input  logic                     clk,
  input  logic                     reset_n,
  input  logic                     clear,
  input  logic                     in_valid,
  input  sad_t     [N_VEC-1:0]     sad,
  output sad_t     [N_VEC-1:0]     min_sad,
  output mv_pair_t [N_VEC-1:0]     min_mv,
  output logic                     done
);

  localparam int unsigned CXW = $clog2(NX);
  localparam int unsigned CYW = $clog2(NY);
  localparam int          X0  = (NX - 1) / 2;
  localparam int          Y0  = (NY - 1) / 2;

  logic [CXW-1:0] cx;
  logic [CYW-1:0] cy;
  mv_t            mvx, mvy;

  assign mvx = mv_t'(int'(cx) - X0);
  assign mvy = mv_t'(int'(cy) - Y0);

  always_ff @(posedge clk or negedge reset_n)
    if (!reset_n) begin
      cx      <= '0;
      cy      <= '0;
      done    <= 1'b0;
      min_sad <= '1;
      min_mv  <= '0;
    end else begin
      done <= 1'b0;
      if (clear) begin
        cx      <= '0;
        cy      <= '0;
        min_sad <= '1;
        min_mv  <= '0;
      end else if (in_valid) begin
        for (int v = 0; v < N_VEC; v++)
          if (sad[v] < min_sad[v]) begin
            min_sad[v] <= sad[v];
            min_mv[v]  <= '{x: mvx, y: mvy};
          end
        if (cx == CXW'(NX - 1)) begin
          cx <= '0;
          if (cy == CYW'(NY - 1)) begin
            cy   <= '0;
            done <= 1'b1;
          end else begin
            cy <= cy + 1'b1;
          end
        end else begin
          cx <= cx + 1'b1;
        end
      end
    end

endmodule

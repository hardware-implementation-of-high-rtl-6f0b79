// vbsme_ctrl: scan controller of the full search.
//
// On a start pulse it walks every candidate position of the search window:
// the vertical offset my from 0 to NY-1 in the outer loop, the horizontal
// offset in groups of three (mx = 0, 3, 6, ...) in the inner loop, and for
// each group the four block rows (row = 0..3), one per clock. While it scans,
// rd_valid is high and (rd_mx, rd_my, rd_row) address the reference buffer
// and the row of the current buffer. scan_start pulses with the first read so
// the SAD minimum search can clear itself. A scan takes NY * NX/3 * 4 clocks;
// a start while busy is ignored.
//
// The document names a parallel, pipelined full search but gives no
// schedule: the loop order, the three-candidate grouping (one candidate per
// PE of an LPE) and the start/busy handshake are this design's choices.
module vbsme_ctrl #(
  parameter int unsigned NX = 57,   // horizontal candidate positions, multiple of 3
  parameter int unsigned NY = 57,   // vertical candidate positions
  localparam int unsigned XW = $clog2(NX + 2),
  localparam int unsigned YW = $clog2(NY)
) (
  input  logic           clk,
  input  logic           reset_n,
  input  logic           start,
  output logic           busy,
  output logic           scan_start,
  output logic           rd_valid,
  output logic [XW-1:0]  rd_mx,
  output logic [YW-1:0]  rd_my,
  output logic [1:0]     rd_row
);

  initial assert (NX % 3 == 0 && NX > 0 && NY > 0)
    else $error("vbsme_ctrl: NX must be a positive multiple of 3");

  typedef enum logic {IDLE, SCAN} state_t;
  state_t state;
  logic   first;

  assign busy       = (state == SCAN);
  assign rd_valid   = (state == SCAN);
  assign scan_start = (state == SCAN) && first;

  logic last_row, last_mx, last_my;
  assign last_row = (rd_row == 2'd3);
  assign last_mx  = (rd_mx == XW'(NX - 3));
  assign last_my  = (rd_my == YW'(NY - 1));

  always_ff @(posedge clk or negedge reset_n)
    if (!reset_n) begin
      state  <= IDLE;
      first  <= 1'b0;
      rd_mx  <= '0;
      rd_my  <= '0;
      rd_row <= '0;
    end else begin
      unique case (state)
        IDLE:
          if (start) begin
            state  <= SCAN;
            first  <= 1'b1;
            rd_mx  <= '0;
            rd_my  <= '0;
            rd_row <= '0;
          end
        SCAN: begin
          first  <= 1'b0;
          rd_row <= rd_row + 2'd1;
          if (last_row) begin
            if (last_mx) begin
              rd_mx <= '0;
              if (last_my) begin
                rd_my <= '0;
                state <= IDLE;
              end else begin
                rd_my <= rd_my + 1'b1;
              end
            end else begin
              rd_mx <= rd_mx + XW'(3);
            end
          end
        end
      endcase
    end

endmodule

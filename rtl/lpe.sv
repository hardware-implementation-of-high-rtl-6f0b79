// lpe: large processing unit element. Three processing unit elements (PEs)
// compute the 4x4 SADs of one current block against three reference
// candidates at once, and hand the three results out one after the other on
// a single 12-bit output.
//
// Each clock one current block row x_in and the matching row of each of the
// three candidates (y_in, y_2_in, y_3_in) come in, with valid and control,
// the row index 0..3. PE 1 works on the inputs as they arrive; PE 2 sees
// them one clock later and PE 3 two clocks later (the x_in_1d / x_in_2d
// delay registers), so the three accumulators finish on consecutive clocks
// and one output register with a three-way selection serves all of them.
// An accumulator loads the PE result on row 0 and adds it on rows 1..3.
//
// Timing: when row 3 of a block enters on clock t, sad_4x4 carries the SAD
// of candidate 0 (y_in) with sad_valid = 1 and sad_idx = 0 on clock t+5,
// candidate 1 on t+6 and candidate 2 on t+7. Blocks may follow back to
// back, one every four clocks, so three of every four output clocks are
// used. Rows of a block must arrive in order 0,1,2,3 (gaps allowed).
//
// From the document: three PEs per LPE, the delayed copies of the inputs,
// the input and output names and the 12-bit output. The row-index meaning of
// control, the staggering by one clock per PE and the sad_valid/sad_idx
// outputs are this design's reading.
module lpe
  import vbsme_pkg::*;
(
  input  logic        clk,
  input  logic        reset_n,
  input  logic        valid,
  input  logic [1:0]  control,    // row index of the block row on the inputs
  input  row4_t       x_in,       // current block row
  input  row4_t       y_in,       // candidate 0 row
  input  row4_t       y_2_in,     // candidate 1 row
  input  row4_t       y_3_in,     // candidate 2 row
  output logic        sad_valid,
  output logic [1:0]  sad_idx,    // which candidate sad_4x4 belongs to
  output sad4_t       sad_4x4
);

  typedef struct packed {
    logic       valid;
    logic [1:0] row;
  } ctl_t;

  // Input staggering for PE 2 and PE 3.
  row4_t x_in_1d, x_in_2d, y_2_in_d, y_3_in_1d, y_3_in_d;

  always_ff @(posedge clk or negedge reset_n)
    if (!reset_n) begin
      x_in_1d   <= '0;
      x_in_2d   <= '0;
      y_2_in_d  <= '0;
      y_3_in_1d <= '0;
      y_3_in_d  <= '0;
    end else begin
      x_in_1d   <= x_in;
      x_in_2d   <= x_in_1d;
      y_2_in_d  <= y_2_in;
      y_3_in_1d <= y_3_in;
      y_3_in_d  <= y_3_in_1d;
    end

  logic [9:0] pe_out [N_CAND];

  pe u_pe_1 (.clk, .reset_n, .x(x_in),    .y(y_in),     .acc(pe_out[0]));
  pe u_pe_2 (.clk, .reset_n, .x(x_in_1d), .y(y_2_in_d), .acc(pe_out[1]));
  pe u_pe_3 (.clk, .reset_n, .x(x_in_2d), .y(y_3_in_d), .acc(pe_out[2]));

  // ctl[d] is valid/row as they entered d clocks ago. PE k (0-based) returns
  // the row that entered 3 + k clocks ago.
  ctl_t ctl [6];
  assign ctl[0] = '{valid: valid, row: control};

  always_ff @(posedge clk or negedge reset_n)
    if (!reset_n) for (int d = 1; d < 6; d++) ctl[d] <= '0;
    else          for (int d = 1; d < 6; d++) ctl[d] <= ctl[d-1];

  sad4_t            acc  [N_CAND];
  logic [N_CAND-1:0] done;             // acc[k] holds a complete 4x4 SAD

  for (genvar k = 0; k < N_CAND; k++) begin : g_acc
    ctl_t c;
    assign c = ctl[3+k];
    always_ff @(posedge clk or negedge reset_n)
      if (!reset_n) begin
        acc[k]  <= '0;
        done[k] <= 1'b0;
      end else begin
        if (c.valid)
          acc[k] <= (c.row == 2'd0) ? sad4_t'(pe_out[k]) : acc[k] + sad4_t'(pe_out[k]);
        done[k] <= c.valid && (c.row == 2'd3);
      end
  end

  always_ff @(posedge clk or negedge reset_n)
    if (!reset_n) begin
      sad_4x4   <= '0;
      sad_valid <= 1'b0;
      sad_idx   <= '0;
    end else begin
      sad_valid <= |done;
      if (done[0]) begin
        sad_4x4 <= acc[0];
        sad_idx <= 2'd0;
      end else if (done[1]) begin
        sad_4x4 <= acc[1];
        sad_idx <= 2'd1;
      end else if (done[2]) begin
        sad_4x4 <= acc[2];
        sad_idx <= 2'd2;
      end
    end

  // At most one accumulator completes per clock when rows come in order.
  a_one_done: assert property (@(posedge clk) disable iff (!reset_n) $onehot0(done));

endmodule

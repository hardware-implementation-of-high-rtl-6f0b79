// pe: processing unit element. Computes the sum of absolute differences of
// one block row: four current pixels x against four reference pixels y.
//
// Structure: four subtractors (|x_i - y_i|), two 8+8->9 bit adders and one
// 9+9->10 bit adder, each stage registered, so acc = sum_i |x_i - y_i| of
// the row presented three clocks earlier. A new row can enter every clock.
// The result (at most 4*255 = 1020) fits the 10-bit output. The structure,
// unit names and widths follow the paper's PE drawing and schematic; the
// register after every stage is read from the clock pin every unit has
// there.
module pe
  import vbsme_pkg::*;
(
  input  logic       clk,
  input  logic       reset_n,
  input  row4_t      x,        // current pixels X00..X03
  input  row4_t      y,        // reference pixels Y00..Y03
  output logic [9:0] acc
);

  pix_t       d [4];
  logic [8:0] s01, s23;

  for (genvar i = 0; i < 4; i++) begin : g_sub
    subtractor u_subtractor (
      .clk, .reset_n, .n1(x[i]), .n2(y[i]), .out(d[i])
    );
  end

  adder #(.IN_W(8)) u1_adder    (.clk, .reset_n, .n1(d[0]), .n2(d[1]), .out(s01));
  adder #(.IN_W(8)) u2_adder    (.clk, .reset_n, .n1(d[2]), .n2(d[3]), .out(s23));
  adder #(.IN_W(9)) u1_adder_9s (.clk, .reset_n, .n1(s01),  .n2(s23),  .out(acc));

endmodule

// adder: registered adder with a carry bit, out <= n1 + n2.
//
// IN_W = 8 gives the 8+8->9 bit adder of the first tree level of the
// processing unit element, IN_W = 9 the 9+9->10 bit "adder_9s" of the second
// level (widths as printed on the paper's PE schematic). One clock of
// latency, cleared by the active-low asynchronous reset.
module adder #(
  parameter int unsigned IN_W = 8
) (
  input  logic            clk,
  input  logic            reset_n,
  input  logic [IN_W-1:0] n1,
  input  logic [IN_W-1:0] n2,
  output logic [IN_W:0]   out
);

  always_ff @(posedge clk or negedge reset_n)
    if (!reset_n) out <= '0;
    else          out <= {1'b0, n1} + {1'b0, n2};

endmodule

// subtractor: registered absolute difference of two 8-bit pixels.
//
// out <= |n1 - n2|, one clock of latency, cleared by the active-low
// asynchronous reset. This is the "-" box of the processing unit element;
// the names of the module and its ports follow the paper's PE schematic, and
// the 8-bit output width printed there means the box returns the magnitude
// of the difference. Making it an absolute difference and the asynchronous
// reset style are this design's reading.
module subtractor
  import vbsme_pkg::*;
(
  input  logic clk,
  input  logic reset_n,
  input  pix_t n1,
  input  pix_t n2,
  output pix_t out
);

  pix_t diff;

  always_comb diff = (n1 >= n2) ? pix_t'(n1 - n2) : pix_t'(n2 - n1);

  always_ff @(posedge clk or negedge reset_n)
    if (!reset_n) out <= '0;
    else          out <= diff;

endmodule

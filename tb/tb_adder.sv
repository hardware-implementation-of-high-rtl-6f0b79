// tb_adder: checks the 8+8->9 bit and 9+9->10 bit registered adders against
// sums computed in the testbench, with carry-out cases and one clock of
// latency.
module tb_adder;
  logic clk = 0, reset_n = 0;
  logic [7:0] a8, b8;
  logic [8:0] s8, a9, b9;
  logic [9:0] s9;
  int checks = 0, failures = 0;

  adder #(.IN_W(8)) dut8 (.clk, .reset_n, .n1(a8), .n2(b8), .out(s8));
  adder #(.IN_W(9)) dut9 (.clk, .reset_n, .n1(a9), .n2(b9), .out(s9));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, y, u, v;
    a8 = 0; b8 = 0; a9 = 0; b9 = 0;
    repeat (3) @(posedge clk);
    reset_n = 1;
    for (int i = 0; i < 400; i++) begin
      if (i == 0) begin x = 255; y = 255; u = 511; v = 511; end
      else begin
        x = $urandom_range(255); y = $urandom_range(255);
        u = $urandom_range(511); v = $urandom_range(511);
      end
      @(negedge clk);
      a8 = 8'(x); b8 = 8'(y); a9 = 9'(u); b9 = 9'(v);
      @(posedge clk); #1;
      checks += 2;
      if (int'(s8) != x + y) begin failures++; $display("FAIL %0d+%0d got %0d", x, y, s8); end
      if (int'(s9) != u + v) begin failures++; $display("FAIL %0d+%0d got %0d", u, v, s9); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

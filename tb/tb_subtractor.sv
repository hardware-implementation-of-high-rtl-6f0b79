// tb_subtractor: checks the registered absolute difference against
// |a - b| computed in the testbench, including the one-clock latency and the
// extreme values 0 and 255.
module tb_subtractor;
  import vbsme_pkg::*;

  logic clk = 0, reset_n = 0;
  pix_t n1, n2, out;
  int   checks = 0, failures = 0;

  subtractor dut (.clk, .reset_n, .n1, .n2, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b, exp;
    n1 = 0; n2 = 0;
    repeat (3) @(posedge clk);
    reset_n = 1;
    for (int i = 0; i < 500; i++) begin
      if (i == 0)      begin a = 0;   b = 255; end
      else if (i == 1) begin a = 255; b = 0;   end
      else if (i == 2) begin a = 77;  b = 77;  end
      else begin a = $urandom_range(255); b = $urandom_range(255); end
      @(negedge clk);
      n1 = pix_t'(a); n2 = pix_t'(b);
      @(posedge clk); #1;
      exp = (a > b) ? a - b : b - a;
      checks++;
      if (int'(out) != exp) begin
        failures++;
        $display("FAIL |%0d-%0d| got %0d expected %0d", a, b, out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pe: streams one random row per clock through the processing unit
// element and checks that each row's SAD, computed in the testbench, comes
// out exactly three clocks after the row went in.
module tb_pe;
  import vbsme_pkg::*;

  logic clk = 0, reset_n = 0;
  row4_t x, y;
  logic [9:0] acc;
  int checks = 0, failures = 0;
  int exp_q [$];

  pe dut (.clk, .reset_n, .x, .y, .acc);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    x = '0; y = '0;
    repeat (3) @(posedge clk);
    reset_n = 1;
    // Three register stages: the row applied in one clock is on acc in the
    // third clock after it, when two younger rows are queued behind it.
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      s = 0;
      for (int c = 0; c < 4; c++) begin
        x[c] = (i == 0) ? 8'd255 : pix_t'($urandom_range(255));
        y[c] = (i == 0) ? 8'd0   : pix_t'($urandom_range(255));
        s += (x[c] > y[c]) ? int'(x[c]) - int'(y[c]) : int'(y[c]) - int'(x[c]);
      end
      exp_q.push_back(s);
      @(posedge clk); #1;
      if (exp_q.size() == 3) begin
        int e;
        e = exp_q.pop_front();
        checks++;
        if (int'(acc) != e) begin
          failures++;
          $display("FAIL row %0d: acc %0d expected %0d", i - 2, acc, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

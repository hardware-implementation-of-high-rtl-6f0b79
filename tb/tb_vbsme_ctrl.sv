// tb_vbsme_ctrl: runs two scans of a 6x3 candidate grid and checks, clock by
// clock, the read sequence against the loop nest written out in the
// testbench (my outer, mx in steps of three, row inner), the scan length of
// NY*NX/3*4 clocks, the single scan_start pulse and that a start while
// busy is ignored.
module tb_vbsme_ctrl;
  localparam int NX = 6, NY = 3;
  localparam int XW = $clog2(NX + 2), YW = $clog2(NY);

  logic clk = 0, reset_n = 0, start;
  logic busy, scan_start, rd_valid;
  logic [XW-1:0] rd_mx;
  logic [YW-1:0] rd_my;
  logic [1:0]    rd_row;
  int checks = 0, failures = 0;

  vbsme_ctrl #(.NX(NX), .NY(NY)) dut (.clk, .reset_n, .start, .busy, .scan_start,
                                      .rd_valid, .rd_mx, .rd_my, .rd_row);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    start = 0;
    repeat (3) @(posedge clk);
    reset_n = 1;
    @(negedge clk);
    chk(!busy && !rd_valid, "idle after reset");
    for (int run = 0; run < 2; run++) begin
      int n;
      n = 0;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      for (int my = 0; my < NY; my++)
        for (int mx = 0; mx < NX; mx += 3)
          for (int r = 0; r < 4; r++) begin
            chk(rd_valid && busy, "valid during scan");
            chk(int'(rd_mx) == mx && int'(rd_my) == my && int'(rd_row) == r,
                $sformatf("address (%0d,%0d,%0d) expected (%0d,%0d,%0d)",
                          rd_mx, rd_my, rd_row, mx, my, r));
            chk(scan_start == (n == 0), "scan_start only on the first read");
            // a start in the middle of the scan must change nothing
            start = (n == 5);
            n++;
            @(negedge clk);
            start = 0;
          end
      chk(n == NY * NX / 3 * 4, "scan length");
      chk(!rd_valid && !busy, "idle after the scan");
      repeat (3) @(negedge clk);
      chk(!rd_valid && !busy, "stays idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

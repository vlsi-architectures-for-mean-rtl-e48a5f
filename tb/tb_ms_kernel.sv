// tb_ms_kernel: checks the kernel matrix against a real-valued model of
// the Epanechnikov formula, against every entry of the published 16x16,
// R=1 table and its worked examples, and checks the H*W+1 cycle latency.
module tb_ms_kernel;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] h, w, r;
  logic [7:0] kout [16][16];
  logic done, busy;
  int checks = 0, failures = 0;

  ms_kernel dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int hh, input int ww, input int rr);
    int cyc;
    real x, y, k;
    int expv;
    h = 8'(hh); w = 8'(ww); r = 8'(rr);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != hh*ww + 1) begin
      failures++;
      $display("latency %0d expected %0d", cyc, hh*ww+1);
    end
    for (int i = 1; i <= 16; i++)
      for (int j = 1; j <= 16; j++) begin
        if (i <= hh && j <= ww) begin
          x = 2.0*i/(rr*hh) - 1.0/rr;
          y = 2.0*j/(rr*ww) - 1.0/rr;
          k = 1.0 - x*x - y*y;
          if (k < 0) k = 0;
          expv = int'($floor(k*128.0 + 1e-9));
        end else expv = 0;
        checks++;
        if (int'(kout[i-1][j-1]) > expv + 1 || int'(kout[i-1][j-1]) < expv - 1) begin
          failures++;
          $display("k(%0d,%0d)=%0d expected %0d (H=%0d W=%0d R=%0d)", i, j, kout[i-1][j-1], expv, hh, ww, rr);
        end
      end
  endtask

  localparam int ktab [8][8] = '{
    '{  0,   0,   0,   0,  94, 172, 219, 234},
    '{  0,   0,  47, 188, 297, 375, 422, 438},
    '{  0,  47, 219, 359, 469, 547, 594, 609},
    '{  0, 188, 359, 500, 609, 688, 734, 750},
    '{ 94, 297, 469, 609, 719, 797, 844, 859},
    '{172, 375, 547, 688, 797, 875, 922, 938},
    '{219, 422, 594, 734, 844, 922, 969, 984},
    '{234, 438, 609, 750, 859, 938, 984, 1000}};

  initial begin
    h = 0; w = 0; r = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(16, 16, 1);
    // published table entries: (1,5)=0.094, (1,6)=0.172, (8,8)=1.000,
    // (5,1)=0.094, (16,x)=0, (4,4)=0.500
    checks += 6;
    if (kout[0][4] != 8'h0C) failures++;
    if (kout[0][5] != 8'h16) failures++;
    if (kout[7][7] != 8'h80) failures++;
    if (kout[4][0] != 8'h0C) failures++;
    if (kout[15][7] != 8'h00) failures++;
    if (kout[3][3] != 8'h40) failures++;
    // the whole published 16x16 table (thousandths, rows and columns 1..8;
    // the table is symmetric about row 8 and column 8, row and column 16
    // are 0): each entry within one Q1.7 LSB plus the table's rounding
    for (int i = 1; i <= 16; i++)
      for (int j = 1; j <= 16; j++) begin
        int mi, mj, tv;
        mi = (i <= 8) ? i : 16 - i;
        mj = (j <= 8) ? j : 16 - j;
        tv = (mi == 0 || mj == 0) ? 0 : ktab[mi-1][mj-1];
        checks++;
        if (int'(kout[i-1][j-1]) * 1000 > tv * 128 + 1064 || int'(kout[i-1][j-1]) * 1000 < tv * 128 - 1064) begin
          failures++;
          $display("table k(%0d,%0d)=%0d, table %0d/1000", i, j, kout[i-1][j-1], tv);
        end
      end
    run(12, 9, 1);
    run(16, 16, 2);
    run(7, 16, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ms_density: random colour-index and kernel matrices; the histogram,
// kernel sum and normalised densities are recomputed here and compared,
// and the 4096 + 2*H*W + 1 cycle schedule is checked.
module tb_ms_density;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] h, w;
  logic [7:0] kin [16][16];
  logic [11:0] tin [16][16];
  logic [11:0] rd_idx;
  logic [7:0] rd_d;
  logic [15:0] sumk;
  logic done, busy;
  int checks = 0, failures = 0;

  ms_density dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int hh, input int ww, input int base, input int span);
    int hist [4096];
    int s, cyc, e;
    for (int a = 0; a < 4096; a++) hist[a] = 0;
    s = 0;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        tin[i][j] = 12'(base + $urandom_range(span-1));
        kin[i][j] = 8'($urandom_range(128));
        if (i < hh && j < ww) begin
          hist[tin[i][j]] += kin[i][j];
          s += kin[i][j];
        end
      end
    h = 8'(hh); w = 8'(ww);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 4096 + 2*hh*ww + 1) begin failures++; $display("cycles %0d", cyc); end
    checks++;
    if (int'(sumk) != s) begin failures++; $display("sumk %0d exp %0d", sumk, s); end
    for (int a = 0; a < 4096; a++) begin
      if (a >= base - 2 && a < base + span + 2) begin
        rd_idx = 12'(a);
        #1;
        e = (s == 0) ? 0 : (hist[a] * 256) / s;
        if (e > 255) e = 255;
        checks++;
        if (int'(rd_d) != e) begin failures++; $display("D[%0d]=%0d exp %0d", a, rd_d, e); end
      end
    end
  endtask

  initial begin
    h = 0; w = 0; rd_idx = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(16, 16, 100, 20);
    run(16, 16, 4000, 96);
    run(5, 11, 7, 3);
    run(1, 1, 2000, 1);     // a single element: D saturates at 255
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

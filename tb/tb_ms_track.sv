// tb_ms_track: random weights and gradients (8-bit Q4.4, the default
// format); numx, numy and den are recomputed here in real arithmetic,
// dx = numx/den and dy = numy/den checked to one LSB of Q16.16, the
// rounded position update and the H*W+54 latency checked. A zero
// denominator must leave the position unchanged.
module tb_ms_track;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] h, w;
  logic [7:0] wt [16][16];
  logic signed [7:0] gx [16][16];
  logic signed [7:0] gy [16][16];
  logic signed [15:0] x_in, y_in;
  logic signed [31:0] numx, numy, den, dx, dy;
  logic signed [15:0] x, y;
  logic signed [47:0] rema1, rema2;
  logic done1, done2, done, busy;
  int checks = 0, failures = 0;

  ms_track dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int hh, input int ww, input bit zero);
    int cyc;
    real nx, ny, dn, edx, edy, n;
    int ex, ey;
    nx = 0; ny = 0; dn = 0;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        wt[i][j] = zero ? 8'd0 : 8'($urandom_range(40));
        gx[i][j] = 8'($signed($urandom_range(60) - 30));
        gy[i][j] = 8'($signed($urandom_range(60) - 24));
        if (i < hh && j < ww) begin
          n  = $floor($sqrt(real'(int'(gx[i][j])**2 + int'(gy[i][j])**2)));
          nx += (i+1) * (wt[i][j]/16.0) * (gx[i][j]/16.0);
          ny += (j+1) * (wt[i][j]/16.0) * (gy[i][j]/16.0);
          dn += (wt[i][j]/16.0) * (n/16.0);
        end
      end
    x_in = 16'($signed($urandom_range(100) - 50));
    y_in = 16'($signed($urandom_range(100) - 50));
    h = 8'(hh); w = 8'(ww);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 3;
    if (real'(numx) != nx * 65536.0) begin failures++; $display("numx %0d exp %f", numx, nx*65536.0); end
    if (real'(numy) != ny * 65536.0) begin failures++; $display("numy %0d exp %f", numy, ny*65536.0); end
    if (real'(den)  != dn * 65536.0) begin failures++; $display("den %0d exp %f", den, dn*65536.0); end
    if (dn == 0) begin
      checks += 3;
      if (dx != 0 || dy != 0) begin failures++; $display("zero den moved"); end
      if (x != x_in || y != y_in) failures++;
      if (cyc != hh*ww + 3) begin failures++; $display("cycles %0d", cyc); end
    end else begin
      edx = nx / dn * 65536.0;
      edy = ny / dn * 65536.0;
      checks += 5;
      if (real'(dx) > edx + 1.0 || real'(dx) < edx - 1.0) begin failures++; $display("dx %0d exp %f", dx, edx); end
      if (real'(dy) > edy + 1.0 || real'(dy) < edy - 1.0) begin failures++; $display("dy %0d exp %f", dy, edy); end
      ex = int'(x_in) + int'($floor(real'(dx) / 65536.0 + 0.5));
      ey = int'(y_in) + int'($floor(real'(dy) / 65536.0 + 0.5));
      if (int'(x) != ex) begin failures++; $display("x %0d exp %0d", x, ex); end
      if (int'(y) != ey) begin failures++; $display("y %0d exp %0d", y, ey); end
      if (cyc != hh*ww + 54) begin failures++; $display("cycles %0d", cyc); end
    end
  endtask

  initial begin
    h = 0; w = 0; x_in = 0; y_in = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 6; k++) run(16, 16, 1'b0);
    run(5, 9, 1'b0);
    run(16, 16, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ms_gradient: GRADX and GRADY instances on random matrices, checked
// against central / one-sided differences computed here, including the
// saturation at the format limits and the H*W+1 latency.
module tb_ms_gradient;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] h, w;
  logic signed [7:0] a [16][16];
  logic signed [7:0] gx [16][16];
  logic signed [7:0] gy [16][16];
  logic donex, doney, busyx, busyy;
  int checks = 0, failures = 0;

  ms_gradient #(.DIR(1'b0)) u_gx (.clk, .rst_n, .start, .h, .w, .a, .g(gx), .done(donex), .busy(busyx));
  ms_gradient #(.DIR(1'b1)) u_gy (.clk, .rst_n, .start, .h, .w, .a, .g(gy), .done(doney), .busy(busyy));
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int grad(input int hh, input int ww, input int i, input int j, input bit dir);
    int n, p, v;
    n = dir ? ww : hh;
    p = dir ? j : i;
    if (n <= 1) return 0;
    if (p == 0)
      v = dir ? a[i][1] - a[i][0] : a[1][j] - a[0][j];
    else if (p == n - 1)
      v = dir ? a[i][j] - a[i][j-1] : a[i][j] - a[i-1][j];
    else begin
      v = dir ? a[i][j+1] - a[i][j-1] : a[i+1][j] - a[i-1][j];
      v = (v < 0) ? -((-v + 1) / 2) : v / 2;   // floor(v/2)
    end
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    return v;
  endfunction

  task automatic run(input int hh, input int ww, input int span);
    int cyc, ex, ey;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) a[i][j] = 8'($signed($urandom_range(2*span) - span));
    h = 8'(hh); w = 8'(ww);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!donex) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != hh*ww + 1) begin failures++; $display("cycles %0d", cyc); end
    for (int i = 0; i < hh; i++)
      for (int j = 0; j < ww; j++) begin
        ex = grad(hh, ww, i, j, 1'b0);
        ey = grad(hh, ww, i, j, 1'b1);
        checks += 2;
        if (int'(gx[i][j]) != ex) begin failures++; $display("gx(%0d,%0d)=%0d exp %0d", i, j, gx[i][j], ex); end
        if (int'(gy[i][j]) != ey) begin failures++; $display("gy(%0d,%0d)=%0d exp %0d", i, j, gy[i][j], ey); end
      end
  endtask

  initial begin
    h = 0; w = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(16, 16, 40);
    run(16, 16, 128);
    run(6, 10, 100);
    run(3, 2, 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

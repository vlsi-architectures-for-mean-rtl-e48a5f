// tb_ms1_system: end-to-end check of the Architecture I tracker.
// The target and candidate index matrices are loaded through the load
// port; after a run the kernel is compared with the Epanechnikov formula
// (one LSB of Q1.7), and everything after it is recomputed here in
// integer arithmetic from that kernel: both densities, the weights, f,
// the gradients, numx/numy/den, the Q16.16 shift and the new position
// must match exactly, as must the cycle count
// (H*W+1) + (4096+2*H*W+1) + (H*W+2) + (H*W+54) + 5.
// Scenarios: a 16x16 patch with R = 1 (the size of the kernel table in
// the document), a smaller patch with R = 2, and a candidate sharing no
// colour with the target (den = 0, no shift).
module tb_ms1_system;
  import ms_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ld_we = 0, ld_sel = 0;
  logic [7:0] ld_row = 0, ld_col = 0;
  logic [11:0] ld_idx = 0;
  logic start = 0;
  logic [7:0] h, w, r;
  logic signed [15:0] x_in, y_in;
  logic [15:0] f;
  logic signed [31:0] numx, numy, den, dx, dy;
  logic signed [15:0] x, y;
  logic signed [47:0] rema1, rema2;
  logic done1, done2;
  int n_done1 = 0, n_done2 = 0;
  logic busy, done;
  logic [11:0] tm [16][16];
  logic [11:0] t2m [16][16];
  int checks = 0, failures = 0, n_moved = 0, n_still = 0;

  ms1_system dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n && done1) n_done1++;
    if (rst_n && done2) n_done2++;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint isq(input longint v);
    longint s = 0;
    for (int b = 15; b >= 0; b--)
      if ((s + (longint'(1) << b)) * (s + (longint'(1) << b)) <= v) s += longint'(1) << b;
    return s;
  endfunction

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("  %s = %0d, expected %0d", what, got, exp); end
  endtask

  task automatic run(input string name, input int hh, input int ww, input int rr, input int xi, input int yi);
    longint hq [4096];
    longint hp [4096];
    longint k [16][16];
    longint g1 [16][16];
    longint g2 [16][16];
    longint sq, sp, q, p, wv, acc, ax, ay, ad, enx, eny, eden, edx, edy, nrm, v;
    longint cyc, ecyc;
    real kr, xr, yr;
    // load both index matrices
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          @(negedge clk);
          ld_we = 1; ld_sel = s[0]; ld_row = 8'(i); ld_col = 8'(j);
          ld_idx = s ? t2m[i][j] : tm[i][j];
        end
    @(negedge clk) ld_we = 0;
    h = 8'(hh); w = 8'(ww); r = 8'(rr); x_in = 16'(xi); y_in = 16'(yi);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    // kernel against the formula
    for (int i = 0; i < hh; i++)
      for (int j = 0; j < ww; j++) begin
        xr = 2.0*(i+1)/(rr*hh) - 1.0/rr;
        yr = 2.0*(j+1)/(rr*ww) - 1.0/rr;
        kr = 1.0 - xr*xr - yr*yr;
        if (kr < 0) kr = 0;
        k[i][j] = longint'(dut.kout[i][j]);
        checks++;
        if (real'(k[i][j]) > kr*128.0 + 1.0 || real'(k[i][j]) < kr*128.0 - 1.0) begin
          failures++; $display("  kernel(%0d,%0d) = %0d", i, j, k[i][j]);
        end
      end
    // densities
    for (int a = 0; a < 4096; a++) begin hq[a] = 0; hp[a] = 0; end
    sq = 0; sp = 0;
    for (int i = 0; i < hh; i++)
      for (int j = 0; j < ww; j++) begin
        hq[tm[i][j]] += k[i][j]; sq += k[i][j];
        hp[t2m[i][j]] += k[i][j]; sp += k[i][j];
      end
    // weights, f, gradients, tracking sums
    acc = 0; ax = 0; ay = 0; ad = 0;
    for (int i = 0; i < hh; i++)
      for (int j = 0; j < ww; j++) begin
        q = (sq == 0) ? 0 : (hq[t2m[i][j]] * 256) / sq; if (q > 255) q = 255;
        p = (sp == 0) ? 0 : (hp[t2m[i][j]] * 256) / sp; if (p > 255) p = 255;
        wv = (p == 0) ? 0 : isq(((q * 256) / p) & 16'hFFFF);
        check("w", longint'(dut.wt[i][j]), wv);
        acc += wv * k[i][j];
        // gradients of -k: central differences halved (rounded down),
        // one-sided at the ends
        if (hh == 1) v = 0;
        else if (i == 0) v = k[0][j] - k[1][j];
        else if (i == hh-1) v = k[i-1][j] - k[i][j];
        else begin v = k[i-1][j] - k[i+1][j]; v = (v < 0) ? -((-v + 1) / 2) : v / 2; end
        g1[i][j] = v;
        if (ww == 1) v = 0;
        else if (j == 0) v = k[i][0] - k[i][1];
        else if (j == ww-1) v = k[i][j-1] - k[i][j];
        else begin v = k[i][j-1] - k[i][j+1]; v = (v < 0) ? -((-v + 1) / 2) : v / 2; end
        g2[i][j] = v;
        check("gx", longint'(dut.gx[i][j]), g1[i][j]);
        check("gy", longint'(dut.gy[i][j]), g2[i][j]);
        nrm = isq(g1[i][j]*g1[i][j] + g2[i][j]*g2[i][j]);
        ax += (i+1) * wv * g1[i][j];
        ay += (j+1) * wv * g2[i][j];
        ad += wv * nrm;
      end
    // Q4.4 weight x Q1.7 gradient = 11 fraction bits -> Q16.16
    enx = ax * 32; eny = ay * 32; eden = ad * 32;
    check("f", longint'(f), (acc >> 3) / (hh * ww));
    check("numx", longint'(numx), enx);
    check("numy", longint'(numy), eny);
    check("den", longint'(den), eden);
    if (eden == 0) begin
      edx = 0; edy = 0;
      ecyc = (hh*ww+1) + (4096+2*hh*ww+1) + (hh*ww+2) + (hh*ww+3) + 5;
      n_still++;
    end else begin
      edx = (enx * 65536) / eden; edy = (eny * 65536) / eden;
      ecyc = (hh*ww+1) + (4096+2*hh*ww+1) + (hh*ww+2) + (hh*ww+54) + 5;
    end
    check("dx", longint'(dx), edx);
    check("dy", longint'(dy), edy);
    check("x", longint'(x), longint'(xi) + ((edx + 32768) >>> 16));
    check("y", longint'(y), longint'(yi) + ((edy + 32768) >>> 16));
    check("cycles", cyc, ecyc);
    if (eden != 0) begin
      check("rema1", longint'(rema1), enx * 65536 - edx * eden);
      check("rema2", longint'(rema2), eny * 65536 - edy * eden);
    end
    if (x != 16'(xi) || y != 16'(yi)) n_moved++;
    if (name == "16x16 R=1") begin
      // the object moved down and right: the shift must follow it
      checks++;
      if (dx <= 0 || dy <= 0) begin failures++; $display("  shift does not follow the object"); end
    end
    $display("%s: f=%0d numx=%0d numy=%0d den=%0d dx=%0d dy=%0d (x,y)=(%0d,%0d) cycles=%0d",
             name, f, numx, numy, den, dx, dy, x, y, cyc);
  endtask

  initial begin
    h = 0; w = 0; r = 0; x_in = 0; y_in = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // target: a blob of colour 100 inside colour 200 background; the
    // candidate shows the blob shifted down and right
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        tm[i][j]  = ((i-7)*(i-7) + (j-7)*(j-7) <= 12) ? 12'd100 : 12'd200 + 12'($urandom_range(3));
        t2m[i][j] = ((i-10)*(i-10) + (j-9)*(j-9) <= 12) ? 12'd100 : 12'd200 + 12'($urandom_range(3));
      end
    run("16x16 R=1", 16, 16, 1, 40, 30);
    run("12x10 R=2", 12, 10, 2, -5, 7);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        tm[i][j] = 12'($urandom_range(4095));
        t2m[i][j] = 12'($urandom_range(4095));
      end
    run("random   ", 16, 16, 1, 0, 0);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        tm[i][j] = 12'd5; t2m[i][j] = 12'd9;
      end
    run("no match ", 16, 16, 1, 3, 4);
    checks += 3;
    if (n_done1 != 3 || n_done2 != 3) begin failures++; $display("divider done pulses %0d %0d", n_done1, n_done2); end
    if (n_moved == 0) begin failures++; $display("no run moved the position"); end
    if (n_still == 0) begin failures++; $display("no run had den = 0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

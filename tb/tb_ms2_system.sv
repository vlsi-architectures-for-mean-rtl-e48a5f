// tb_ms2_system: end-to-end check of the Architecture II tracker.
// A reference tracker written here in integer arithmetic (same window
// clipping, kernel weights, 16-bit model fractions, Q4.4 weights, Q8.8
// centre and mean-shift vector, rounding of the centre between
// iterations) follows each run; final centre, new centre, ms, iteration
// count, converged flag and the total cycle count must match it exactly.
// Scenarios: an object moved between frames (converges by threshold),
// the same run cut short by max_iter, identical frames, max_iter = 0,
// a window clipped at the frame edge and random textured frames.
module tb_ms2_system;
  import ms_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ld_we = 0, ld_frame = 0;
  logic [7:0] ld_row = 0, ld_col = 0;
  logic [23:0] ld_rgb = 0;
  logic start = 0;
  logic [7:0] center1, center2, whs1, whs2, incre, height, width, max_iter;
  logic [15:0] eps;
  logic [15:0] center_new1, center_new2, ms;
  logic [7:0] c1_out, c2_out, iter;
  logic converged, busy, done;
  logic [23:0] f1 [16][16];
  logic [23:0] f2 [16][16];
  int checks = 0, failures = 0, n_conv = 0, n_maxit = 0;

  ms2_system dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cidx(input logic [23:0] p);
    return (int'(p[23:20]) + 1) * 256 + (int'(p[15:12]) + 1) * 16 + int'(p[7:4]) + 1;
  endfunction

  function automatic longint isq(input longint v);
    longint r = 0;
    for (int b = 15; b >= 0; b--)
      if ((r + (longint'(1) << b)) * (r + (longint'(1) << b)) <= v) r += longint'(1) << b;
    return r;
  endfunction

  typedef longint model_t [NBINS2];

  // window bounds, clipped to 1..hh / 1..ww
  task automatic bounds(input int c1, c2, h1, h2, inc, hh, ww, output int r0, r1, k0, k1);
    r0 = c1 - h1 - inc; r1 = c1 + h1 + inc; k0 = c2 - h2 - inc; k1 = c2 + h2 + inc;
    if (r0 < 1) r0 = 1; if (k0 < 1) k0 = 1; if (r1 > hh) r1 = hh; if (k1 > ww) k1 = ww;
  endtask

  task automatic model(input bit second, input int c1, c2, h1, h2, inc, hh, ww,
                       output model_t m, output int npix);
    longint hist [NBINS2];
    longint s, wmax, wk;
    int r0, r1, k0, k1;
    for (int a = 0; a < NBINS2; a++) hist[a] = 0;
    bounds(c1, c2, h1, h2, inc, hh, ww, r0, r1, k0, k1);
    wmax = longint'((h1+inc)*(h1+inc) + (h2+inc)*(h2+inc) + 1);
    s = 0; npix = 0;
    for (int i = r0; i <= r1; i++)
      for (int j = k0; j <= k1; j++) begin
        wk = wmax - longint'((i-c1)*(i-c1) + (j-c2)*(j-c2));
        hist[cidx(second ? f2[i-1][j-1] : f1[i-1][j-1])] += wk;
        s += wk;
        npix++;
      end
    for (int a = 0; a < NBINS2; a++) begin
      m[a] = (s == 0) ? 0 : (hist[a] * 65536) / s;
      if (m[a] > 65535) m[a] = 65535;
    end
  endtask

  // full reference run; returns results and expected cycle count
  task automatic ref_run(input int c1, c2, h1, h2, inc, hh, ww, ep, mi,
                         output int oc1, oc2, ocn1, ocn2, oms, oit, output bit oconv,
                         output longint cyc);
    model_t qu, pu;
    int nt, nc, r0, r1, k0, k1, cc1, cc2, it;
    longint sw, sx, sy, ratio, w, cn1, cn2, e1, e2, m;
    if (hh > 16) hh = 16; if (ww > 16) ww = 16;
    if (mi == 0) mi = 1;
    model(1'b0, c1, c2, h1, h2, 0, hh, ww, qu, nt);
    cyc = 2 + 4369 + 2*nt + 1;
    cc1 = c1; cc2 = c2; it = 0;
    forever begin
      model(1'b1, cc1, cc2, h1, h2, inc, hh, ww, pu, nc);
      bounds(cc1, cc2, h1, h2, inc, hh, ww, r0, r1, k0, k1);
      sw = 0; sx = 0; sy = 0;
      for (int i = r0; i <= r1; i++)
        for (int j = k0; j <= k1; j++) begin
          int ix;
          ix = cidx(f2[i-1][j-1]);
          ratio = (pu[ix] == 0) ? 0 : (qu[ix] * 256) / pu[ix];
          if (ratio > 65535) ratio = 65535;
          w = isq(ratio);
          sw += w; sx += i * w; sy += j * w;
        end
      if (sw == 0) begin
        cn1 = cc1 * 256; cn2 = cc2 * 256;
        cyc += (4369 + 2*nc + 1) + (nc + 3) + 2;
      end else begin
        cn1 = ((sx * 256) / sw) & 16'hFFFF; cn2 = ((sy * 256) / sw) & 16'hFFFF;
        cyc += (4369 + 2*nc + 1) + (nc + 38) + 2;
      end
      e1 = cn1 - cc1 * 256; e2 = cn2 - cc2 * 256;
      m = isq((e1*e1 + e2*e2) & 32'hFFFFFFFF);
      it++;
      if (m < ep || it >= mi) begin
        oconv = (m < ep);
        break;
      end
      cc1 = int'((cn1 + 128) >> 8) & 255; cc2 = int'((cn2 + 128) >> 8) & 255;
    end
    oc1 = cc1; oc2 = cc2; ocn1 = int'(cn1); ocn2 = int'(cn2); oms = int'(m); oit = it;
  endtask

  task automatic load_frames();
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          @(negedge clk);
          ld_we = 1; ld_frame = f[0]; ld_row = 8'(i); ld_col = 8'(j);
          ld_rgb = f ? f2[i][j] : f1[i][j];
        end
    @(negedge clk) ld_we = 0;
  endtask

  task automatic run(input string name, input int c1, c2, h1, h2, inc, hh, ww, ep, mi);
    int oc1, oc2, ocn1, ocn2, oms, oit;
    bit oconv;
    longint ecyc, cyc;
    ref_run(c1, c2, h1, h2, inc, hh, ww, ep, mi, oc1, oc2, ocn1, ocn2, oms, oit, oconv, ecyc);
    load_frames();
    center1 = 8'(c1); center2 = 8'(c2); whs1 = 8'(h1); whs2 = 8'(h2); incre = 8'(inc);
    height = 8'(hh); width = 8'(ww); eps = 16'(ep); max_iter = 8'(mi);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    $display("%s: centre (%0d,%0d) new (%h,%h) ms %0d iter %0d converged %0d cycles %0d",
             name, c1_out, c2_out, center_new1, center_new2, ms, iter, converged, cyc);
    checks += 8;
    if (int'(c1_out) != oc1 || int'(c2_out) != oc2) begin failures++; $display("  centre exp (%0d,%0d)", oc1, oc2); end
    if (int'(center_new1) != ocn1) begin failures++; $display("  cn1 exp %h", ocn1); end
    if (int'(center_new2) != ocn2) begin failures++; $display("  cn2 exp %h", ocn2); end
    if (int'(ms) != oms) begin failures++; $display("  ms exp %0d", oms); end
    if (int'(iter) != oit) begin failures++; $display("  iter exp %0d", oit); end
    if (converged != oconv) begin failures++; $display("  converged exp %0d", oconv); end
    if (cyc != ecyc) begin failures++; $display("  cycles exp %0d", ecyc); end
    if (busy) begin failures++; $display("  busy after done"); end
    if (converged) n_conv++;
    else n_maxit++;
  endtask

  // background texture plus an object of two colours centred at (r, c)
  task automatic scene(input bit second, input int r, input int c, input int seed);
    int s;
    s = seed;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        logic [23:0] px;
        s = s * 1103515245 + 12345;
        px = {8'(8'h40 + ((s >>> 16) & 8'h1F)), 8'h70, 8'(8'h30 + ((s >>> 8) & 8'h1F))};
        if ((i+1 - r)**2 + (j+1 - c)**2 <= 5) px = 24'hE02010;
        if ((i+1 - r)**2 + (j+1 - c)**2 <= 1) px = 24'h20E0F0;
        if (second) f2[i][j] = px; else f1[i][j] = px;
      end
  endtask

  initial begin
    center1 = 0; center2 = 0; whs1 = 0; whs2 = 0; incre = 0; height = 0; width = 0;
    eps = 0; max_iter = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // object moves from (6,6) to (8,9)
    scene(1'b0, 6, 6, 1); scene(1'b1, 8, 9, 2);
    run("moved object", 6, 6, 3, 3, 2, 16, 16, 26, 20);
    run("max_iter 1  ", 6, 6, 3, 3, 2, 16, 16, 26, 1);
    run("max_iter 0  ", 6, 6, 3, 3, 2, 16, 16, 26, 0);
    run("tight eps   ", 6, 6, 3, 3, 2, 16, 16, 1, 3);
    // identical frames
    scene(1'b0, 8, 8, 3); scene(1'b1, 8, 8, 3);
    run("still object", 8, 8, 3, 3, 1, 16, 16, 26, 10);
    // near the frame corner, small frame
    scene(1'b0, 3, 3, 4); scene(1'b1, 2, 4, 5);
    run("edge        ", 3, 3, 2, 2, 1, 12, 14, 26, 10);
    // object absent from the second frame
    scene(1'b0, 8, 8, 6);
    for (int i = 0; i < 16; i++) for (int j = 0; j < 16; j++) f2[i][j] = 24'h000000;
    run("lost object ", 8, 8, 2, 2, 1, 16, 16, 26, 4);
    // random textures
    for (int k = 0; k < 3; k++) begin
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          f1[i][j] = {8'($urandom_range(255)) & 8'hC0, 8'h80, 8'($urandom_range(255)) & 8'hC0};
          f2[i][j] = {8'($urandom_range(255)) & 8'hC0, 8'h80, 8'($urandom_range(255)) & 8'hC0};
        end
      run("random      ", 4 + $urandom_range(8), 4 + $urandom_range(8), 1 + $urandom_range(3),
          1 + $urandom_range(3), $urandom_range(2), 16, 16, 26, 5);
    end
    checks += 2;
    if (n_conv == 0) begin failures++; $display("no run converged by threshold"); end
    if (n_maxit == 0) begin failures++; $display("no run stopped at max_iter"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

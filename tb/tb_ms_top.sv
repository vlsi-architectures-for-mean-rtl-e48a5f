// tb_ms_top: end-to-end test of the complete design at its full size
// (16 x 16 frames and kernels, 4096 and 4369 bins), with no parameter
// changed. It drives every part through the top-level ports and counts
// how often each mechanism of the design is seen; a mechanism that never
// occurs counts as a failure:
//   Architecture II  stop by threshold (ms < eps), stop at max_iter,
//                    a centre moving toward a displaced object, a lost
//                    object (no candidate weight, centre kept);
//   Architecture I   a shift toward a displaced object, den = 0 (no
//                    shift), the 5439-cycle run time of a 16 x 16 step;
//   hue              the grey, R-, G- and B-maximum branches;
//   divider          the published example -12/15 and all fractions X/Y
//                    with 0 <= X < Y <= 31.
module tb_ms_top;
  logic clk = 0, rst_n = 0;
  logic a2_ld_we = 0, a2_ld_frame = 0, a2_start = 0;
  logic [7:0] a2_ld_row = 0, a2_ld_col = 0;
  logic [23:0] a2_ld_rgb = 0;
  logic [7:0] a2_center1 = 0, a2_center2 = 0, a2_whs1 = 0, a2_whs2 = 0, a2_incre = 0;
  logic [7:0] a2_height = 0, a2_width = 0, a2_max_iter = 0;
  logic [15:0] a2_eps = 0;
  logic [15:0] a2_center_new1, a2_center_new2, a2_ms;
  logic [7:0] a2_c1_out, a2_c2_out, a2_iter;
  logic a2_converged, a2_busy, a2_done;
  logic a1_ld_we = 0, a1_ld_sel = 0, a1_start = 0;
  logic [7:0] a1_ld_row = 0, a1_ld_col = 0, a1_h = 0, a1_w = 0, a1_r = 0;
  logic [11:0] a1_ld_idx = 0;
  logic signed [15:0] a1_x_in = 0, a1_y_in = 0;
  logic [15:0] a1_f;
  logic signed [31:0] a1_numx, a1_numy, a1_den, a1_dx, a1_dy;
  logic signed [15:0] a1_x, a1_y;
  logic signed [47:0] a1_rema1, a1_rema2;
  logic a1_done1, a1_done2;
  logic a1_busy, a1_done;
  logic hue_in_valid = 0, hue_out_valid;
  logic [7:0] hue_r = 0, hue_g = 0, hue_b = 0;
  logic signed [31:0] hue_h;
  logic [5:0] div_x = 0, div_y = 1;
  logic [8:0] div_q;
  logic [5:0] div_r;

  int checks = 0, failures = 0;
  int n_thresh = 0, n_maxit = 0, n_follow = 0, n_lost = 0;
  int n_a1_shift = 0, n_a1_still = 0, n_a1_time = 0;
  int n_grey = 0, n_rmax = 0, n_gmax = 0, n_bmax = 0;
  int n_div_example = 0, n_div_pos = 0;

  ms_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- Architecture II ----------------
  logic [23:0] f1 [16][16];
  logic [23:0] f2 [16][16];

  task automatic scene2(input bit second, input int r, input int c);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        logic [23:0] px;
        px = ((i + j) % 2) ? 24'h307050 : 24'h407040;
        if ((i+1 - r)**2 + (j+1 - c)**2 <= 5) px = 24'hE02010;
        if ((i+1 - r)**2 + (j+1 - c)**2 <= 1) px = 24'h20E0F0;
        if (second) f2[i][j] = px; else f1[i][j] = px;
      end
  endtask

  task automatic run2(input int c1, input int c2, input int eps, input int mi, output int cyc);
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          @(negedge clk);
          a2_ld_we = 1; a2_ld_frame = f[0]; a2_ld_row = 8'(i); a2_ld_col = 8'(j);
          a2_ld_rgb = f ? f2[i][j] : f1[i][j];
        end
    @(negedge clk) a2_ld_we = 0;
    a2_center1 = 8'(c1); a2_center2 = 8'(c2); a2_whs1 = 8'd3; a2_whs2 = 8'd3; a2_incre = 8'd2;
    a2_height = 8'd16; a2_width = 8'd16; a2_eps = 16'(eps); a2_max_iter = 8'(mi);
    @(negedge clk) a2_start = 1;
    @(negedge clk) a2_start = 0;
    cyc = 1;
    while (!a2_done) begin @(negedge clk); cyc++; end
    $display("arch II: start (%0d,%0d) -> (%0d,%0d) new (%h,%h) ms %0d iter %0d converged %0d, %0d cycles",
             c1, c2, a2_c1_out, a2_c2_out, a2_center_new1, a2_center_new2, a2_ms, a2_iter,
             a2_converged, cyc);
    if (a2_converged) begin
      n_thresh++;
      expect_true(a2_ms < 16'(eps), "converged flag with ms >= eps");
    end else if (int'(a2_iter) == mi) n_maxit++;
    else expect_true(1'b0, "run ended neither by threshold nor by max_iter");
  endtask

  task automatic arch2();
    int cyc, d0, d1;
    // object moved from (6,6) to (9,9): the centre must come closer
    scene2(1'b0, 6, 6); scene2(1'b1, 9, 9);
    run2(6, 6, 26, 8, cyc);
    d0 = (9-6)**2 + (9-6)**2;
    d1 = (9 - a2_c1_out)**2 + (9 - a2_c2_out)**2;
    expect_true(d1 < d0, "centre did not approach the moved object");
    if (d1 < d0) n_follow++;
    // a single iteration allowed: must stop at max_iter
    run2(6, 6, 26, 1, cyc);
    expect_true(a2_iter == 8'd1 && !a2_converged, "max_iter = 1 run");
    // object in place: converges at once, centre unchanged
    scene2(1'b0, 8, 8); scene2(1'b1, 8, 8);
    run2(8, 8, 26, 10, cyc);
    expect_true(a2_converged && a2_iter == 8'd1 && a2_c1_out == 8'd8 && a2_c2_out == 8'd8,
                "object in place");
    // target colours absent from frame 2: no weight, centre kept
    for (int i = 0; i < 16; i++) for (int j = 0; j < 16; j++) f2[i][j] = 24'h000000;
    run2(8, 8, 26, 10, cyc);
    expect_true(a2_converged && a2_center_new1 == 16'h0800 && a2_center_new2 == 16'h0800 && a2_ms == 0,
                "lost object");
    if (a2_converged && a2_ms == 0) n_lost++;
  endtask

  // ---------------- Architecture I ----------------
  task automatic run1(input bit match, input int xi, input int yi, output int cyc);
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          int ci, cj;
          @(negedge clk);
          ci = s ? 10 : 7; cj = s ? 9 : 7;
          a1_ld_we = 1; a1_ld_sel = s[0]; a1_ld_row = 8'(i); a1_ld_col = 8'(j);
          if (!match && s == 1) a1_ld_idx = 12'd3000;
          else a1_ld_idx = ((i-ci)*(i-ci) + (j-cj)*(j-cj) <= 12) ? 12'd100 : 12'd200 + 12'((i*j) % 3);
        end
    @(negedge clk) a1_ld_we = 0;
    a1_h = 8'd16; a1_w = 8'd16; a1_r = 8'd1; a1_x_in = 16'(xi); a1_y_in = 16'(yi);
    @(negedge clk) a1_start = 1;
    @(negedge clk) a1_start = 0;
    cyc = 1;
    while (!a1_done) begin @(negedge clk); cyc++; end
    $display("arch I: f %0d numx %0d numy %0d den %0d dx %0d dy %0d (%0d,%0d)->(%0d,%0d), %0d cycles",
             a1_f, a1_numx, a1_numy, a1_den, a1_dx, a1_dy, xi, yi, a1_x, a1_y, cyc);
  endtask

  task automatic arch1();
    int cyc;
    // blob moved from (7,7) to (10,9): the shift must point down and right
    run1(1'b1, 20, 20, cyc);
    expect_true(a1_dx > 0 && a1_dy > 0 && a1_x > 16'sd20 && a1_y > 16'sd20, "arch I shift direction");
    if (a1_x != 16'sd20 || a1_y != 16'sd20) n_a1_shift++;
    expect_true(cyc == 5439, "arch I run time");
    if (cyc == 5439) n_a1_time++;
    // candidate shares no colour with the target: den = 0, no shift
    run1(1'b0, 20, 20, cyc);
    expect_true(a1_den == 0 && a1_x == 16'sd20 && a1_y == 16'sd20 && a1_f == 0, "arch I den = 0");
    if (a1_den == 0 && a1_x == 16'sd20) n_a1_still++;
  endtask

  // ---------------- hue ----------------
  function automatic int ref_hue(input int rr, input int gg, input int bb);
    int mx, mn;
    mx = rr; if (gg > mx) mx = gg; if (bb > mx) mx = bb;
    mn = rr; if (gg < mn) mn = gg; if (bb < mn) mn = bb;
    if (mx == mn) return mx * 4096 + 80 * 65536;
    if (rr == mx)      return int'(longint'((gg - bb)) * 1048576 / (mx - mn));
    else if (gg == mx) return int'(longint'((bb - rr)) * 1048576 / (mx - mn)) + 32*65536;
    else               return int'(longint'((rr - gg)) * 1048576 / (mx - mn)) + 64*65536;
  endfunction

  int hq [$];
  always @(negedge clk) if (hue_out_valid) begin
    int e;
    e = hq.pop_front();
    checks++;
    if (hue_h != e) begin failures++; $display("FAIL: hue %0d expected %0d", hue_h, e); end
  end

  task automatic hue_all();
    for (int k = 0; k < 400; k++) begin
      int rr, gg, bb, mx, mn;
      @(negedge clk);
      rr = $urandom_range(255); gg = $urandom_range(255); bb = $urandom_range(255);
      if (k % 50 == 0) begin gg = rr; bb = rr; end
      hue_in_valid = 1; hue_r = 8'(rr); hue_g = 8'(gg); hue_b = 8'(bb);
      hq.push_back(ref_hue(rr, gg, bb));
      mx = rr; if (gg > mx) mx = gg; if (bb > mx) mx = bb;
      mn = rr; if (gg < mn) mn = gg; if (bb < mn) mn = bb;
      if (mx == mn) n_grey++;
      else if (rr == mx) n_rmax++;
      else if (gg == mx) n_gmax++;
      else n_bmax++;
    end
    @(negedge clk) hue_in_valid = 0;
    repeat (4) @(negedge clk);
    expect_true(hq.size() == 0, "hue results missing");
  endtask

  // ---------------- divider ----------------
  task automatic div_all();
    div_x = 6'(-12); div_y = 6'd15; #1;
    expect_true(div_q == 9'b100110011 && div_r == 6'd3, "divider example -12/15");
    if (div_q == 9'b100110011 && div_r == 6'd3) n_div_example++;
    for (int y = 1; y < 32; y++)
      for (int x = 0; x < y; x++) begin
        int qs;
        div_x = 6'(x); div_y = 6'(y); #1;
        // Q read as a signed 9-bit number is 2^8 * X / Y within one LSB,
        // and exactly 2^8 * X = Q*Y + R when R is not negative
        qs = int'($signed(div_q));
        checks++;
        if ((qs - 1) * y > 256 * x || (qs + 1) * y < 256 * x ||
            ($signed(div_r) >= 0 && 256 * x != qs * y + int'($signed(div_r)))) begin
          failures++; $display("FAIL: divider %0d/%0d q=%b r=%0d", x, y, div_q, $signed(div_r));
        end else n_div_pos++;
      end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      arch2();
      arch1();
      hue_all();
      div_all();
    join
    $display("mechanisms: threshold %0d, max_iter %0d, follow %0d, lost %0d, a1 shift %0d, a1 den=0 %0d, a1 time %0d",
             n_thresh, n_maxit, n_follow, n_lost, n_a1_shift, n_a1_still, n_a1_time);
    $display("            hue grey %0d R %0d G %0d B %0d, divider example %0d, positive %0d",
             n_grey, n_rmax, n_gmax, n_bmax, n_div_example, n_div_pos);
    checks += 14;
    if (n_thresh == 0)      begin failures++; $display("FAIL: never stopped by threshold"); end
    if (n_maxit == 0)       begin failures++; $display("FAIL: never stopped at max_iter"); end
    if (n_follow == 0)      begin failures++; $display("FAIL: never followed an object"); end
    if (n_lost == 0)        begin failures++; $display("FAIL: lost-object case not seen"); end
    if (n_a1_shift == 0)    begin failures++; $display("FAIL: arch I never shifted"); end
    if (n_a1_still == 0)    begin failures++; $display("FAIL: arch I den = 0 not seen"); end
    if (n_a1_time == 0)     begin failures++; $display("FAIL: arch I run time never matched"); end
    if (n_grey == 0)        begin failures++; $display("FAIL: hue grey branch not seen"); end
    if (n_rmax == 0)        begin failures++; $display("FAIL: hue R branch not seen"); end
    if (n_gmax == 0)        begin failures++; $display("FAIL: hue G branch not seen"); end
    if (n_bmax == 0)        begin failures++; $display("FAIL: hue B branch not seen"); end
    if (n_div_example == 0) begin failures++; $display("FAIL: divider example not seen"); end
    if (n_div_pos == 0)     begin failures++; $display("FAIL: divider quotients not seen"); end
    if (hq.size() != 0)     begin failures++; $display("FAIL: hue queue not empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

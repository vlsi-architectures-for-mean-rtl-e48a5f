// tb_ms2_model: a 16x16 frame of random pixels drawn from a few colours
// is served to the model block; the index-RAM and model-RAM writes are
// captured here and compared with a histogram built here from the
// window/kernel formulas, for a target window, an enlarged candidate
// window and a window clipped at the frame edge. Checks the
// NBINS + 2*npix + 1 cycle schedule too.
module tb_ms2_model;
  import ms_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] center1, center2, whs1, whs2, incre, height, width;
  logic [7:0] pix_row, pix_col;
  logic [23:0] pix_rgb;
  logic idx_we, mdl_we;
  logic [7:0] idx_addr;
  logic [12:0] idx_wdata, mdl_addr;
  logic [15:0] mdl_wdata, npix;
  logic [31:0] sumw;
  logic done, busy;
  logic [23:0] frame [16][16];
  logic [12:0] idx_mem [256];
  logic [15:0] mdl_mem [NBINS2];
  int checks = 0, failures = 0;

  ms2_model dut (.*);
  always #5 clk = ~clk;
  assign pix_rgb = (pix_row >= 1 && pix_row <= 16 && pix_col >= 1 && pix_col <= 16)
                   ? frame[pix_row-1][pix_col-1] : 24'h0;
  always @(posedge clk) begin
    if (idx_we) idx_mem[idx_addr] <= idx_wdata;
    if (mdl_we) mdl_mem[mdl_addr] <= mdl_wdata;
  end

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cidx(input logic [23:0] p);
    return (int'(p[23:20]) + 1) * 256 + (int'(p[15:12]) + 1) * 16 + int'(p[7:4]) + 1;
  endfunction

  task automatic run(input int c1, input int c2, input int h1, input int h2, input int inc,
                     input int hh, input int ww);
    longint hist [NBINS2];
    longint s, wmax, wk, e;
    int r0, r1, k0, k1, n, cyc;
    for (int a = 0; a < NBINS2; a++) begin hist[a] = 0; mdl_mem[a] = 16'hDEAD; end
    r0 = c1 - h1 - inc; r1 = c1 + h1 + inc; k0 = c2 - h2 - inc; k1 = c2 + h2 + inc;
    wmax = longint'((h1+inc)*(h1+inc) + (h2+inc)*(h2+inc) + 1);
    if (r0 < 1) r0 = 1; if (k0 < 1) k0 = 1; if (r1 > hh) r1 = hh; if (k1 > ww) k1 = ww;
    s = 0; n = 0;
    for (int i = r0; i <= r1; i++)
      for (int j = k0; j <= k1; j++) begin
        wk = wmax - longint'((i-c1)*(i-c1) + (j-c2)*(j-c2));
        hist[cidx(frame[i-1][j-1])] += wk;
        s += wk;
        n++;
      end
    center1 = 8'(c1); center2 = 8'(c2); whs1 = 8'(h1); whs2 = 8'(h2); incre = 8'(inc);
    height = 8'(hh); width = 8'(ww);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 3;
    if (int'(npix) != n) begin failures++; $display("npix %0d exp %0d", npix, n); end
    if (longint'(sumw) != s) begin failures++; $display("sumw %0d exp %0d", sumw, s); end
    if (cyc != NBINS2 + 2*n + 1) begin failures++; $display("cycles %0d", cyc); end
    for (int a = 0; a < NBINS2; a++) begin
      e = (hist[a] * 65536) / s;
      if (e > 65535) e = 65535;
      checks++;
      if (longint'(mdl_mem[a]) != e) begin failures++; $display("model[%0d]=%0d exp %0d", a, mdl_mem[a], e); end
    end
    n = 0;
    for (int i = r0; i <= r1; i++)
      for (int j = k0; j <= k1; j++) begin
        checks++;
        if (int'(idx_mem[n]) != cidx(frame[i-1][j-1])) begin failures++; $display("index ram %0d", n); end
        n++;
      end
  endtask

  initial begin
    logic [23:0] palette [6];
    palette = '{24'h968C82, 24'h969696, 24'h9696A0, 24'h102030, 24'hF0F0F0, 24'h40C010};
    center1 = 0; center2 = 0; whs1 = 0; whs2 = 0; incre = 0; height = 0; width = 0;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) frame[i][j] = palette[$urandom_range(5)];
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(6, 6, 3, 3, 0, 16, 16);      // target window
    run(7, 8, 3, 2, 2, 16, 16);      // candidate window with increase
    run(2, 15, 3, 3, 1, 16, 16);     // clipped at the frame corner
    run(8, 8, 2, 2, 0, 12, 10);      // smaller frame
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

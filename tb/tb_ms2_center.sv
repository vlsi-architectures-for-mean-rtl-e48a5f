// tb_ms2_center: index, target and candidate memories are held here
// with random contents; weights sqrt(qu/pu), the new centre
// sum(i*w)/sum(w), sum(j*w)/sum(w) and the mean-shift vector are
// recomputed in real arithmetic and compared (new centre and ms to one
// LSB of Q8.8), together with the npix + 38 cycle latency and the
// all-zero-weight case.
module tb_ms2_center;
  import ms_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] center1, center2, whs1, whs2, incre, height, width;
  logic [7:0] idx_addr;
  logic [12:0] idx_rdata, mdl_addr;
  logic [15:0] q_rdata, p_rdata;
  logic [7:0] wi;
  logic [31:0] sumw;
  logic [15:0] center_new1, center_new2, ms;
  logic done, busy;
  logic [12:0] idx_mem [256];
  logic [15:0] q_mem [NBINS2];
  logic [15:0] p_mem [NBINS2];
  int checks = 0, failures = 0;

  ms2_center dut (.*);
  always #5 clk = ~clk;
  assign idx_rdata = idx_mem[idx_addr];
  assign q_rdata   = q_mem[mdl_addr];
  assign p_rdata   = p_mem[mdl_addr];

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int c1, input int c2, input int h1, input int h2, input int inc, input bit zero_q);
    int r0, r1, k0, k1, n, cyc, wv;
    real sw, sx, sy, cn1, cn2, m, ratio;
    for (int a = 0; a < 256; a++) idx_mem[a] = 13'($urandom_range(300, 273));
    for (int a = 0; a < NBINS2; a++) begin
      q_mem[a] = zero_q ? 16'd0 : 16'($urandom_range(20000));
      p_mem[a] = ($urandom_range(7) == 0) ? 16'd0 : 16'($urandom_range(20000, 1));
    end
    r0 = c1 - h1 - inc; r1 = c1 + h1 + inc; k0 = c2 - h2 - inc; k1 = c2 + h2 + inc;
    if (r0 < 1) r0 = 1; if (k0 < 1) k0 = 1; if (r1 > 16) r1 = 16; if (k1 > 16) k1 = 16;
    sw = 0; sx = 0; sy = 0; n = 0;
    for (int i = r0; i <= r1; i++)
      for (int j = k0; j <= k1; j++) begin
        int ix;
        ix = idx_mem[n];
        if (p_mem[ix] == 0) ratio = 0;
        else ratio = real'(q_mem[ix]) / real'(p_mem[ix]);
        if (ratio > 255.99) ratio = 255.99;
        wv = int'($floor(16.0 * $sqrt(ratio) + 1e-9));
        sw += wv; sx += i * wv; sy += j * wv;
        n++;
      end
    center1 = 8'(c1); center2 = 8'(c2); whs1 = 8'(h1); whs2 = 8'(h2); incre = 8'(inc);
    height = 8'd16; width = 8'd16;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 4;
    if (sw == 0) begin
      cn1 = c1 * 256.0; cn2 = c2 * 256.0;
      if (cyc != n + 3) begin failures++; $display("cycles %0d", cyc); end
    end else begin
      cn1 = sx / sw * 256.0; cn2 = sy / sw * 256.0;
      if (cyc != n + 38) begin failures++; $display("cycles %0d", cyc); end
    end
    // weights may differ by one LSB from the real-valued root
    if (real'(sumw) > sw || real'(sumw) < sw - n) begin failures++; $display("sumw %0d exp %f", sumw, sw); end
    if (real'(center_new1) > cn1 + 1.5 || real'(center_new1) < cn1 - 1.5) begin failures++; $display("cn1 %0d exp %f", center_new1, cn1); end
    if (real'(center_new2) > cn2 + 1.5 || real'(center_new2) < cn2 - 1.5) begin failures++; $display("cn2 %0d exp %f", center_new2, cn2); end
    m = $sqrt((real'(center_new1) - c1*256.0)**2 + (real'(center_new2) - c2*256.0)**2);
    checks++;
    if (real'(ms) > m + 0.01 || real'(ms) < m - 1.01) begin failures++; $display("ms %0d exp %f", ms, m); end
  endtask

  initial begin
    center1 = 0; center2 = 0; whs1 = 0; whs2 = 0; incre = 0; height = 0; width = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(8, 8, 3, 3, 2, 1'b0);
    run(5, 6, 2, 4, 1, 1'b0);
    run(2, 15, 3, 3, 1, 1'b0);
    run(8, 8, 7, 7, 0, 1'b0);
    run(8, 8, 2, 2, 0, 1'b1);       // no target colour present: stays put
    // equal models: all weights are exactly 1.0 (8'h10)
    for (int a = 0; a < NBINS2; a++) begin q_mem[a] = 16'd500; p_mem[a] = 16'd500; end
    center1 = 8'd8; center2 = 8'd8; whs1 = 8'd2; whs2 = 8'd2; incre = 8'd0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    #1;
    checks++;
    if (wi != 8'h10) begin failures++; $display("unit weight %h", wi); end
    while (!done) @(negedge clk);
    checks += 2;
    if (ms != 16'd0) begin failures++; $display("symmetric ms %0d", ms); end
    if (center_new1 != 16'h0800) begin failures++; $display("symmetric cn1 %h", center_new1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

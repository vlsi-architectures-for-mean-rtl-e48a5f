// tb_ms_similarity: drives the density read ports from tables held here
// and checks every weight against 16*sqrt(q/p) and f against
// sum(w*k)/(H*W), computed in real arithmetic, plus the H*W+2 latency
// and the worked weights 1.0 and 1.2247.
module tb_ms_similarity;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] h, w;
  logic [7:0] kin [16][16];
  logic [11:0] t2in [16][16];
  logic [11:0] rd_idx;
  logic [7:0] q_d, p_d;
  logic [7:0] wout [16][16];
  logic [15:0] f;
  logic done, busy;
  logic [7:0] qtab [4096];
  logic [7:0] ptab [4096];
  int checks = 0, failures = 0;

  ms_similarity dut (.*);
  always #5 clk = ~clk;
  assign q_d = qtab[rd_idx];
  assign p_d = ptab[rd_idx];

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int hh, input int ww);
    int cyc, we;
    real r, acc, fe;
    for (int a = 0; a < 4096; a++) begin
      qtab[a] = 8'($urandom_range(255));
      ptab[a] = ($urandom_range(9) == 0) ? 8'd0 : 8'($urandom_range(255, 1));
    end
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        t2in[i][j] = 12'($urandom_range(63));
        kin[i][j]  = 8'($urandom_range(128));
      end
    h = 8'(hh); w = 8'(ww);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != hh*ww + 2) begin failures++; $display("cycles %0d", cyc); end
    acc = 0;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        if (i < hh && j < ww) begin
          if (ptab[t2in[i][j]] == 0) r = 0;
          else r = real'(qtab[t2in[i][j]]) / real'(ptab[t2in[i][j]]);
          if (r > 255.99) r = 255.99;
          we = int'($floor(16.0 * $sqrt(r)));
          acc += real'(wout[i][j]) / 16.0 * real'(kin[i][j]) / 128.0;
        end else we = 0;
        checks++;
        if (int'(wout[i][j]) > we || int'(wout[i][j]) < we - 1) begin
          failures++;
          $display("w(%0d,%0d)=%0d exp %0d", i, j, wout[i][j], we);
        end
      end
    fe = acc / (hh*ww) * 256.0;
    checks++;
    if (real'(f) > fe + 0.01 || real'(f) < fe - 1.01) begin
      failures++;
      $display("f=%0d exp %f", f, fe);
    end
  endtask

  initial begin
    h = 0; w = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(16, 16);
    run(9, 13);
    // equal densities give weight 1.0 everywhere (8'h10)
    for (int a = 0; a < 4096; a++) begin qtab[a] = 8'd40; ptab[a] = 8'd40; end
    h = 8'd4; w = 8'd4;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (wout[2][3] != 8'h10) begin failures++; $display("unit weight %h", wout[2][3]); end
    // q/p = 1.5: sqrt = 1.2247, which Q4.4 holds as 8'b00010011 (1.1875)
    for (int a = 0; a < 4096; a++) begin qtab[a] = 8'd96; ptab[a] = 8'd64; end
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (wout[1][1] != 8'b00010011) begin failures++; $display("weight 1.2247 %b", wout[1][1]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

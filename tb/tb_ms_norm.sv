// tb_ms_norm: the published example (gx = -0.5, gy = 0 gives 0.5) and
// random vectors against floor(sqrt(gx^2 + gy^2)) in real arithmetic.
module tb_ms_norm;
  logic signed [7:0] gx, gy;
  logic [8:0] n;
  int checks = 0, failures = 0;
  int e;

  ms_norm dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gx = 8'hF8; gy = 8'h00; #1;
    checks++;
    if (n != 9'h008) begin failures++; $display("example n=%h", n); end
    for (int k = 0; k < 3000; k++) begin
      gx = 8'($urandom); gy = 8'($urandom);
      if (k == 0) begin gx = -128; gy = -128; end
      #1;
      e = int'($floor($sqrt(real'(int'(gx)*int'(gx) + int'(gy)*int'(gy))) + 1e-9));
      checks++;
      if (int'(n) != e) begin failures++; $display("n(%0d,%0d)=%0d exp %0d", gx, gy, n, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

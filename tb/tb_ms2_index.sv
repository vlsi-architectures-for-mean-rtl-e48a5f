// tb_ms2_index: exhaustive over the 16x16x16 channel bins (random low
// bits), checked against the bin formula, plus the published indices
// 2458, 2730 and 2731.
module tb_ms2_index;
  logic [7:0] r, g, b;
  logic [12:0] index;
  int checks = 0, failures = 0;

  ms2_index dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rb = 0; rb < 16; rb++)
      for (int gb = 0; gb < 16; gb++)
        for (int bb = 0; bb < 16; bb++) begin
          r = 8'(rb*16 + $urandom_range(15));
          g = 8'(gb*16 + $urandom_range(15));
          b = 8'(bb*16 + $urandom_range(15));
          #1;
          checks++;
          if (int'(index) != (rb+1)*256 + (gb+1)*16 + (bb+1)) begin
            failures++;
            $display("index(%0d,%0d,%0d)=%0d", r, g, b, index);
          end
        end
    r = 8'd130; g = 8'd140; b = 8'd150; #1;     // bins 8,8,9 -> 2458
    checks++; if (index != 13'd2458) failures++;
    r = 8'd150; g = 8'd150; b = 8'd150; #1;     // 2730
    checks++; if (index != 13'd2730) failures++;
    b = 8'd160; #1;                             // 2731
    checks++; if (index != 13'd2731) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

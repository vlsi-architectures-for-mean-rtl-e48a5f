// tb_sd_addsub_cell: all 6-bit operand pairs in both modes; sum and
// carry out compared with A + B and A + ~B + 1 computed here (the
// add-mode case reproduces the test circuit with the select tied).
module tb_sd_addsub_cell;
  logic [5:0] a, b, s;
  logic as_n, cout;
  int checks = 0, failures = 0;
  int e;
  sd_addsub_cell dut (.*);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int m = 0; m < 2; m++)
      for (int x = 0; x < 64; x++)
        for (int z = 0; z < 64; z++) begin
          a = 6'(x); b = 6'(z); as_n = m[0];
          #1;
          e = m ? x + (63 - z) + 1 : x + z;
          checks++;
          if ({cout, s} != 7'(e)) begin
            failures++;
            $display("%0d %s %0d -> %b %b", x, m ? "-" : "+", z, cout, s);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

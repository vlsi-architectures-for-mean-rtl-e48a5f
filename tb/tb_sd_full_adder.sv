// tb_sd_full_adder: all eight input combinations against a + b + cin.
module tb_sd_full_adder;
  logic a, b, cin, s, cout;
  int checks = 0, failures = 0;
  sd_full_adder dut (.*);
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if ({cout, s} != 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("fa %b -> %b%b", v[2:0], cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

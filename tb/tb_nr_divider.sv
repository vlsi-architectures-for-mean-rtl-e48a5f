// tb_nr_divider: random signed dividends and positive divisors against
// the language's own / and % (truncating division), and the WIDTH+2
// cycle latency, at the default 32-bit width.
module tb_nr_divider;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [31:0] dividend;
  logic [31:0] divisor;
  logic busy, done;
  logic signed [31:0] quotient, remainder;
  int checks = 0, failures = 0;

  nr_divider dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input longint x, input longint y);
    int cyc;
    longint eq, er;
    dividend = 32'(x); divisor = 32'(y);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    eq = x / y;
    er = x % y;
    checks += 3;
    if (cyc != 34) begin failures++; $display("cycles %0d", cyc); end
    if (longint'(quotient) != eq) begin failures++; $display("%0d/%0d q=%0d exp %0d", x, y, quotient, eq); end
    if (longint'(remainder) != er) begin failures++; $display("%0d/%0d r=%0d exp %0d", x, y, remainder, er); end
  endtask

  initial begin
    dividend = 0; divisor = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    one(-12, 15);
    one(7, 7);
    one(0, 5);
    one(2147483647, 1);
    one(-2147483647, 3);
    for (int k = 0; k < 300; k++) begin
      longint x, y;
      x = longint'($signed($urandom));
      y = longint'($urandom_range(32'h7fffffff, 1));
      if (k % 3 == 0) y = longint'($urandom_range(1000, 1));
      one(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

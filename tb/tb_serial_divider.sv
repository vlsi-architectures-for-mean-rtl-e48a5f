// tb_serial_divider: the worked example -12/15 (Q = 100110011, R = 3),
// the other published operand pairs 11/23 and 11/16, and every dividend
// with |X| < Y for every divisor 1..31, checked against the
// non-restoring recurrence run here in integer arithmetic and, where the
// remainder is not negative, against 2^8 * X = Q*Y + R.
module tb_serial_divider;
  logic [5:0] x, y;
  logic [8:0] q;
  logic [5:0] r;
  int checks = 0, failures = 0;

  serial_divider dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int xv, input int yv);
    int rr, eq, qs;
    logic [8:0] qe;
    x = 6'(xv); y = 6'(yv);
    #1;
    // recurrence: R(0) = X; R(k+1) = 2R(k) -/+ Y; bit k = (R(k) >= 0)
    rr = xv;
    qe[8] = (xv < 0);                 // first bit is the inverted Q(0)
    for (int k = 0; k < 8; k++) begin
      rr = (rr >= 0) ? 2*rr - yv : 2*rr + yv;
      qe[7-k] = (rr >= 0);
    end
    checks += 2;
    if (q != qe) begin failures++; $display("%0d/%0d q=%b exp %b", xv, yv, q, qe); end
    if ($signed(r) != rr) begin failures++; $display("%0d/%0d r=%0d exp %0d", xv, yv, $signed(r), rr); end
    if (rr >= 0) begin
      qs = int'($signed(q));
      checks++;
      if (256*xv != qs*yv + rr) begin failures++; $display("identity %0d/%0d", xv, yv); end
    end
  endtask

  initial begin
    x = 0; y = 1;
    one(-12, 15);
    checks += 2;
    if (q != 9'b100110011) failures++;
    if (r != 6'd3) failures++;
    one(11, 23);
    one(-12, 23);
    one(11, 16);
    for (int yv = 1; yv < 32; yv++)
      for (int xv = -yv + 1; xv < yv; xv++) one(xv, yv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

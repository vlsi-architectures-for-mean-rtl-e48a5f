// tb_ms_hue: streams random and hand-picked pixels (one per clock) and
// checks each hue, computed here in real arithmetic, two clocks later.
module tb_ms_hue;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [7:0] r, g, b;
  logic out_valid;
  logic signed [31:0] hue;
  int checks = 0, failures = 0;
  int exp_q [$];

  ms_hue dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_hue(input int rr, input int gg, input int bb);
    int mx, mn;
    mx = rr; if (gg > mx) mx = gg; if (bb > mx) mx = bb;
    mn = rr; if (gg < mn) mn = gg; if (bb < mn) mn = bb;
    if (mx == mn) return mx * 4096 + 80 * 65536;
    // Q16.16 of 16*diff/range, truncated toward zero
    if (rr == mx)      return int'(longint'((gg - bb)) * 1048576 / (mx - mn));
    else if (gg == mx) return int'(longint'((bb - rr)) * 1048576 / (mx - mn)) + 32*65536;
    else               return int'(longint'((rr - gg)) * 1048576 / (mx - mn)) + 64*65536;
  endfunction

  // checker: sampled between clock edges, two clocks after each input
  always @(negedge clk) begin
    if (out_valid) begin
      int e;
      e = exp_q.pop_front();
      checks++;
      if (hue != e) begin failures++; $display("hue %h exp %h", hue, e); end
    end
  end

  task automatic send(input int rr, input int gg, input int bb);
    @(negedge clk);
    r = 8'(rr); g = 8'(gg); b = 8'(bb); in_valid = 1;
    exp_q.push_back(ref_hue(rr, gg, bb));
  endtask

  initial begin
    r = 0; g = 0; b = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    send(16, 48, 16);      // green maximum, B = R: hue 32
    send(50, 50, 50);      // grey: 50/16 + 80
    send(200, 10, 90);     // red maximum, negative hue
    send(10, 20, 250);     // blue maximum
    for (int k = 0; k < 500; k++) send($urandom_range(255), $urandom_range(255), $urandom_range(255));
    @(negedge clk) in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

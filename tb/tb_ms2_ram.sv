// tb_ms2_ram: random writes and reads against a copy kept here; a write
// without we must not change the contents.
module tb_ms2_ram;
  logic clk = 0, we = 0;
  logic [12:0] addr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [4369];
  bit          valid [4369];
  int checks = 0, failures = 0;

  ms2_ram dut (.*);

  // a power-of-two depth, as used for the index RAM
  logic [7:0]  addr2;
  logic [12:0] wdata2, rdata2;
  logic        we2 = 0;
  ms2_ram #(.DEPTH(256), .DW(13)) dut2 (.clk, .we(we2), .addr(addr2), .wdata(wdata2), .rdata(rdata2));
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = 0; wdata = 0;
    for (int a = 0; a < 4369; a++) valid[a] = 0;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      addr  = 13'($urandom_range(4368));
      wdata = 16'($urandom);
      we    = ($urandom_range(2) != 0);
      if (we) begin model[addr] = wdata; valid[addr] = 1; end
      else if (valid[addr]) begin
        #1;
        checks++;
        if (rdata != model[addr]) begin failures++; $display("rd %0d=%h exp %h", addr, rdata, model[addr]); end
      end
    end
    @(negedge clk) we = 0;
    for (int a = 0; a < 4369; a++) if (valid[a]) begin
      addr = 13'(a); #1;
      checks++;
      if (rdata != model[a]) begin failures++; $display("final %0d", a); end
    end
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      we2 = 1; addr2 = 8'(a); wdata2 = 13'(a * 37);
    end
    @(negedge clk) we2 = 0;
    for (int a = 0; a < 256; a++) begin
      addr2 = 8'(a); #1;
      checks++;
      if (rdata2 != 13'(a * 37)) begin failures++; $display("depth-256 %0d=%h", a, rdata2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

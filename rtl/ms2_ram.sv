// ms2_ram: single-port RAM of Architecture II (target RAM, candidate
// RAM and index RAM).
//
// A write happens on the rising clock edge when we is high (the WE input
// of the RAM symbols); reads are asynchronous, so rdata follows addr in
// the same cycle. The document gives these memories' role and write
// enable only; the asynchronous read (distributed-RAM style) and the
// absence of reset are this design's choices. Contents start undefined:
// the model blocks clear what they later read.
module ms2_ram #(
  parameter int unsigned DEPTH = 4369,
  parameter int unsigned DW    = 16,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we && 32'(addr) < DEPTH) mem[addr] <= wdata;

  assign rdata = (32'(addr) < DEPTH) ? mem[addr] : '0;
endmodule

// ms2_index: colour-bin index of one RGB pixel (Architecture II).
//
//   index = (R/16 + 1)*256 + (G/16 + 1)*16 + (B/16 + 1)
// Each 8-bit channel is divided by 16 (its top four bits), incremented,
// and the three results weighted by 256, 16 and 1 and added, as in the
// index datapath (dividers by 16, adders of 1, multipliers by 256 and
// 16, final adder). The index spans 273..4368, so it is 13 bits wide and
// addresses a 4369-entry model memory. Purely combinational; the
// document's pixels are 8-bit R, G, B values.
module ms2_index (
  input  logic [7:0]  r,
  input  logic [7:0]  g,
  input  logic [7:0]  b,
  output logic [12:0] index
);
  logic [4:0] rb, gb, bb;
  always_comb begin
    rb    = {1'b0, r[7:4]} + 5'd1;
    gb    = {1'b0, g[7:4]} + 5'd1;
    bb    = {1'b0, b[7:4]} + 5'd1;
    index = 13'(rb) * 13'd256 + 13'(gb) * 13'd16 + 13'(bb);
  end
endmodule

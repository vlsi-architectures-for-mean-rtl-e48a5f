// ms_hue: pipelined RGB-to-hue colour space transformation.
//
// Per pixel: MAX(R,G,B) and MIN(R,G,B), then
//   MAX == MIN : H = MAX + 80
//   R == MAX   : H = 16*(G-B)/(MAX-MIN)          (block 1)
//   G == MAX   : H = 16*(B-R)/(MAX-MIN) + 32     (the block with the 32 adder)
//   B == MAX   : H = 16*(R-G)/(MAX-MIN) + 64     (block with the 64 adder)
// tested in that order, as the comparator chain does. The offsets 16,
// 32, 64 and 80 are the document's; red-dominant pixels may give a
// negative hue, as the document notes.
// The document also speaks of the maximum and minimum of each whole
// matrix; this design takes each pixel's own maximum and minimum, which
// is what the per-pixel comparisons of R, G and B against MAX need.
//
// Formats follow the document: R, G, B are 8-bit Q4.4, H is 32-bit
// signed Q16.16 (H = 32 reads 32'h0020_0000). The division is truncated
// toward zero.
//
// Pipeline: stage 1 registers MAX, MIN, MAX-MIN, the three differences
// and the branch select; stage 2 divides, scales, adds the offset and
// registers H. A pixel presented with in_valid appears on hue with
// out_valid two clocks later; one pixel can enter every clock. The
// document computes the hue pixel by pixel from R, G, B matrices held
// in memory; feeding it as a pixel stream and the two-stage split are
// this design's choices.
module ms_hue (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [7:0]         r,
  input  logic [7:0]         g,
  input  logic [7:0]         b,
  output logic               out_valid,
  output logic signed [31:0] hue
);

  typedef enum logic [1:0] {SEL_GREY, SEL_R, SEL_G, SEL_B} sel_t;

  // stage 1
  logic [7:0] mx, mn;
  sel_t       sel;
  logic       v1;
  logic [7:0] mx1, rng1;
  logic signed [8:0] dgb1, dbr1, drg1;
  sel_t       sel1;

  always_comb begin
    mx = (r >= g) ? ((r >= b) ? r : b) : ((g >= b) ? g : b);
    mn = (r <= g) ? ((r <= b) ? r : b) : ((g <= b) ? g : b);
    if (mx == mn)     sel = SEL_GREY;
    else if (r == mx) sel = SEL_R;
    else if (g == mx) sel = SEL_G;
    else              sel = SEL_B;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; mx1 <= '0; rng1 <= '0;
      dgb1 <= '0; dbr1 <= '0; drg1 <= '0; sel1 <= SEL_GREY;
    end else begin
      v1   <= in_valid;
      mx1  <= mx;
      rng1 <= mx - mn;
      dgb1 <= $signed({1'b0, g}) - $signed({1'b0, b});
      dbr1 <= $signed({1'b0, b}) - $signed({1'b0, r});
      drg1 <= $signed({1'b0, r}) - $signed({1'b0, g});
      sel1 <= sel;
    end
  end

  // stage 2
  logic signed [31:0] num, quo, h2;
  always_comb begin
    unique case (sel1)
      SEL_R:   num = 32'(dgb1);
      SEL_G:   num = 32'(dbr1);
      SEL_B:   num = 32'(drg1);
      default: num = '0;
    endcase
    // 16 * diff / range in Q16.16 = (diff << 20) / range
    quo = (rng1 == 0) ? 32'sd0 : (num <<< 20) / $signed({24'd0, rng1});
    unique case (sel1)
      SEL_GREY: h2 = ($signed({24'd0, mx1}) <<< 12) + (32'sd80 <<< 16);
      SEL_R:    h2 = quo;
      SEL_G:    h2 = quo + (32'sd32 <<< 16);
      default:  h2 = quo + (32'sd64 <<< 16);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      hue       <= '0;
    end else begin
      out_valid <= v1;
      if (v1) hue <= h2;
    end
  end

endmodule

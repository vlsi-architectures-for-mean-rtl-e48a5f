// ms_kernel: Epanechnikov kernel (Parzen window) for an H x W patch.
//
// For row i = 1..H and column j = 1..W the kernel is
//   k(i,j) = max(0, 1 - (2i/(R*H) - 1/R)^2 - (2j/(R*W) - 1/R)^2)
// computed as in the datapath of the kernel block: R*H (multiplier),
// 2i/(R*H) (divider), minus 1/R (subtractor), squared (multiplier), the
// row and column terms added, and the sum subtracted from 1. The
// arithmetic runs in 16-bit Q2.14; the result is written as an 8-bit
// unsigned Q1.7 value (most significant bit integer, seven fraction
// bits), the document's output format, so 1.0 is 8'h80 and 0.09375 is
// 8'h0C. Negative values are clipped to zero.
//
// Timing: start (one-cycle pulse) latches H, W and R; one element is
// produced per clock, row by row, and done pulses H*W+1 cycles after
// start. kout holds the whole matrix (entries outside H x W read 0).
// Element order, the per-clock rate, the Q2.14 internal format and the
// clipping are this design's choices; H and W above the matrix size are
// clipped to it; R is an integer (the document uses
// R = 1) and a zero R is treated as 1.
module ms_kernel
  import ms_pkg::*;
#(
  parameter int unsigned MH = MAXH,
  parameter int unsigned MW = MAXW
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] h,
  input  logic [7:0] w,
  input  logic [7:0] r,
  output logic [7:0] kout [MH][MW],
  output logic       done,
  output logic       busy
);

  localparam int F = 14;

  logic [7:0] h_q, w_q, r_q;
  logic [7:0] i_q, j_q;           // 1-based element position

  // Combinational element datapath.
  logic [15:0] rh, rw, inv_r, xi, xj;
  logic signed [17:0] dx, dy;
  logic [35:0] sqx, sqy;
  logic signed [19:0] kq;
  logic [7:0] kval;
  always_comb begin
    rh    = 16'(r_q) * 16'(h_q);
    rw    = 16'(r_q) * 16'(w_q);
    inv_r = 16'((32'd1 << F) / 32'(r_q));
    xi    = 16'((32'(i_q) << (F + 1)) / 32'(rh));
    xj    = 16'((32'(j_q) << (F + 1)) / 32'(rw));
    dx    = $signed({2'b00, xi}) - $signed({2'b00, inv_r});
    dy    = $signed({2'b00, xj}) - $signed({2'b00, inv_r});
    sqx   = 36'($unsigned(36'(dx) * 36'(dx))) >> F;
    sqy   = 36'($unsigned(36'(dy) * 36'(dy))) >> F;
    if (sqx + sqy >= 36'(1 << F)) kq = '0;
    else                          kq = 20'((1 << F) - 32'(sqx + sqy));
    kval  = 8'(kq >>> (F - 7));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_q  <= '0; w_q <= '0; r_q <= 8'd1;
      i_q  <= 8'd1; j_q <= 8'd1;
      busy <= 1'b0;
      done <= 1'b0;
      for (int a = 0; a < MH; a++)
        for (int b = 0; b < MW; b++) kout[a][b] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        h_q  <= (h > 8'(MH)) ? 8'(MH) : h;
        w_q  <= (w > 8'(MW)) ? 8'(MW) : w;
        r_q  <= (r == 0) ? 8'd1 : r;
        i_q  <= 8'd1; j_q <= 8'd1;
        busy <= (h != 0) && (w != 0);
        done <= (h == 0) || (w == 0);
        for (int a = 0; a < MH; a++)
          for (int b = 0; b < MW; b++) kout[a][b] <= '0;
      end else if (busy) begin
        kout[i_q-1][j_q-1] <= kval;
        if (j_q == w_q) begin
          j_q <= 8'd1;
          if (i_q == h_q) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else i_q <= i_q + 1'b1;
        end else j_q <= j_q + 1'b1;
      end
    end
  end

endmodule

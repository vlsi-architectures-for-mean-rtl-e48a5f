// ms_gradient: numerical gradient of a matrix along one direction
// (GRADX when DIR = 0, GRADY when DIR = 1).
//
// Interior points take the central difference (a[p+1] - a[p-1]) / 2; the
// first and last points take the one-sided difference with their
// neighbour, a[2]-a[1] and a[N]-a[N-1]. With DIR = 0 the difference runs
// along the row index i (gradient in x), with DIR = 1 along the column
// index j (gradient in y), which is how the document assigns x and y.
// Input and output share the same signed fixed-point format (the
// document uses 8 bits, four fraction bits); results that do not fit
// saturate, and halving rounds toward minus infinity.
//
// Timing: start latches H and W; one element per clock; done pulses
// H*W+1 cycles after start and g holds the gradient matrix. The
// per-clock schedule and saturation are this design's choices.
module ms_gradient
  import ms_pkg::*;
#(
  parameter int unsigned MH  = MAXH,
  parameter int unsigned MW  = MAXW,
  parameter int unsigned DW  = 8,
  parameter bit          DIR = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [7:0]           h,
  input  logic [7:0]           w,
  input  logic signed [DW-1:0] a [MH][MW],
  output logic signed [DW-1:0] g [MH][MW],
  output logic                 done,
  output logic                 busy
);

  logic [7:0] h_q, w_q, i_q, j_q;
  logic [7:0] pos, len;
  logic signed [DW-1:0] prv, cur, nxt;
  logic signed [DW+1:0] diff;
  logic signed [DW-1:0] gval;

  localparam logic signed [DW+1:0] MAXV = (DW+2)'((1 << (DW-1)) - 1);
  localparam logic signed [DW+1:0] MINV = -(DW+2)'(1 << (DW-1));

  always_comb begin
    pos = DIR ? j_q : i_q;
    len = DIR ? w_q : h_q;
    cur = a[i_q][j_q];
    // neighbours along the chosen direction (clamped at the edges)
    if (DIR) begin
      prv = (j_q == 0)       ? a[i_q][j_q] : a[i_q][j_q-1];
      nxt = (j_q == w_q - 1) ? a[i_q][j_q] : a[i_q][j_q+1];
    end else begin
      prv = (i_q == 0)       ? a[i_q][j_q] : a[i_q-1][j_q];
      nxt = (i_q == h_q - 1) ? a[i_q][j_q] : a[i_q+1][j_q];
    end
    if (len <= 1)                              diff = '0;
    else if (pos == 0 || pos == len - 1)       diff = (DW+2)'(nxt) - (DW+2)'(prv);
    else                                       diff = ((DW+2)'(nxt) - (DW+2)'(prv)) >>> 1;
    if (diff > MAXV)      gval = DW'(MAXV);
    else if (diff < MINV) gval = DW'(MINV);
    else                  gval = DW'(diff);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_q <= '0; w_q <= '0; i_q <= '0; j_q <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      for (int x = 0; x < MH; x++)
        for (int y = 0; y < MW; y++) g[x][y] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        h_q  <= (h > 8'(MH)) ? 8'(MH) : h;
        w_q  <= (w > 8'(MW)) ? 8'(MW) : w;
        i_q  <= '0; j_q <= '0;
        busy <= (h != 0) && (w != 0);
        done <= (h == 0) || (w == 0);
        for (int x = 0; x < MH; x++)
          for (int y = 0; y < MW; y++) g[x][y] <= '0;
      end else if (busy) begin
        g[i_q][j_q] <= gval;
        if (j_q == w_q - 1) begin
          j_q <= '0;
          if (i_q == h_q - 1) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else i_q <= i_q + 1'b1;
        end else j_q <= j_q + 1'b1;
      end
    end
  end

endmodule

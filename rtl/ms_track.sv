// ms_track: mean-shift step of Architecture I (MS-TRACKING datapath).
//
// Walking over the H x W patch, one element per clock, it accumulates
//   numx = sum(i * w(i,j) * gx(i,j))
//   numy = sum(j * w(i,j) * gy(i,j))
//   den  = sum(w(i,j) * sqrt(gx^2 + gy^2))          (NORM block)
// with w the SIM-FUN weights (8-bit Q4.4) and gx, gy the kernel
// gradients (signed DW bits with GF fraction bits). Two sequential
// non-restoring dividers then run side by side, started by start1 and
// start2 internally: dx = numx/den and dy = numy/den. The shift is added
// to the running position: x += round(dx), y += round(dy).
//
// numx, numy, den, dx and dy are 32-bit signed Q16.16, the document's
// output format. If den is 0 no shift is made (dx = dy = 0). rema1 and
// rema2 are the dividers' remainders; done1/done2 their done pulses.
//
// Timing: start latches H, W and the current position; H*W clocks of
// accumulation, two clocks to issue the start pulses, 50 clocks of
// division (48-bit divider), one clock to update x, y: done pulses
// H*W+54 cycles after start (H*W+3 when den is 0). Rounding of the
// shift, the handling of den = 0 and the accumulator widths are this
// design's choices. numx, numy and den overflow Q16.16 beyond +/-32768,
// far above what a 16x16 patch of unit-range weights produces.
module ms_track
  import ms_pkg::*;
#(
  parameter int unsigned MH = MAXH,
  parameter int unsigned MW = MAXW,
  parameter int unsigned DW = 8,
  parameter int unsigned GF = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [7:0]           h,
  input  logic [7:0]           w,
  input  logic [7:0]           wt [MH][MW],
  input  logic signed [DW-1:0] gx [MH][MW],
  input  logic signed [DW-1:0] gy [MH][MW],
  input  logic signed [15:0]   x_in,
  input  logic signed [15:0]   y_in,
  output logic signed [31:0]   numx,
  output logic signed [31:0]   numy,
  output logic signed [31:0]   den,
  output logic signed [31:0]   dx,
  output logic signed [31:0]   dy,
  output logic signed [15:0]   x,
  output logic signed [15:0]   y,
  output logic signed [47:0]   rema1,
  output logic signed [47:0]   rema2,
  output logic                 done1,
  output logic                 done2,
  output logic                 done,
  output logic                 busy
);

  // fraction bits of the products w*g and w*n
  localparam int unsigned FA = 4 + GF;

  typedef enum logic [2:0] {S_IDLE, S_ACC, S_START, S_WAIT, S_UPD} state_t;
  state_t state;

  logic [7:0] h_q, w_q, i_q, j_q;
  logic signed [47:0] ax, ay, ad;      // accumulators, FA fraction bits
  logic signed [47:0] ex, ey, en;      // current terms
  logic        [DW:0] n1;              // NORM output
  logic               start1, start2, busy1, busy2;
  logic signed [47:0] q1, q2;
  logic               got1, got2;

  ms_norm #(.DW(DW)) u_norm (.gx(gx[i_q][j_q]), .gy(gy[i_q][j_q]), .n(n1));

  always_comb begin
    logic signed [47:0] wt_s, gx_s, gy_s, n_s;
    wt_s = 48'($unsigned(wt[i_q][j_q]));
    gx_s = 48'(gx[i_q][j_q]);
    gy_s = 48'(gy[i_q][j_q]);
    n_s  = 48'($unsigned(n1));
    ex   = 48'(i_q + 1) * wt_s * gx_s;  // WTGX multiplier, then I-WTGX
    ey   = 48'(j_q + 1) * wt_s * gy_s;  // WTGY multiplier, then J-WTGY
    en   = wt_s * n_s;                  // WTN1 multiplier
  end

  // Q16.16 views of the accumulators
  function automatic logic signed [47:0] to_q16(input logic signed [47:0] v);
    if (FA <= 16) return v <<< (16 - FA);
    else          return v >>> (FA - 16);
  endfunction

  assign numx = 32'(to_q16(ax));
  assign numy = 32'(to_q16(ay));
  assign den  = 32'(to_q16(ad));

  // DIVIDER blocks (START1/DONE1/REMA1 and START2/DONE2/REMA2)
  nr_divider #(.WIDTH(48)) u_div1 (
    .clk, .rst_n, .start(start1),
    .dividend(48'(numx) <<< 16), .divisor(48'($unsigned(den))),
    .busy(busy1), .done(done1), .quotient(q1), .remainder(rema1));
  nr_divider #(.WIDTH(48)) u_div2 (
    .clk, .rst_n, .start(start2),
    .dividend(48'(numy) <<< 16), .divisor(48'($unsigned(den))),
    .busy(busy2), .done(done2), .quotient(q2), .remainder(rema2));

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      h_q <= '0; w_q <= '0; i_q <= '0; j_q <= '0;
      ax <= '0; ay <= '0; ad <= '0;
      dx <= '0; dy <= '0;
      x  <= '0; y  <= '0;
      start1 <= 1'b0; start2 <= 1'b0;
      got1 <= 1'b0; got2 <= 1'b0;
      done <= 1'b0;
    end else begin
      done   <= 1'b0;
      start1 <= 1'b0;
      start2 <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          h_q <= (h > 8'(MH)) ? 8'(MH) : h;
          w_q <= (w > 8'(MW)) ? 8'(MW) : w;
          i_q <= '0; j_q <= '0;
          ax <= '0; ay <= '0; ad <= '0;
          x <= x_in; y <= y_in;
          state <= (h == 0 || w == 0) ? S_START : S_ACC;
        end
        S_ACC: begin
          ax <= ax + ex;
          ay <= ay + ey;
          ad <= ad + en;
          if (j_q == w_q - 1) begin
            j_q <= '0;
            if (i_q == h_q - 1) state <= S_START;
            else i_q <= i_q + 1'b1;
          end else j_q <= j_q + 1'b1;
        end
        S_START: begin
          got1 <= 1'b0; got2 <= 1'b0;
          if (den == 0) begin
            dx <= '0; dy <= '0;
            state <= S_UPD;
          end else begin
            start1 <= 1'b1;
            start2 <= 1'b1;
            state  <= S_WAIT;
          end
        end
        S_WAIT: begin
          if (done1) begin dx <= 32'(q1); got1 <= 1'b1; end
          if (done2) begin dy <= 32'(q2); got2 <= 1'b1; end
          if ((got1 || done1) && (got2 || done2)) state <= S_UPD;
        end
        S_UPD: begin
          x <= x + 16'((dx + 32'sh8000) >>> 16);   // DXOUT adder
          y <= y + 16'((dy + 32'sh8000) >>> 16);   // DYOUT adder
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

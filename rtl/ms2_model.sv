// ms2_model: target / candidate model determination (Architecture II).
//
// Builds the kernel-weighted colour histogram of a window of one frame
// and writes it, normalised, into a model RAM. The window is
//   rows    centre1 - (whs1 + incre) .. centre1 + (whs1 + incre)
//   columns centre2 - (whs2 + incre) .. centre2 + (whs2 + incre)
// (incre = 0 for the target model, the window increase for the
// candidate), clipped to the frame (rows 1..height, columns 1..width).
// Each pixel's weight comes from the kernel datapath:
//   wmax = (rmin - centre1)^2 + (cmin - centre2)^2 + 1
//   d    = (i - centre1)^2 + (j - centre2)^2
//   w    = wmax - d
// with rmin, cmin the unclipped window corner, so every pixel in the
// window has w >= 1. The pixel's bin (ms2_index) accumulates w.
//
// Passes after a start pulse, one step per clock:
//   CLR  all NBINS histogram entries and model-RAM words set to 0;
//   ACC  walk the window: read the pixel, write its index to the index
//        RAM (address = pixel number), add w to its bin and to the sum;
//   NRM  walk the window again: model RAM[index] = hist*65536/sum,
//        a 16-bit pure fraction (0.9375 = 16'hF000), saturating at
//        16'hFFFF.
// done pulses NBINS + 2*npix + 1 cycles after start. The pixel port
// (pix_row, pix_col -> pix_rgb) must answer combinationally.
// The three passes, the clear of the whole RAM, the clipping and the
// saturation are this design's choices.
module ms2_model
  import ms_pkg::*;
#(
  parameter int unsigned MH    = MAXH,
  parameter int unsigned MW    = MAXW,
  parameter int unsigned NBINS = NBINS2,
  parameter int unsigned IW    = $clog2(MH*MW)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [7:0]    center1,
  input  logic [7:0]    center2,
  input  logic [7:0]    whs1,
  input  logic [7:0]    whs2,
  input  logic [7:0]    incre,
  input  logic [7:0]    height,
  input  logic [7:0]    width,
  // frame read port (1-based row/column)
  output logic [7:0]    pix_row,
  output logic [7:0]    pix_col,
  input  logic [23:0]   pix_rgb,
  // index RAM write port
  output logic          idx_we,
  output logic [IW-1:0] idx_addr,
  output logic [12:0]   idx_wdata,
  // model RAM write port
  output logic          mdl_we,
  output logic [12:0]   mdl_addr,
  output logic [15:0]   mdl_wdata,
  output logic [15:0]   npix,
  output logic [31:0]   sumw,
  output logic          done,
  output logic          busy
);

  typedef enum logic [1:0] {S_IDLE, S_CLR, S_ACC, S_NRM} state_t;
  state_t state;

  logic [31:0] hist [NBINS];
  logic [12:0] a_q;
  win_t        win;
  logic [7:0]  c1_q, c2_q, i_q, j_q;
  logic [31:0] wmax_q;
  logic [12:0] idx;
  logic [31:0] wk;
  logic [47:0] qn;
  logic        last_pix;

  ms2_index u_index (.r(pix_rgb[23:16]), .g(pix_rgb[15:8]), .b(pix_rgb[7:0]), .index(idx));

  assign pix_row  = i_q;
  assign pix_col  = j_q;
  assign last_pix = (i_q == win.rmax) && (j_q == win.cmax);
  assign busy     = (state != S_IDLE);

  always_comb begin
    int di, dj;
    di = int'(i_q) - int'(c1_q);
    dj = int'(j_q) - int'(c2_q);
    wk = wmax_q - 32'(di*di + dj*dj);
    qn = (sumw == 0) ? 48'd0 : ({hist[idx], 16'd0} / {16'd0, sumw});
  end

  always_comb begin
    idx_we    = (state == S_ACC);
    idx_addr  = IW'(npix);
    idx_wdata = idx;
    mdl_we    = (state == S_CLR) || (state == S_NRM);
    mdl_addr  = (state == S_CLR) ? a_q : idx;
    mdl_wdata = (state == S_CLR) ? 16'd0 : ((qn > 48'hFFFF) ? 16'hFFFF : qn[15:0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      a_q    <= '0;
      win    <= '0;
      c1_q   <= '0; c2_q <= '0; i_q <= '0; j_q <= '0;
      wmax_q <= '0;
      npix   <= '0;
      sumw   <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          int dr, dc;
          win    <= win_bounds(center1, center2, whs1, whs2, incre, height, width);
          c1_q   <= center1;
          c2_q   <= center2;
          dr     = int'(whs1) + int'(incre);   // rmin - centre1 = -(whs1+incre)
          dc     = int'(whs2) + int'(incre);
          wmax_q <= 32'(dr*dr + dc*dc + 1);
          a_q    <= '0;
          npix   <= '0;
          sumw   <= '0;
          state  <= S_CLR;
        end
        S_CLR: begin
          hist[a_q] <= '0;
          a_q       <= a_q + 1'b1;
          if (a_q == 13'(NBINS - 1)) begin
            i_q <= win.rmin;
            j_q <= win.cmin;
            if (win.rmin > win.rmax || win.cmin > win.cmax) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else state <= S_ACC;
          end
        end
        S_ACC: begin
          hist[idx] <= hist[idx] + wk;
          sumw      <= sumw + wk;
          npix      <= npix + 1'b1;
          if (j_q == win.cmax) begin
            j_q <= win.cmin;
            i_q <= i_q + 1'b1;
          end else j_q <= j_q + 1'b1;
          if (last_pix) begin
            i_q   <= win.rmin;
            j_q   <= win.cmin;
            state <= S_NRM;
          end
        end
        S_NRM: begin
          if (j_q == win.cmax) begin
            j_q <= win.cmin;
            i_q <= i_q + 1'b1;
          end else j_q <= j_q + 1'b1;
          if (last_pix) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

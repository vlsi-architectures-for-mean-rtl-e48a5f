// ms2_center: weights, new centre and mean-shift vector (Architecture II).
//
// Walks the candidate window (same bounds as the candidate model: centre
// +/- (half size + incre), clipped to the frame). For pixel number n at
// row i, column j it reads the pixel's colour index from the index RAM,
// the target model qu and the candidate model pu of that colour, and
// forms the weight
//   wi = sqrt(qu / pu)                         (divider, square root)
// as an 8-bit Q4.4 value (1.0 = 8'h10, the document's format): the ratio
// is taken in Q8.8, whose integer square root is Q4.4. pu = 0 gives
// wi = 0 and the ratio saturates at 255.996. It accumulates
//   sum(wi), sum(i*wi), sum(j*wi)
// and then, with two sequential dividers working side by side,
//   center_new1 = sum(i*wi) / sum(wi),  center_new2 = sum(j*wi) / sum(wi)
// as 16-bit Q8.8 values (5.6892 reads 16'h05B0 within rounding), and
//   ms = sqrt((center_new1 - centre1)^2 + (center_new2 - centre2)^2)
// in Q8.8. With sum(wi) = 0 the centre stays where it is and ms = 0.
//
// Timing: counting the clock edge that samples start as cycle 1, done is
// seen after npix + 38 edges (npix pixel clocks, divider start, 34 clocks
// of division, ms and the done register); with sum(wi) = 0 after npix + 3. The RAM read ports (idx_addr ->
// idx_rdata, mdl_addr -> q_rdata/p_rdata) must answer combinationally.
// Fixed-point formats of the sums and the pu = 0 rule are this design's
// choices.
module ms2_center
  import ms_pkg::*;
#(
  parameter int unsigned MH = MAXH,
  parameter int unsigned MW = MAXW,
  parameter int unsigned IW = $clog2(MH*MW)
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
  output logic [IW-1:0] idx_addr,
  input  logic [12:0]   idx_rdata,
  output logic [12:0]   mdl_addr,
  input  logic [15:0]   q_rdata,
  input  logic [15:0]   p_rdata,
  output logic [7:0]    wi,
  output logic [31:0]   sumw,
  output logic [15:0]   center_new1,
  output logic [15:0]   center_new2,
  output logic [15:0]   ms,
  output logic          done,
  output logic          busy
);

  typedef enum logic [2:0] {S_IDLE, S_RUN, S_START, S_WAIT, S_MS} state_t;
  state_t state;

  win_t        win;
  logic [7:0]  c1_q, c2_q, i_q, j_q;
  logic [15:0] n_q;
  logic [31:0] sx, sy;
  logic [23:0] ratio;
  logic        st_div, dn1, dn2, bz1, bz2, got1, got2;
  logic signed [31:0] q1, q2, r1, r2;

  assign idx_addr = IW'(n_q);
  assign mdl_addr = idx_rdata;
  assign busy     = (state != S_IDLE);

  always_comb begin
    ratio = (p_rdata == 0) ? 24'd0 : ({q_rdata, 8'd0} / {8'd0, p_rdata});
    if (ratio > 24'hFFFF) ratio = 24'hFFFF;
    wi = 8'(isqrt({8'd0, ratio}));
  end

  // centre dividers
  nr_divider #(.WIDTH(32)) u_div1 (
    .clk, .rst_n, .start(st_div), .dividend($signed(sx << 8)), .divisor(sumw),
    .busy(bz1), .done(dn1), .quotient(q1), .remainder(r1));
  nr_divider #(.WIDTH(32)) u_div2 (
    .clk, .rst_n, .start(st_div), .dividend($signed(sy << 8)), .divisor(sumw),
    .busy(bz2), .done(dn2), .quotient(q2), .remainder(r2));

  logic signed [31:0] e1, e2;
  logic        [31:0] msq;
  always_comb begin
    e1  = $signed({16'd0, center_new1}) - $signed({16'd0, c1_q, 8'd0});
    e2  = $signed({16'd0, center_new2}) - $signed({16'd0, c2_q, 8'd0});
    msq = 32'(e1 * e1) + 32'(e2 * e2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      win <= '0;
      c1_q <= '0; c2_q <= '0; i_q <= '0; j_q <= '0; n_q <= '0;
      sumw <= '0; sx <= '0; sy <= '0;
      center_new1 <= '0; center_new2 <= '0; ms <= '0;
      st_div <= 1'b0; got1 <= 1'b0; got2 <= 1'b0;
      done <= 1'b0;
    end else begin
      done   <= 1'b0;
      st_div <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          win_t wb;
          wb    = win_bounds(center1, center2, whs1, whs2, incre, height, width);
          win   <= wb;
          c1_q  <= center1; c2_q <= center2;
          i_q   <= wb.rmin; j_q <= wb.cmin;
          n_q   <= '0;
          sumw  <= '0; sx <= '0; sy <= '0;
          state <= (wb.rmin > wb.rmax || wb.cmin > wb.cmax) ? S_START : S_RUN;
        end
        S_RUN: begin
          sumw <= sumw + 32'(wi);
          sx   <= sx + 32'(i_q) * 32'(wi);
          sy   <= sy + 32'(j_q) * 32'(wi);
          n_q  <= n_q + 1'b1;
          if (j_q == win.cmax) begin
            j_q <= win.cmin;
            if (i_q == win.rmax) state <= S_START;
            else i_q <= i_q + 1'b1;
          end else j_q <= j_q + 1'b1;
        end
        S_START: begin
          got1 <= 1'b0; got2 <= 1'b0;
          if (sumw == 0) begin
            center_new1 <= {c1_q, 8'd0};
            center_new2 <= {c2_q, 8'd0};
            state <= S_MS;
          end else begin
            st_div <= 1'b1;
            state  <= S_WAIT;
          end
        end
        S_WAIT: begin
          if (dn1) begin center_new1 <= 16'(q1); got1 <= 1'b1; end
          if (dn2) begin center_new2 <= 16'(q2); got2 <= 1'b1; end
          if ((got1 || dn1) && (got2 || dn2)) state <= S_MS;
        end
        S_MS: begin
          ms    <= 16'(isqrt(msq));
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

// ms2_system: Architecture II mean-shift tracker.
//
// Two RGB frames (frame 1 holds the target, frame 2 is searched) are
// written through the load port. A start pulse then runs:
//   1. Target model determination on frame 1 around (center1, center2)
//      with the window half sizes whs1, whs2 -> target RAM (qu).
//   2. Candidate model determination on frame 2 around the current
//      centre, window enlarged by incre -> candidate RAM (pu); the
//      pixels' colour indices go to the index RAM.
//   3. Weights sqrt(qu/pu), new centre and mean-shift vector ms.
//   4. If ms < eps or the iteration count reaches max_iter the run ends
//      (done pulse, converged tells which); otherwise the centre moves
//      to the rounded new centre and step 2 repeats.
// Frame rows and columns are numbered from 1 (height x width, at most
// MH x MW); the load port uses 0-based ld_row/ld_col and 24-bit
// {R,G,B} pixels. Formats: qu, pu 16-bit fractions; centre_new1/2 and
// ms Q8.8; eps Q8.8 (the document's default threshold 0.1 is 16'd26).
//
// Timing (clock edges from the one that samples start to the one that
// raises done): 2 + (4369 + 2*Nt + 1) for the target pass plus, per
// iteration, (4369 + 2*Nc + 1) + (Nc + 38) + 2, where Nt and Nc are the
// pixel counts of the target and candidate windows (Nc + 3 instead of
// Nc + 38 when no candidate pixel has a weight). Frame buffers,
// load port, RAM multiplexing and the converged flag are this design's
// choices; max_iter = 0 is treated as 1.
module ms2_system
  import ms_pkg::*;
#(
  parameter int unsigned MH    = MAXH,
  parameter int unsigned MW    = MAXW,
  parameter int unsigned NBINS = NBINS2
) (
  input  logic        clk,
  input  logic        rst_n,
  // frame load port
  input  logic        ld_we,
  input  logic        ld_frame,     // 0: frame 1 (target), 1: frame 2
  input  logic [7:0]  ld_row,
  input  logic [7:0]  ld_col,
  input  logic [23:0] ld_rgb,
  // run control
  input  logic        start,
  input  logic [7:0]  center1,
  input  logic [7:0]  center2,
  input  logic [7:0]  whs1,
  input  logic [7:0]  whs2,
  input  logic [7:0]  incre,
  input  logic [7:0]  height,
  input  logic [7:0]  width,
  input  logic [15:0] eps,
  input  logic [7:0]  max_iter,
  // results
  output logic [15:0] center_new1,
  output logic [15:0] center_new2,
  output logic [15:0] ms,
  output logic [7:0]  c1_out,
  output logic [7:0]  c2_out,
  output logic [7:0]  iter,
  output logic        converged,
  output logic        busy,
  output logic        done
);

  localparam int unsigned IW = $clog2(MH*MW);

  typedef enum logic [2:0] {S_IDLE, S_TGT, S_CAND, S_CTR} state_t;
  state_t state;

  logic [23:0] frame1 [MH][MW];
  logic [23:0] frame2 [MH][MW];

  always_ff @(posedge clk) begin
    if (ld_we && !busy && ld_row < 8'(MH) && ld_col < 8'(MW)) begin
      if (ld_frame) frame2[ld_row][ld_col] <= ld_rgb;
      else          frame1[ld_row][ld_col] <= ld_rgb;
    end
  end

  // latched run parameters
  logic [7:0]  c1_q, c2_q, whs1_q, whs2_q, incre_q, height_q, width_q, maxit_q;
  logic [15:0] eps_q;

  // block handshakes
  logic st_t, st_c, st_m;
  logic dn_t, dn_c, dn_m, bz_t, bz_c, bz_m;

  // target model unit
  logic [7:0]    t_row, t_col;
  logic [23:0]   t_rgb;
  logic          t_idx_we, t_mdl_we;
  logic [IW-1:0] t_idx_addr;
  logic [12:0]   t_idx_wdata, t_mdl_addr;
  logic [15:0]   t_mdl_wdata, t_npix;
  logic [31:0]   t_sumw;

  // candidate model unit
  logic [7:0]    c_row, c_col;
  logic [23:0]   c_rgb;
  logic          c_idx_we, c_mdl_we;
  logic [IW-1:0] c_idx_addr;
  logic [12:0]   c_idx_wdata, c_mdl_addr;
  logic [15:0]   c_mdl_wdata, c_npix;
  logic [31:0]   c_sumw;

  // centre unit
  logic [IW-1:0] m_idx_addr;
  logic [12:0]   m_mdl_addr;
  logic [7:0]    m_wi;
  logic [31:0]   m_sumw;

  // RAM ports
  logic          ix_we, tr_we, cr_we;
  logic [IW-1:0] ix_addr;
  logic [12:0]   ix_wdata, ix_rdata, tr_addr, cr_addr;
  logic [15:0]   tr_wdata, tr_rdata, cr_wdata, cr_rdata;

  assign t_rgb = frame1[(t_row - 8'd1) % MH][(t_col - 8'd1) % MW];
  assign c_rgb = frame2[(c_row - 8'd1) % MH][(c_col - 8'd1) % MW];

  ms2_model #(.MH(MH), .MW(MW), .NBINS(NBINS)) u_target (
    .clk, .rst_n, .start(st_t), .center1(c1_q), .center2(c2_q),
    .whs1(whs1_q), .whs2(whs2_q), .incre(8'd0), .height(height_q), .width(width_q),
    .pix_row(t_row), .pix_col(t_col), .pix_rgb(t_rgb),
    .idx_we(t_idx_we), .idx_addr(t_idx_addr), .idx_wdata(t_idx_wdata),
    .mdl_we(t_mdl_we), .mdl_addr(t_mdl_addr), .mdl_wdata(t_mdl_wdata),
    .npix(t_npix), .sumw(t_sumw), .done(dn_t), .busy(bz_t));

  ms2_model #(.MH(MH), .MW(MW), .NBINS(NBINS)) u_candidate (
    .clk, .rst_n, .start(st_c), .center1(c1_out), .center2(c2_out),
    .whs1(whs1_q), .whs2(whs2_q), .incre(incre_q), .height(height_q), .width(width_q),
    .pix_row(c_row), .pix_col(c_col), .pix_rgb(c_rgb),
    .idx_we(c_idx_we), .idx_addr(c_idx_addr), .idx_wdata(c_idx_wdata),
    .mdl_we(c_mdl_we), .mdl_addr(c_mdl_addr), .mdl_wdata(c_mdl_wdata),
    .npix(c_npix), .sumw(c_sumw), .done(dn_c), .busy(bz_c));

  ms2_center #(.MH(MH), .MW(MW)) u_center (
    .clk, .rst_n, .start(st_m), .center1(c1_out), .center2(c2_out),
    .whs1(whs1_q), .whs2(whs2_q), .incre(incre_q), .height(height_q), .width(width_q),
    .idx_addr(m_idx_addr), .idx_rdata(ix_rdata),
    .mdl_addr(m_mdl_addr), .q_rdata(tr_rdata), .p_rdata(cr_rdata),
    .wi(m_wi), .sumw(m_sumw), .center_new1, .center_new2, .ms,
    .done(dn_m), .busy(bz_m));

  // index RAM: written by the model units, read by the centre unit
  always_comb begin
    ix_we    = t_idx_we | c_idx_we;
    ix_addr  = bz_t ? t_idx_addr  : (bz_c ? c_idx_addr  : m_idx_addr);
    ix_wdata = bz_t ? t_idx_wdata : c_idx_wdata;
    tr_we    = t_mdl_we;
    tr_addr  = bz_t ? t_mdl_addr : m_mdl_addr;
    tr_wdata = t_mdl_wdata;
    cr_we    = c_mdl_we;
    cr_addr  = bz_c ? c_mdl_addr : m_mdl_addr;
    cr_wdata = c_mdl_wdata;
  end

  ms2_ram #(.DEPTH(MH*MW), .DW(13)) u_index_ram (
    .clk, .we(ix_we), .addr(ix_addr), .wdata(ix_wdata), .rdata(ix_rdata));
  ms2_ram #(.DEPTH(NBINS), .DW(16)) u_target_ram (
    .clk, .we(tr_we), .addr(tr_addr), .wdata(tr_wdata), .rdata(tr_rdata));
  ms2_ram #(.DEPTH(NBINS), .DW(16)) u_candidate_ram (
    .clk, .we(cr_we), .addr(cr_addr), .wdata(cr_wdata), .rdata(cr_rdata));

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      c1_q <= '0; c2_q <= '0; whs1_q <= '0; whs2_q <= '0; incre_q <= '0;
      height_q <= '0; width_q <= '0; maxit_q <= 8'd1; eps_q <= '0;
      c1_out <= '0; c2_out <= '0;
      iter <= '0;
      converged <= 1'b0;
      st_t <= 1'b0; st_c <= 1'b0; st_m <= 1'b0;
      done <= 1'b0;
    end else begin
      st_t <= 1'b0; st_c <= 1'b0; st_m <= 1'b0;
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          c1_q <= center1; c2_q <= center2;
          c1_out <= center1; c2_out <= center2;
          whs1_q <= whs1; whs2_q <= whs2; incre_q <= incre;
          height_q <= (height > 8'(MH)) ? 8'(MH) : height;
          width_q  <= (width  > 8'(MW)) ? 8'(MW) : width;
          maxit_q  <= (max_iter == 0) ? 8'd1 : max_iter;
          eps_q    <= eps;
          iter     <= '0;
          converged <= 1'b0;
          st_t  <= 1'b1;
          state <= S_TGT;
        end
        S_TGT: if (dn_t) begin
          st_c  <= 1'b1;
          state <= S_CAND;
        end
        S_CAND: if (dn_c) begin
          st_m  <= 1'b1;
          state <= S_CTR;
        end
        S_CTR: if (dn_m) begin
          iter <= iter + 1'b1;
          if (ms < eps_q || iter + 1'b1 >= maxit_q) begin
            converged <= (ms < eps_q);
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            c1_out <= 8'((center_new1 + 16'd128) >> 8);
            c2_out <= 8'((center_new2 + 16'd128) >> 8);
            st_c   <= 1'b1;
            state  <= S_CAND;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

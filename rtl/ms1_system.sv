// ms1_system: Architecture I mean-shift tracker (one mean-shift step).
//
// The blocks run in the order of the tracking flow:
//   1. KERNEL CALCULATION builds the H x W Epanechnikov kernel from H, W, R.
//   2. DET and DEC build the target density q from the target index
//      matrix T and the candidate density p from the candidate index
//      matrix T2, both weighted by the kernel; GRADX and GRADY take the
//      kernel's gradients at the same time.
//   3. SIM-FUN forms the weights w = sqrt(q/p) over T2 and the similarity f.
//   4. MS-TRACKING accumulates numx, numy and den, divides, and moves
//      the position (x, y) by the rounded shift (dx, dy).
// The index matrices are written beforehand through the load port
// (ld_we, ld_sel = 0 for T / 1 for T2, 0-based ld_row, ld_col, 12-bit
// ld_idx), standing in for the host that supplies them.
//
// The two tracking dividers' remainders (rema1, rema2, Q16.16 scaled by
// 2^16) and their done pulses (done1, done2) are brought out as in the
// document's block diagram.
// Formats: kernel 8-bit Q1.7, densities 8-bit fractions, weights Q4.4,
// f Q8.8, numx/numy/den/dx/dy Q16.16. The gradients of the kernel are
// kept at the kernel's own precision (signed 9-bit Q1.7) rather than
// the 8-bit Q4.4 used for the stand-alone gradient example, so that the
// small kernel slopes are not rounded away. The gradients are taken of
// the negated kernel (-k, the derivative of the kernel profile), so that
// (dx, dy) points toward the pixels with large weights, i.e. up the
// density; the document only speaks of the gradient of the kernel
// matrix, so this sign is this design's choice.
//
// Timing: counting the clock edge that samples start as the first, done
// is seen after (H*W+1) + (4096+2*H*W+1) + (H*W+2) + (H*W+54) + 5 edges,
// i.e. 5439 for 16x16 (H*W+3 in place of H*W+54 when den is 0). Sequencing DET/DEC/GRADX/GRADY in
// parallel and the load port are this design's choices.
module ms1_system
  import ms_pkg::*;
#(
  parameter int unsigned MH = MAXH,
  parameter int unsigned MW = MAXW
) (
  input  logic               clk,
  input  logic               rst_n,
  // index-matrix load port
  input  logic               ld_we,
  input  logic               ld_sel,
  input  logic [7:0]         ld_row,
  input  logic [7:0]         ld_col,
  input  logic [11:0]        ld_idx,
  // run control
  input  logic               start,
  input  logic [7:0]         h,
  input  logic [7:0]         w,
  input  logic [7:0]         r,
  input  logic signed [15:0] x_in,
  input  logic signed [15:0] y_in,
  output logic [15:0]        f,
  output logic signed [31:0] numx,
  output logic signed [31:0] numy,
  output logic signed [31:0] den,
  output logic signed [31:0] dx,
  output logic signed [31:0] dy,
  output logic signed [15:0] x,
  output logic signed [15:0] y,
  output logic signed [47:0] rema1,
  output logic signed [47:0] rema2,
  output logic               done1,
  output logic               done2,
  output logic               busy,
  output logic               done
);

  typedef enum logic [2:0] {S_IDLE, S_KER, S_DEN, S_SIM, S_TRK} state_t;
  state_t state;

  logic [11:0] t_m  [MH][MW];
  logic [11:0] t2_m [MH][MW];
  logic [7:0]  kout [MH][MW];
  logic signed [8:0] ks [MH][MW];
  logic signed [8:0] gx [MH][MW];
  logic signed [8:0] gy [MH][MW];
  logic [7:0]  wt   [MH][MW];

  logic st_k, st_d, st_s, st_t;
  logic dn_k, dn_det, dn_dec, dn_gx, dn_gy, dn_s, dn_t;
  logic bz_k, bz_det, bz_dec, bz_gx, bz_gy, bz_s, bz_t;
  logic got_det, got_dec, got_gx, got_gy;
  logic [11:0] rd_idx;
  logic [7:0]  q_d, p_d;
  logic [15:0] sumq, sump;

  always_ff @(posedge clk) begin
    if (ld_we && !busy && ld_row < 8'(MH) && ld_col < 8'(MW)) begin
      if (ld_sel) t2_m[ld_row][ld_col] <= ld_idx;
      else        t_m[ld_row][ld_col]  <= ld_idx;
    end
  end

  always_comb
    for (int a = 0; a < MH; a++)
      for (int b = 0; b < MW; b++) ks[a][b] = -$signed({1'b0, kout[a][b]});

  ms_kernel #(.MH(MH), .MW(MW)) u_kernel (
    .clk, .rst_n, .start(st_k), .h, .w, .r, .kout, .done(dn_k), .busy(bz_k));

  ms_density #(.MH(MH), .MW(MW)) u_det (
    .clk, .rst_n, .start(st_d), .h, .w, .kin(kout), .tin(t_m),
    .rd_idx, .rd_d(q_d), .sumk(sumq), .done(dn_det), .busy(bz_det));

  ms_density #(.MH(MH), .MW(MW)) u_dec (
    .clk, .rst_n, .start(st_d), .h, .w, .kin(kout), .tin(t2_m),
    .rd_idx, .rd_d(p_d), .sumk(sump), .done(dn_dec), .busy(bz_dec));

  ms_gradient #(.MH(MH), .MW(MW), .DW(9), .DIR(1'b0)) u_gradx (
    .clk, .rst_n, .start(st_d), .h, .w, .a(ks), .g(gx), .done(dn_gx), .busy(bz_gx));

  ms_gradient #(.MH(MH), .MW(MW), .DW(9), .DIR(1'b1)) u_grady (
    .clk, .rst_n, .start(st_d), .h, .w, .a(ks), .g(gy), .done(dn_gy), .busy(bz_gy));

  ms_similarity #(.MH(MH), .MW(MW)) u_sim (
    .clk, .rst_n, .start(st_s), .h, .w, .kin(kout), .t2in(t2_m),
    .rd_idx, .q_d, .p_d, .wout(wt), .f, .done(dn_s), .busy(bz_s));

  ms_track #(.MH(MH), .MW(MW), .DW(9), .GF(7)) u_track (
    .clk, .rst_n, .start(st_t), .h, .w, .wt, .gx, .gy, .x_in, .y_in,
    .numx, .numy, .den, .dx, .dy, .x, .y, .rema1, .rema2,
    .done1, .done2, .done(dn_t), .busy(bz_t));

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      st_k <= 1'b0; st_d <= 1'b0; st_s <= 1'b0; st_t <= 1'b0;
      got_det <= 1'b0; got_dec <= 1'b0; got_gx <= 1'b0; got_gy <= 1'b0;
      done <= 1'b0;
    end else begin
      st_k <= 1'b0; st_d <= 1'b0; st_s <= 1'b0; st_t <= 1'b0;
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          st_k  <= 1'b1;
          state <= S_KER;
        end
        S_KER: if (dn_k) begin
          st_d <= 1'b1;
          got_det <= 1'b0; got_dec <= 1'b0; got_gx <= 1'b0; got_gy <= 1'b0;
          state <= S_DEN;
        end
        S_DEN: begin
          if (dn_det) got_det <= 1'b1;
          if (dn_dec) got_dec <= 1'b1;
          if (dn_gx)  got_gx  <= 1'b1;
          if (dn_gy)  got_gy  <= 1'b1;
          if ((got_det || dn_det) && (got_dec || dn_dec) &&
              (got_gx || dn_gx) && (got_gy || dn_gy)) begin
            st_s  <= 1'b1;
            state <= S_SIM;
          end
        end
        S_SIM: if (dn_s) begin
          st_t  <= 1'b1;
          state <= S_TRK;
        end
        S_TRK: if (dn_t) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

// ms_top: the mean-shift tracking hardware, all parts side by side.
//
//   u_arch2  Architecture II tracker (colour-index histograms over a
//            centred window, iterated mean shift with convergence test);
//   u_arch1  Architecture I tracker (kernel matrix, densities, similarity,
//            kernel gradients and one mean-shift step);
//   u_hue    pipelined RGB-to-hue colour space transformation, an
//            input-stage option that Architecture I does not use;
//   u_div    combinational add/subtract-cell array divider.
// The four share clock and reset but no data: each keeps its own ports,
// prefixed a2_, a1_, hue_ and div_. See the individual modules for
// formats and timing.
module ms_top
  import ms_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // Architecture II
  input  logic               a2_ld_we,
  input  logic               a2_ld_frame,
  input  logic [7:0]         a2_ld_row,
  input  logic [7:0]         a2_ld_col,
  input  logic [23:0]        a2_ld_rgb,
  input  logic               a2_start,
  input  logic [7:0]         a2_center1,
  input  logic [7:0]         a2_center2,
  input  logic [7:0]         a2_whs1,
  input  logic [7:0]         a2_whs2,
  input  logic [7:0]         a2_incre,
  input  logic [7:0]         a2_height,
  input  logic [7:0]         a2_width,
  input  logic [15:0]        a2_eps,
  input  logic [7:0]         a2_max_iter,
  output logic [15:0]        a2_center_new1,
  output logic [15:0]        a2_center_new2,
  output logic [15:0]        a2_ms,
  output logic [7:0]         a2_c1_out,
  output logic [7:0]         a2_c2_out,
  output logic [7:0]         a2_iter,
  output logic               a2_converged,
  output logic               a2_busy,
  output logic               a2_done,
  // Architecture I
  input  logic               a1_ld_we,
  input  logic               a1_ld_sel,
  input  logic [7:0]         a1_ld_row,
  input  logic [7:0]         a1_ld_col,
  input  logic [11:0]        a1_ld_idx,
  input  logic               a1_start,
  input  logic [7:0]         a1_h,
  input  logic [7:0]         a1_w,
  input  logic [7:0]         a1_r,
  input  logic signed [15:0] a1_x_in,
  input  logic signed [15:0] a1_y_in,
  output logic [15:0]        a1_f,
  output logic signed [31:0] a1_numx,
  output logic signed [31:0] a1_numy,
  output logic signed [31:0] a1_den,
  output logic signed [31:0] a1_dx,
  output logic signed [31:0] a1_dy,
  output logic signed [15:0] a1_x,
  output logic signed [15:0] a1_y,
  output logic signed [47:0] a1_rema1,
  output logic signed [47:0] a1_rema2,
  output logic               a1_done1,
  output logic               a1_done2,
  output logic               a1_busy,
  output logic               a1_done,
  // colour space transformation
  input  logic               hue_in_valid,
  input  logic [7:0]         hue_r,
  input  logic [7:0]         hue_g,
  input  logic [7:0]         hue_b,
  output logic               hue_out_valid,
  output logic signed [31:0] hue_h,
  // cell-array divider
  input  logic [5:0]         div_x,
  input  logic [5:0]         div_y,
  output logic [8:0]         div_q,
  output logic [5:0]         div_r
);

  ms2_system u_arch2 (
    .clk, .rst_n,
    .ld_we(a2_ld_we), .ld_frame(a2_ld_frame), .ld_row(a2_ld_row), .ld_col(a2_ld_col),
    .ld_rgb(a2_ld_rgb), .start(a2_start), .center1(a2_center1), .center2(a2_center2),
    .whs1(a2_whs1), .whs2(a2_whs2), .incre(a2_incre), .height(a2_height), .width(a2_width),
    .eps(a2_eps), .max_iter(a2_max_iter),
    .center_new1(a2_center_new1), .center_new2(a2_center_new2), .ms(a2_ms),
    .c1_out(a2_c1_out), .c2_out(a2_c2_out), .iter(a2_iter), .converged(a2_converged),
    .busy(a2_busy), .done(a2_done));

  ms1_system u_arch1 (
    .clk, .rst_n,
    .ld_we(a1_ld_we), .ld_sel(a1_ld_sel), .ld_row(a1_ld_row), .ld_col(a1_ld_col),
    .ld_idx(a1_ld_idx), .start(a1_start), .h(a1_h), .w(a1_w), .r(a1_r),
    .x_in(a1_x_in), .y_in(a1_y_in), .f(a1_f), .numx(a1_numx), .numy(a1_numy),
    .den(a1_den), .dx(a1_dx), .dy(a1_dy), .x(a1_x), .y(a1_y),
    .rema1(a1_rema1), .rema2(a1_rema2), .done1(a1_done1), .done2(a1_done2),
    .busy(a1_busy), .done(a1_done));

  ms_hue u_hue (
    .clk, .rst_n, .in_valid(hue_in_valid), .r(hue_r), .g(hue_g), .b(hue_b),
    .out_valid(hue_out_valid), .hue(hue_h));

  serial_divider u_div (.x(div_x), .y(div_y), .q(div_q), .r(div_r));

endmodule

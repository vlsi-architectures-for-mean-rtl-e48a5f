// ms_pkg: types, sizes and arithmetic helpers shared by the mean-shift
// tracker blocks.
//
// Matrix sizes default to the 16x16 image patches used throughout the
// design. isqrt() is a bit-serial integer square root written as a
// loop: it unrolls into 16 compare stages, each trying the next root bit
// and keeping it when root^2 stays at or below the operand. win_bounds()
// clips a tracking window, centre +/- (half size + increase), to the
// frame, with rows and columns numbered from 1 as in the tracking
// equations.
package ms_pkg;

  // Default patch / frame size (rows x columns).
  localparam int unsigned MAXH = 16;
  localparam int unsigned MAXW = 16;

  // Architecture II colour index: (R/16+1)*256 + (G/16+1)*16 + (B/16+1),
  // so the largest index is 16*256+16*16+16 = 4368.
  localparam int unsigned NBINS2 = 4369;

  // Clipped window: first/last row and column.
  typedef struct packed {
    logic [7:0] rmin;
    logic [7:0] rmax;
    logic [7:0] cmin;
    logic [7:0] cmax;
  } win_t;

  // Integer square root of a 32-bit value, result rounded down.
  function automatic logic [15:0] isqrt(input logic [31:0] v);
    logic [15:0] root;
    logic [15:0] cand;
    root = '0;
    for (int b = 15; b >= 0; b--) begin
      cand = root | 16'(1 << b);
      if ({16'd0, cand} * {16'd0, cand} <= {32'd0, v}) root = cand;
    end
    return root;
  endfunction

  // Window rows centre1-(half1+incre) .. centre1+(half1+incre), columns
  // likewise, clipped to 1..height and 1..width.
  function automatic win_t win_bounds(input logic [7:0] c1, input logic [7:0] c2,
                                      input logic [7:0] h1, input logic [7:0] h2,
                                      input logic [7:0] incre,
                                      input logic [7:0] height, input logic [7:0] width);
    int r0, r1, c0, cc1;
    win_t wb;
    r0  = int'(c1) - int'(h1) - int'(incre);
    r1  = int'(c1) + int'(h1) + int'(incre);
    c0  = int'(c2) - int'(h2) - int'(incre);
    cc1 = int'(c2) + int'(h2) + int'(incre);
    if (r0 < 1) r0 = 1;
    if (c0 < 1) c0 = 1;
    if (r1 > int'(height)) r1 = int'(height);
    if (cc1 > int'(width)) cc1 = int'(width);
    wb.rmin = 8'(r0);
    wb.rmax = 8'(r1);
    wb.cmin = 8'(c0);
    wb.cmax = 8'(cc1);
    return wb;
  endfunction

endpackage

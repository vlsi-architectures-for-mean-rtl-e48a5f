// ms_norm: magnitude of a gradient vector, n = sqrt(gx^2 + gy^2).
//
// Purely combinational: both signed components are squared, summed and
// passed through an integer square root. With F fraction bits on the
// inputs the squares carry 2F fraction bits, so the root comes back with
// F fraction bits again: the output has the same fixed-point scaling as
// the inputs. The default 8-bit width with four fraction bits is the
// format the document uses for gx, gy and n (gx = -0.5, gy = 0 gives
// n = 0.5). The output is one bit wider than the inputs so that
// sqrt(2)*|min| never overflows.
module ms_norm
  import ms_pkg::*;
#(
  parameter int unsigned DW = 8
) (
  input  logic signed [DW-1:0] gx,
  input  logic signed [DW-1:0] gy,
  output logic        [DW:0]   n
);
  logic signed [2*DW-1:0] ex, ey;
  logic        [2*DW:0]   sumsq;
  always_comb begin
    ex    = gx;                 // sign-extend before squaring
    ey    = gy;
    sumsq = {1'b0, ex * ex} + {1'b0, ey * ey};
    n     = (DW+1)'(isqrt(32'(sumsq)));
  end
endmodule

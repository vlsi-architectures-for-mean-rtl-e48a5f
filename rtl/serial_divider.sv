// serial_divider: non-restoring fractional divider built as a chain of
// P+1 controlled add/subtract cells (default N = 6-bit operands, P = 8,
// so nine cells).
//
// Cell 0 takes the dividend X on its A input and the divisor Y on B;
// its select is XNOR(X[N-1], Y[N-1]), so it subtracts when the signs
// agree and adds when they differ. Each following cell k takes the
// previous cell's sum shifted left by one with a 0 appended (2*R), the
// divisor Y, and the previous cell's carry out as its select: a carry
// of 1 (quotient bit 1) makes it subtract, a carry of 0 makes it add.
// The carry outs are the quotient bits Q0..QP, most significant first,
// and the last sum is the remainder.
//
// For a positive divisor and |X| < Y the bits read as a (P+1)-bit
// two's-complement number Q = Q0 Q1 ... QP with 2^P * X = Q*Y + R
// whenever the final remainder R is not negative (for -12/15: Q =
// 100110011 = -205, R = 3). As in the document there is no final
// correction stage: the sign correction (Q+1, R-Y for a negative
// dividend) is left to the user of the result. The carry out equals the
// inverted sign of the true partial remainder only for positive
// divisors; that is the case the document covers. Purely combinational.
module serial_divider #(
  parameter int unsigned N = 6,
  parameter int unsigned P = 8
) (
  input  logic [N-1:0] x,      // dividend (two's complement)
  input  logic [N-1:0] y,      // divisor
  output logic [P:0]   q,      // q[P] = Q0 (first cell) ... q[0] = QP
  output logic [N-1:0] r       // final remainder R(P)
);
  logic [N-1:0] s  [P+1];
  logic         co [P+1];

  sd_addsub_cell #(.N(N)) u_cell0 (
    .a(x), .b(y), .as_n(~(x[N-1] ^ y[N-1])), .s(s[0]), .cout(co[0]));

  for (genvar k = 1; k <= P; k++) begin : g_cell
    sd_addsub_cell #(.N(N)) u_cell (
      .a({s[k-1][N-2:0], 1'b0}), .b(y), .as_n(co[k-1]), .s(s[k]), .cout(co[k]));
  end

  for (genvar k = 0; k <= P; k++) begin : g_q
    assign q[P-k] = co[k];
  end
  assign r = s[P];
endmodule

// sd_addsub_cell: N-bit controlled adder/subtractor (default six bits).
//
// Each divisor bit B[k] passes through an XOR gate with the select line
// as_n (the A-bar/S input) before entering full adder FA[k]; the select
// line also drives the carry into FA0. as_n = 0 gives s = A + B,
// as_n = 1 gives s = A - B in two's complement. The carry out of the
// last full adder is the cell's cout, which the divider array uses as a
// quotient bit. Ripple-carry, purely combinational, as in the document.
module sd_addsub_cell #(
  parameter int unsigned N = 6
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         as_n,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N:0]   c;
  logic [N-1:0] bx;

  assign c[0] = as_n;
  for (genvar k = 0; k < N; k++) begin : g_fa
    assign bx[k] = b[k] ^ as_n;
    sd_full_adder u_fa (.a(a[k]), .b(bx[k]), .cin(c[k]), .s(s[k]), .cout(c[k+1]));
  end
  assign cout = c[N];
endmodule

// ms_similarity: weight matrix and similarity coefficient (SIM-FUN).
//
// For every element of the H x W candidate patch the colour index
// T2(i,j) selects the target density q and the candidate density p of
// that colour. The weight is w(i,j) = sqrt(q/p) (16-bit divider, then
// square-root block), and the similarity output is
//   f = sum(w(i,j) * k(i,j)) / (H*W)
// (multiplier and accumulator, H*W multiplier, final divider).
//
// Formats follow the document: q and p are 8-bit pure fractions, w is
// 8-bit Q4.4 (1.0 = 8'h10), f is 16-bit Q8.8. The ratio q/p is formed
// in Q8.8, whose integer square root is w in Q4.4 directly. A colour with
// p = 0 gets weight 0, and the ratio saturates at 255.996.
//
// Timing: after start, one element per clock (rd_idx drives the
// combinational density read ports of the two density blocks), then one
// clock for the final division; done pulses H*W+2 cycles after start.
// The per-clock schedule, the p = 0 rule and the saturation are this
// design's choices.
module ms_similarity
  import ms_pkg::*;
#(
  parameter int unsigned MH = MAXH,
  parameter int unsigned MW = MAXW
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [7:0]  h,
  input  logic [7:0]  w,
  input  logic [7:0]  kin  [MH][MW],
  input  logic [11:0] t2in [MH][MW],
  output logic [11:0] rd_idx,
  input  logic [7:0]  q_d,
  input  logic [7:0]  p_d,
  output logic [7:0]  wout [MH][MW],
  output logic [15:0] f,
  output logic        done,
  output logic        busy
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DIV} state_t;
  state_t state;

  logic [7:0]  h_q, w_q, i_q, j_q;
  logic [31:0] acc;            // sum of w*k, Q5.11 per term
  logic [15:0] ratio;
  logic [7:0]  wcur;

  assign rd_idx = t2in[i_q][j_q];
  assign busy   = (state != S_IDLE);

  always_comb begin
    logic [15:0] rq;
    rq    = (p_d == 0) ? 16'd0 : 16'({q_d, 8'd0} / {8'd0, p_d});
    ratio = rq;
    wcur  = 8'(isqrt({16'd0, ratio}));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      h_q <= '0; w_q <= '0; i_q <= '0; j_q <= '0;
      acc  <= '0;
      f    <= '0;
      done <= 1'b0;
      for (int a = 0; a < MH; a++)
        for (int b = 0; b < MW; b++) wout[a][b] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          h_q <= (h > 8'(MH)) ? 8'(MH) : h;
          w_q <= (w > 8'(MW)) ? 8'(MW) : w;
          i_q <= '0; j_q <= '0;
          acc <= '0;
          for (int a = 0; a < MH; a++)
            for (int b = 0; b < MW; b++) wout[a][b] <= '0;
          state <= (h == 0 || w == 0) ? S_DIV : S_RUN;
        end
        S_RUN: begin
          wout[i_q][j_q] <= wcur;
          acc <= acc + 32'(wcur) * 32'(kin[i_q][j_q]);
          if (j_q == w_q - 1) begin
            j_q <= '0;
            if (i_q == h_q - 1) state <= S_DIV;
            else i_q <= i_q + 1'b1;
          end else j_q <= j_q + 1'b1;
        end
        S_DIV: begin
          if (h_q == 0 || w_q == 0) f <= '0;
          else f <= 16'((acc >> 3) / (32'(h_q) * 32'(w_q)));
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

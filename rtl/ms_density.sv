// ms_density: kernel-weighted colour histogram (DET / DEC blocks).
//
// For every element (i,j) of an H x W patch the kernel value k(i,j) is
// added to histogram bin T(i,j), where T is the patch's colour-index
// matrix (accumulator with feedback, q(T) = q(T) + K). In parallel the
// kernel values are summed. A final pass divides each touched bin by
// that sum, D = q(T) / sum(K), giving the normalised density as an 8-bit
// pure fraction (0.0078 is 8'h02), the document's format; a bin holding
// the whole sum saturates to 255/256. The density array has 4096 entries,
// the document's size, addressed by 12-bit colour indices.
//
// Operation after a start pulse: (1) clear all 4096 histogram and
// density entries, one per clock; (2) accumulate, one element per clock;
// (3) normalise, one element per clock; then done pulses. Total
// 4096 + 2*H*W + 1 cycles. rd_idx/rd_d is a combinational read port into
// the density array, valid after done.
// Kernel values are 8-bit Q1.7, bins and the kernel sum are 16-bit
// (Q9.7). The three-pass schedule, bin width and saturation are this
// design's choices.
module ms_density
  import ms_pkg::*;
#(
  parameter int unsigned MH    = MAXH,
  parameter int unsigned MW    = MAXW,
  parameter int unsigned NBINS = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [7:0]  h,
  input  logic [7:0]  w,
  input  logic [7:0]  kin [MH][MW],
  input  logic [11:0] tin [MH][MW],
  input  logic [11:0] rd_idx,
  output logic [7:0]  rd_d,
  output logic [15:0] sumk,
  output logic        done,
  output logic        busy
);

  typedef enum logic [1:0] {S_IDLE, S_CLR, S_ACC, S_NRM} state_t;
  state_t state;

  logic [15:0] hist [NBINS];
  logic [7:0]  dens [NBINS];
  logic [11:0] a_q;
  logic [7:0]  h_q, w_q, i_q, j_q;  // 0-based element position
  logic        last_elem;
  logic [11:0] t_cur;
  logic [7:0]  k_cur;
  logic [23:0] ratio;

  assign last_elem = (i_q == h_q - 1) && (j_q == w_q - 1);
  assign t_cur     = tin[i_q][j_q];
  assign k_cur     = kin[i_q][j_q];
  assign ratio     = (sumk == 0) ? 24'd0 : ({hist[t_cur], 8'd0} / {8'd0, sumk});
  assign rd_d      = dens[rd_idx];
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      a_q   <= '0;
      h_q   <= '0; w_q <= '0; i_q <= '0; j_q <= '0;
      sumk  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          h_q   <= (h > 8'(MH)) ? 8'(MH) : h;
          w_q   <= (w > 8'(MW)) ? 8'(MW) : w;
          a_q   <= '0;
          sumk  <= '0;
          state <= S_CLR;
        end
        S_CLR: begin
          hist[a_q] <= '0;
          dens[a_q] <= '0;
          a_q       <= a_q + 1'b1;
          if (a_q == 12'(NBINS - 1)) begin
            i_q <= '0; j_q <= '0;
            if (h_q == 0 || w_q == 0) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else state <= S_ACC;
          end
        end
        S_ACC: begin
          hist[t_cur] <= hist[t_cur] + 16'(k_cur);
          sumk        <= sumk + 16'(k_cur);
          if (j_q == w_q - 1) begin
            j_q <= '0;
            i_q <= i_q + 1'b1;
          end else j_q <= j_q + 1'b1;
          if (last_elem) begin
            i_q <= '0; j_q <= '0;
            state <= S_NRM;
          end
        end
        S_NRM: begin
          dens[t_cur] <= (ratio > 24'd255) ? 8'd255 : ratio[7:0];
          if (j_q == w_q - 1) begin
            j_q <= '0;
            i_q <= i_q + 1'b1;
          end else j_q <= j_q + 1'b1;
          if (last_elem) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

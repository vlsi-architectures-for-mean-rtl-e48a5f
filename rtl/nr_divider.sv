// nr_divider: sequential radix-2 non-restoring divider.
//
// One quotient bit per clock. A partial-remainder register R feeds an
// adder/subtractor; the sign bit of R picks the operation (subtract the
// divisor while R >= 0, add it while R < 0), and the inverted sign of the
// new remainder is shifted into the quotient shift register. This is the
// shift-register / adder-subtractor / register loop of the classic
// non-restoring divider. The dividend may be negative: its magnitude is
// divided and the signs of quotient and remainder are restored at the
// end (quotient truncates toward zero, remainder takes the dividend's
// sign). A final correction step adds the divisor back when the last
// remainder is negative.
//
// Interface: pulse start with dividend/divisor valid; done pulses for one
// cycle WIDTH+2 cycles later with quotient/remainder valid until the next
// start. busy is high in between. The divisor is taken as unsigned and
// must be non-zero; a zero divisor gives an all-ones quotient magnitude.
// These start/done/remainder ports correspond to START, DONE and REMA
// of the tracking datapath's dividers; signed handling, the correction
// step and the handshake timing are this design's choices.
module nr_divider #(
  parameter int unsigned WIDTH = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [WIDTH-1:0] dividend,
  input  logic        [WIDTH-1:0] divisor,
  output logic                    busy,
  output logic                    done,
  output logic signed [WIDTH-1:0] quotient,
  output logic signed [WIDTH-1:0] remainder
);

  typedef enum logic [1:0] {S_IDLE, S_ITER, S_FIX} state_t;
  state_t state;

  logic        [WIDTH:0]   r_q;      // partial remainder, two's complement
  logic        [WIDTH-1:0] q_sr;     // dividend bits in, quotient bits out
  logic        [WIDTH-1:0] d_q;
  logic                    neg_q;
  logic [$clog2(WIDTH+1)-1:0] cnt;

  logic [WIDTH:0] r_shift, r_next;
  always_comb begin
    r_shift = {r_q[WIDTH-1:0], q_sr[WIDTH-1]};
    if (r_q[WIDTH]) r_next = r_shift + {1'b0, d_q};
    else            r_next = r_shift - {1'b0, d_q};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      r_q       <= '0;
      q_sr      <= '0;
      d_q       <= '0;
      neg_q     <= 1'b0;
      cnt       <= '0;
      done      <= 1'b0;
      quotient  <= '0;
      remainder <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          neg_q <= dividend[WIDTH-1];
          q_sr  <= dividend[WIDTH-1] ? WIDTH'(-dividend) : dividend;
          d_q   <= divisor;
          r_q   <= '0;
          cnt   <= '0;
          state <= S_ITER;
        end
        S_ITER: begin
          r_q  <= r_next;
          q_sr <= {q_sr[WIDTH-2:0], ~r_next[WIDTH]};
          cnt  <= cnt + 1'b1;
          if (cnt == ($clog2(WIDTH+1))'(WIDTH - 1)) state <= S_FIX;
        end
        S_FIX: begin
          logic [WIDTH:0] r_fix;
          r_fix     = r_q[WIDTH] ? r_q + {1'b0, d_q} : r_q;
          quotient  <= neg_q ? -q_sr : q_sr;
          remainder <= neg_q ? -r_fix[WIDTH-1:0] : r_fix[WIDTH-1:0];
          done      <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule

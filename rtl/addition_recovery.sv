// Addition recovery: turns the two inverse-transform output streams of one inner
// iteration into complete coefficient sums for two consecutive product "halves".
//
// A half is k/2 coefficient positions (one x or y block). In an ordinary inner
// iteration the odd block product A = x_(2n-1)*y_i and the even one
// B = x_(2n)*y_i overlap like the staircase of the block-accumulation scheme:
//   Right third  = low half of A            (+ left third kept from the last iteration)
//   Middle third = high half of A + low half of B
//   Left third   = high half of B           -> kept in the left-third buffer
// At cycle tau of the frame the up lane of an inverse transform is coefficient
// tau of the low half and the dn lane coefficient tau of the high half, so all
// sums are position-aligned and need one adder each. The first iteration of an
// outer iteration has only A = x_0*y_i: its low half is complete at once and its
// high half goes to the buffer, while the buffer's previous content (the last
// left third of the previous outer iteration) is emitted. A flush frame emits the
// buffer alone.
//
// Output: a slot of k/2 cycles carrying s0 (first half) and s1 (second half)
// coefficients per cycle, plus per-half valid flags and absolute half indices,
// given on the slot's first cycle. Coefficients are plain integers (< 2^65), no
// longer residues. One register stage of latency. Carry resolution is left to
// product_accum. The three-adder split and the left-third buffer follow the
// source architecture; resolving carries later, in one place, is this design's
// simplification.
module addition_recovery
  import fhe_pkg::*;
#(
  parameter int unsigned N      = 256,  // transform points k
  parameter int unsigned HIDX_W = 24    // width of a half index
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,      // start of a multiplication: buffer empty
  input  logic              in_sof,
  input  logic              in_vld,
  input  iter_kind_e        in_kind,
  input  logic [HIDX_W-1:0] in_half,    // FIRST: half of x0*y_i low part; NORMAL: right-third half
  input  fe_t               a_up, a_dn, // odd-path inverse transform output
  input  fe_t               b_up, b_dn, // even-path output (already zero when absent)
  output logic              s_sof,
  output logic              s_vld,
  output logic [64:0]       s0, s1,
  output logic              v0, v1,     // valid on s_sof
  output logic [HIDX_W-1:0] h0, h1
);
  localparam int unsigned T  = N / 2;
  localparam int unsigned TW = $clog2(T);

  logic [63:0] lbuf [T];           // left-third buffer
  logic              lb_valid;
  logic [HIDX_W-1:0] lb_half;
  logic [TW-1:0]     pos, pos_q;
  iter_kind_e        kind_q;
  logic [63:0]       lb_rd;

  assign pos   = in_sof ? '0 : pos_q;
  assign lb_rd = lbuf[pos];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pos_q    <= '0;
      lb_valid <= 1'b0;
      lb_half  <= '0;
      s_sof    <= 1'b0;
      s_vld    <= 1'b0;
      v0 <= 1'b0; v1 <= 1'b0; h0 <= '0; h1 <= '0;
      kind_q   <= IT_FLUSH;
    end else begin
      pos_q <= pos + 1'b1;
      s_sof <= in_sof;
      s_vld <= in_vld;
      if (clear) lb_valid <= 1'b0;
      if (in_sof) begin
        kind_q <= in_kind;
        unique case (in_kind)
          IT_FIRST: begin
            v0 <= lb_valid;  h0 <= lb_half;
            v1 <= 1'b1;      h1 <= in_half;
            lb_valid <= 1'b1; lb_half <= in_half + 1'b1;
          end
          IT_NORMAL: begin
            v0 <= 1'b1;      h0 <= in_half;
            v1 <= 1'b1;      h1 <= in_half + 1'b1;
            lb_valid <= 1'b1; lb_half <= in_half + HIDX_W'(2);
          end
          default: begin
            v0 <= lb_valid;  h0 <= lb_half;
            v1 <= 1'b0;      h1 <= '0;
            lb_valid <= 1'b0;
          end
        endcase
      end
    end

  // datapath: three thirds and the left-third buffer
  iter_kind_e kind_now;
  assign kind_now = in_sof ? in_kind : kind_q;

  always_ff @(posedge clk) begin
    if (in_vld) begin
      unique case (kind_now)
        IT_FIRST: begin
          s0 <= {1'b0, lb_rd};
          s1 <= {1'b0, a_up};
          lbuf[pos] <= a_dn;
        end
        IT_NORMAL: begin
          s0 <= {1'b0, lb_rd} + {1'b0, a_up};   // right third
          s1 <= {1'b0, a_dn} + {1'b0, b_up};    // middle third
          lbuf[pos] <= b_dn;                   // left third
        end
        default: begin
          s0 <= {1'b0, lb_rd};
          s1 <= '0;
          lbuf[pos] <= '0;
        end
      endcase
    end
  end
endmodule

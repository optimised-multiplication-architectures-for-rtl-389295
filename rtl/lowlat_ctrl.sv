// FSM controller of the low-latency integer-FFT multiplier.
//
// Schedules the two-level iteration: the outer loop walks the blocks y_i of y,
// the inner loop the blocks of x. Inner iteration 0 transforms x_0 (odd path) and
// y_i (even path, whose spectrum is also stored); every later inner iteration n
// transforms x_(2n-1) and x_(2n) together, so an x of NXB blocks takes
// floor(NXB/2)+1 inner iterations instead of NXB. When x_(2n) does not exist the
// even path reads nothing and its result is forced to zero. After the last outer
// iteration one flush frame empties the left-third buffer. Every frame lasts k/2
// clocks, one element of each operand block per clock, and frames follow back to
// back. The controller then waits for `acc_done` from the product accumulation.
//
// Outputs per clock: read enables/addresses for the odd-path x port, the even-path
// x port and the y port (element addresses, one b-bit element each), the even-path
// source select, and the frame descriptor (sof, vld, kind, bzero, half index)
// that must be delayed by the RAM read latency (1 clock) by the caller.
// `busy` is high from start to done; `done` pulses for one clock.
module lowlat_ctrl
  import fhe_pkg::*;
#(
  parameter int unsigned N      = 256,  // transform points k
  parameter int unsigned AW     = 28,   // element address width of x and y
  parameter int unsigned HIDX_W = 24
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [AW-1:0]     nxb,        // number of x blocks (k/2 elements each), >= 1
  input  logic [AW-1:0]     nyb,        // number of y blocks, >= 1
  input  logic              acc_done,
  output logic              busy,
  output logic              done,
  output logic              clear,      // pulses with start
  // operand reads
  output logic              xa_re,
  output logic [AW-1:0]     xa_addr,
  output logic              xb_re,
  output logic [AW-1:0]     xb_addr,
  output logic              y_re,
  output logic [AW-1:0]     y_addr,
  output logic              b_from_y,   // even path reads y (inner iteration 0)
  // frame descriptor
  output logic              f_sof,
  output logic              f_vld,
  output iter_kind_e        f_kind,
  output logic              f_bzero,
  output logic [HIDX_W-1:0] f_half
);
  localparam int unsigned T  = N / 2;
  localparam int unsigned TW = $clog2(T);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FLUSH, S_WAIT} state_e;
  state_e        state;
  logic [TW-1:0] tau;
  logic [AW-1:0] i, n, n_last, nxb_q, nyb_q;

  assign n_last = nxb_q >> 1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= S_IDLE; tau <= '0; i <= '0; n <= '0;
      nxb_q <= '0; nyb_q <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          nxb_q <= nxb; nyb_q <= nyb;
          i <= '0; n <= '0; tau <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          tau <= tau + 1'b1;
          if (tau == TW'(T - 1)) begin
            if (n == n_last) begin
              n <= '0;
              if (i == nyb_q - 1'b1) state <= S_FLUSH;
              else                   i <= i + 1'b1;
            end else n <= n + 1'b1;
          end
        end
        S_FLUSH: begin
          tau <= tau + 1'b1;
          if (tau == TW'(T - 1)) state <= S_WAIT;
        end
        S_WAIT: if (acc_done) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end

  assign busy  = state != S_IDLE;
  assign clear = state == S_IDLE && start;

  logic          first_it, bz;
  logic [AW-1:0] blk_a, blk_b;
  always_comb begin
    first_it = n == '0;
    blk_a    = first_it ? '0 : (n << 1) - 1'b1;
    blk_b    = n << 1;
    bz       = !first_it && (blk_b >= nxb_q);

    xa_re    = state == S_RUN;
    xa_addr  = AW'(blk_a * AW'(T)) + AW'(tau);
    xb_re    = state == S_RUN && !first_it && !bz;
    xb_addr  = AW'(blk_b * AW'(T)) + AW'(tau);
    y_re     = state == S_RUN && first_it;
    y_addr   = AW'(i * AW'(T)) + AW'(tau);
    b_from_y = first_it;

    f_sof    = (state == S_RUN || state == S_FLUSH) && tau == '0;
    f_vld    = state == S_RUN || state == S_FLUSH;
    f_kind   = state == S_FLUSH ? IT_FLUSH : (first_it ? IT_FIRST : IT_NORMAL);
    f_bzero  = bz;
    f_half   = first_it ? HIDX_W'(i) : HIDX_W'(i + (n << 1) - 1'b1);
  end
endmodule

// Low-latency integer-FFT multiplier: z = x * y for operands of many blocks.
//
// x and y live in external RAM as b-bit elements (b = 28 by default), grouped in
// blocks of k/2 elements. Each block product x_j * y_i is an exact k-point
// cyclic convolution mod p = 2^64-2^32+1 of two zero-padded blocks: forward NTT,
// point-wise product, inverse NTT. Two forward transforms, two point-wise
// multipliers and two inverse transforms work in parallel, so after the first
// inner iteration (x_0 * y_i) each inner iteration of k/2 clocks yields two block
// products (x_(2n-1)*y_i and x_(2n)*y_i). The spectrum of y_i, computed in the
// first inner iteration by the even path, is kept in an on-chip RAM and reused.
// The inverse outputs are merged into complete coefficients (addition_recovery)
// and carry-resolved into the product RAM 2b bits per clock (product_accum).
//
// Datapath (left = odd path, right = even path):
//   x port A -> FFT -> point-wise(x Y_i) -> IFFT --------------------\
//   x port B / y port -> mux -> FFT -> demux -> Y RAM              addition recovery
//                                 \-> point-wise(x Y_i) -> IFFT -> mux(0) /
// Interface: start with nxb, nyb (block counts, >= 1); operand RAMs have one clock
// of read latency; the product RAM has 2b-bit words, word w holding bits
// [2b*w +: 2b] of z, read with one clock latency and written read-modify-write.
// The product must fit in (nxb + nyb) * k/2 elements; its RAM needs no clearing.
// done pulses when the last word is written.
// The two paths run in lock step (an assertion checks frame starts, valids and
// tags); the accumulator's per-frame slot_done output is not needed here. Lint
// notes rst_n as both synchronous reset and the assertion's asynchronous disable.
// Exactness: a coefficient is at most (k/2)(2^b - 1)^2, which stays below p for
// b = 28 up to k = 512.
module lowlat_fft_mult
  import fhe_pkg::*;
#(
  parameter int unsigned K       = 256,  // FFT points k
  parameter int unsigned B       = 28,   // base bit length b
  parameter int unsigned N_F     = 17,   // butterfly pipeline depth (forward and inverse)
  parameter int unsigned N_PW    = 15,   // point-wise multiplication pipeline depth
  parameter int unsigned AW      = 28,   // element address width of x and y
  parameter int unsigned HIDX_W  = AW + 1 - $clog2(K / 2) + 1,
  parameter int unsigned ZAW     = AW    // product word (2b bits) address width
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [AW-1:0]  nxb,
  input  logic [AW-1:0]  nyb,
  output logic           busy,
  output logic           done,
  // operand RAM ports
  output logic           xa_re,
  output logic [AW-1:0]  xa_addr,
  input  logic [B-1:0]   xa_rdata,
  output logic           xb_re,
  output logic [AW-1:0]  xb_addr,
  input  logic [B-1:0]   xb_rdata,
  output logic           y_re,
  output logic [AW-1:0]  y_addr,
  input  logic [B-1:0]   y_rdata,
  // product RAM port
  output logic           z_re,
  output logic [ZAW-1:0] z_raddr,
  input  logic [2*B-1:0] z_rdata,
  output logic           z_we,
  output logic [ZAW-1:0] z_waddr,
  output logic [2*B-1:0] z_wdata
);
  localparam int unsigned T     = K / 2;
  localparam int unsigned TW    = $clog2(T);
  localparam int unsigned TAG_W = HIDX_W + 3;   // {bzero, kind, half}

  // ---------------- controller ----------------
  logic              clear, acc_done, b_from_y;
  logic              c_sof, c_vld, c_bzero;
  iter_kind_e        c_kind;
  logic [HIDX_W-1:0] c_half;

  lowlat_ctrl #(.N(K), .AW(AW), .HIDX_W(HIDX_W)) u_ctrl (
    .clk, .rst_n, .start, .nxb, .nyb, .acc_done, .busy, .done, .clear,
    .xa_re, .xa_addr, .xb_re, .xb_addr, .y_re, .y_addr, .b_from_y,
    .f_sof(c_sof), .f_vld(c_vld), .f_kind(c_kind), .f_bzero(c_bzero), .f_half(c_half)
  );

  // align the frame descriptor with the RAM read data (1 clock)
  logic             d_sof, d_vld, d_from_y, d_xb;
  logic [TAG_W-1:0] d_tag;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      d_sof <= 1'b0; d_vld <= 1'b0; d_from_y <= 1'b0; d_xb <= 1'b0; d_tag <= '0;
    end else begin
      d_sof <= c_sof; d_vld <= c_vld; d_from_y <= b_from_y && y_re; d_xb <= xb_re;
      d_tag <= {c_bzero, c_kind, c_half};
    end

  fe_t fa_in, fb_in;
  assign fa_in = d_vld ? fe_t'(xa_rdata) : '0;
  assign fb_in = d_from_y ? fe_t'(y_rdata) : (d_xb ? fe_t'(xb_rdata) : '0);

  // ---------------- forward transforms ----------------
  logic fa_sof, fa_vld, fb_sof, fb_vld;
  logic [TAG_W-1:0] fa_tag, fb_tag;
  fe_t fa_up, fa_dn, fb_up, fb_dn;

  ntt_r2mdc #(.N(K), .INVERSE(1'b0), .MUL_LAT(N_F - 1), .TAG_W(TAG_W)) u_fft_a (
    .clk, .rst_n, .in_sof(d_sof), .in_vld(d_vld), .in_tag(d_tag), .in_up(fa_in), .in_dn('0),
    .out_sof(fa_sof), .out_vld(fa_vld), .out_tag(fa_tag), .out_up(fa_up), .out_dn(fa_dn));
  ntt_r2mdc #(.N(K), .INVERSE(1'b0), .MUL_LAT(N_F - 1), .TAG_W(TAG_W)) u_fft_b (
    .clk, .rst_n, .in_sof(d_sof), .in_vld(d_vld), .in_tag(d_tag), .in_up(fb_in), .in_dn('0),
    .out_sof(fb_sof), .out_vld(fb_vld), .out_tag(fb_tag), .out_up(fb_up), .out_dn(fb_dn));

  // ---------------- Y_i spectrum RAM (demux target) ----------------
  logic [TW-1:0] ypos, ypos_q;
  logic          fb_first;
  fe_t           yr_up, yr_dn, ya_up, ya_dn;
  assign ypos     = fb_sof ? '0 : ypos_q;
  assign fb_first = iter_kind_e'(fb_tag[HIDX_W +: 2]) == IT_FIRST;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ypos_q <= '0;
    else        ypos_q <= ypos + 1'b1;

  y_spectrum_ram #(.DEPTH(T)) u_yram (
    .clk, .we(fb_vld && fb_first), .waddr(ypos), .wdata_up(fb_up), .wdata_dn(fb_dn),
    .raddr(ypos), .rdata_up(yr_up), .rdata_dn(yr_dn));

  // odd path multiplies by Y_i straight from the transform in the first iteration
  assign ya_up = fb_first ? fb_up : yr_up;
  assign ya_dn = fb_first ? fb_dn : yr_dn;

  // ---------------- point-wise multiplication ----------------
  logic pa_sof, pa_vld, pb_sof, pb_vld;
  logic [TAG_W-1:0] pa_tag, pb_tag;
  fe_t pa_up, pa_dn, pb_up, pb_dn;

  pointwise_mult #(.N(K), .NPW(N_PW), .TAG_W(TAG_W)) u_pw_a (
    .clk, .rst_n, .in_sof(fa_sof), .in_vld(fa_vld), .in_tag(fa_tag),
    .x_up(fa_up), .x_dn(fa_dn), .y_up(ya_up), .y_dn(ya_dn),
    .out_sof(pa_sof), .out_vld(pa_vld), .out_tag(pa_tag), .z_up(pa_up), .z_dn(pa_dn));
  pointwise_mult #(.N(K), .NPW(N_PW), .TAG_W(TAG_W)) u_pw_b (
    .clk, .rst_n, .in_sof(fb_sof), .in_vld(fb_vld), .in_tag(fb_tag),
    .x_up(fb_up), .x_dn(fb_dn), .y_up(yr_up), .y_dn(yr_dn),
    .out_sof(pb_sof), .out_vld(pb_vld), .out_tag(pb_tag), .z_up(pb_up), .z_dn(pb_dn));

  // ---------------- inverse transforms ----------------
  logic ia_sof, ia_vld, ib_sof, ib_vld;
  logic [TAG_W-1:0] ia_tag, ib_tag;
  fe_t ia_up, ia_dn, ib_up, ib_dn;

  ntt_r2mdc #(.N(K), .INVERSE(1'b1), .MUL_LAT(N_F - 1), .TAG_W(TAG_W)) u_ifft_a (
    .clk, .rst_n, .in_sof(pa_sof), .in_vld(pa_vld), .in_tag(pa_tag), .in_up(pa_up), .in_dn(pa_dn),
    .out_sof(ia_sof), .out_vld(ia_vld), .out_tag(ia_tag), .out_up(ia_up), .out_dn(ia_dn));
  ntt_r2mdc #(.N(K), .INVERSE(1'b1), .MUL_LAT(N_F - 1), .TAG_W(TAG_W)) u_ifft_b (
    .clk, .rst_n, .in_sof(pb_sof), .in_vld(pb_vld), .in_tag(pb_tag), .in_up(pb_up), .in_dn(pb_dn),
    .out_sof(ib_sof), .out_vld(ib_vld), .out_tag(ib_tag), .out_up(ib_up), .out_dn(ib_dn));

  // even-path result forced to zero when there is no even block product
  iter_kind_e  r_kind;
  logic        r_bzero, b_zero;
  fe_t         rb_up, rb_dn;
  assign r_kind  = iter_kind_e'(ia_tag[HIDX_W +: 2]);
  assign r_bzero = ia_tag[HIDX_W + 2];
  assign b_zero  = r_bzero || r_kind != IT_NORMAL;
  assign rb_up   = b_zero ? '0 : ib_up;
  assign rb_dn   = b_zero ? '0 : ib_dn;

  // ---------------- addition recovery and product accumulation ----------------
  logic              s_sof, s_vld, v0, v1;
  logic [64:0]       s0, s1;
  logic [HIDX_W-1:0] h0, h1;
  logic              slot_done;

  addition_recovery #(.N(K), .HIDX_W(HIDX_W)) u_rec (
    .clk, .rst_n, .clear, .in_sof(ia_sof), .in_vld(ia_vld), .in_kind(r_kind),
    .in_half(ia_tag[HIDX_W-1:0]), .a_up(ia_up), .a_dn(ia_dn), .b_up(rb_up), .b_dn(rb_dn),
    .s_sof, .s_vld, .s0, .s1, .v0, .v1, .h0, .h1);

  product_accum #(.N(K), .B(B), .HIDX_W(HIDX_W), .ZAW(ZAW)) u_acc (
    .clk, .rst_n, .clear, .s_sof, .s_vld, .s0, .s1, .v0, .v1, .h0, .h1,
    .z_re, .z_raddr, .z_rdata, .z_we, .z_waddr, .z_wdata, .slot_done, .mult_done(acc_done));

  // the two paths run in lock step
  assert property (@(posedge clk) disable iff (!rst_n)
    fa_sof == fb_sof && ia_sof == ib_sof && ia_vld == ib_vld && ia_tag == ib_tag);
endmodule

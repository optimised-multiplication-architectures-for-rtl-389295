// Multiplier pair for the encryption step of FHE over the integers,
// c = m + 2r + 2 * sum_i X_i * B_i mod X0.
//
// Two large-integer multipliers share one accelerator and are used one at a time:
//  * the low-Hamming-weight (LHW) multiplier computes X_i * B_i, where B_i has
//    at most 15 set bits and is stored as the list of their indices;
//  * the low-latency integer-FFT multiplier handles general products, such as
//    the two multiplications of a Barrett reduction mod X0.
// The top only schedules them serially: a start request is accepted when neither
// multiplier is busy, and a request arriving while one is busy is refused
// (`start_refused` pulses). The operand and product memories are external; each
// multiplier's RAM ports are brought out unchanged (see lhw_mult and
// lowlat_fft_mult for their timing). The accumulation over i and the Barrett
// reduction sequence are left to the host.
// If both starts arrive together the FFT multiplier wins (a choice of this
// design). An assertion checks the two are never busy at once; lint notes rst_n
// as both the synchronous reset and that assertion's asynchronous disable.
module fhe_mult_top #(
  // low-latency integer-FFT multiplier
  parameter int unsigned K     = 256,
  parameter int unsigned B     = 28,
  parameter int unsigned N_F   = 17,
  parameter int unsigned N_PW  = 15,
  parameter int unsigned AW    = 28,
  // LHW multiplier
  parameter int unsigned NBLK  = 256,
  parameter int unsigned HW    = 15,
  parameter int unsigned IDXW  = 12,
  parameter int unsigned LXAW  = 17,
  parameter int unsigned LZAW  = 17
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // requests
  input  logic                    start_fft,
  input  logic [AW-1:0]           fft_nxb,
  input  logic [AW-1:0]           fft_nyb,
  input  logic                    start_lhw,
  input  logic [$clog2(HW+1)-1:0] lhw_y_hw,
  input  logic [LXAW:0]           lhw_nxb,
  input  logic [LZAW:0]           lhw_nzb,
  output logic                    busy,
  output logic                    fft_done,
  output logic                    lhw_done,
  output logic                    start_refused,
  // FFT multiplier memories
  output logic                    fx_a_re,
  output logic [AW-1:0]           fx_a_addr,
  input  logic [B-1:0]            fx_a_rdata,
  output logic                    fx_b_re,
  output logic [AW-1:0]           fx_b_addr,
  input  logic [B-1:0]            fx_b_rdata,
  output logic                    fy_re,
  output logic [AW-1:0]           fy_addr,
  input  logic [B-1:0]            fy_rdata,
  output logic                    fz_re,
  output logic [AW-1:0]           fz_raddr,
  input  logic [2*B-1:0]          fz_rdata,
  output logic                    fz_we,
  output logic [AW-1:0]           fz_waddr,
  output logic [2*B-1:0]          fz_wdata,
  // LHW multiplier memories
  output logic                    ly_re,
  output logic [$clog2(HW)-1:0]   ly_addr,
  input  logic [IDXW-1:0]         ly_rdata,
  output logic [LXAW-1:0]         lx_addr [2*HW],
  input  logic [NBLK-1:0]         lx_rdata [2*HW],
  output logic                    lz_we,
  output logic [LZAW-1:0]         lz_addr,
  output logic [NBLK-1:0]         lz_wdata
);
  logic fft_busy, lhw_busy, go_fft, go_lhw;

  // serial scheduling: one multiplier at a time, FFT request wins a tie
  assign busy          = fft_busy || lhw_busy;
  assign go_fft        = start_fft && !busy;
  assign go_lhw        = start_lhw && !busy && !start_fft;
  assign start_refused = (start_fft && !go_fft) || (start_lhw && !go_lhw);

  lowlat_fft_mult #(.K(K), .B(B), .N_F(N_F), .N_PW(N_PW), .AW(AW)) u_fft (
    .clk, .rst_n, .start(go_fft), .nxb(fft_nxb), .nyb(fft_nyb), .busy(fft_busy), .done(fft_done),
    .xa_re(fx_a_re), .xa_addr(fx_a_addr), .xa_rdata(fx_a_rdata),
    .xb_re(fx_b_re), .xb_addr(fx_b_addr), .xb_rdata(fx_b_rdata),
    .y_re(fy_re), .y_addr(fy_addr), .y_rdata(fy_rdata),
    .z_re(fz_re), .z_raddr(fz_raddr), .z_rdata(fz_rdata),
    .z_we(fz_we), .z_waddr(fz_waddr), .z_wdata(fz_wdata));

  lhw_mult #(.NBLK(NBLK), .HW(HW), .IDXW(IDXW), .XAW(LXAW), .ZAW(LZAW)) u_lhw (
    .clk, .rst_n, .start(go_lhw), .y_hw(lhw_y_hw), .nxb(lhw_nxb), .nzb(lhw_nzb),
    .busy(lhw_busy), .done(lhw_done),
    .y_re(ly_re), .y_addr(ly_addr), .y_rdata(ly_rdata),
    .x_addr(lx_addr), .x_rdata(lx_rdata),
    .z_we(lz_we), .z_addr(lz_addr), .z_wdata(lz_wdata));

  assert property (@(posedge clk) disable iff (!rst_n) !(fft_busy && lhw_busy));
endmodule

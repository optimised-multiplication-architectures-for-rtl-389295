// Serial k-point number-theoretic transform (the "FFT"/"IFFT" modules) built
// from log2(k) R2MDC stages, one radix-2 DIT butterfly per stage.
//
// Forward (INVERSE=0): input in natural order, up lane = elements 0..k/2-1, dn
// lane = elements k/2..k-1, one pair per cycle for k/2 cycles. In the multiplier
// the dn lane is the zero padding of the operand. Stage spans are k/2, k/4, ..., 1
// and the buffers shrink from k/4 to 1. Output is bit-reversed: at cycle tau
// after out_sof, up/dn carry array positions 2*tau and 2*tau+1, holding
// X[bitrev(2*tau)] and X[bitrev(2*tau+1)].
// Inverse (INVERSE=1): takes that bit-reversed order, spans 1, 2, ..., k/2 and
// buffers growing from 1 to k/4, and returns natural order: up lane = outputs
// 0..k/2-1, dn lane = k/2..k-1. It does NOT divide by k (the point-wise stage
// folds in 1/k).
// Latency: sum of the buffer depths (k/2 - 1) + (log2 k - 1)*(MUL_LAT+1) + 1.
// The two-lane serial structure with one butterfly per stage follows the source
// architecture; the exact twiddle ordering and tag channel are this design's.
module ntt_r2mdc
  import fhe_pkg::*;
#(
  parameter int unsigned N       = 256,
  parameter bit          INVERSE = 1'b0,
  parameter int unsigned MUL_LAT = 16,
  parameter int unsigned TAG_W   = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_sof,
  input  logic             in_vld,
  input  logic [TAG_W-1:0] in_tag,
  input  fe_t              in_up,
  input  fe_t              in_dn,
  output logic             out_sof,
  output logic             out_vld,
  output logic [TAG_W-1:0] out_tag,
  output fe_t              out_up,
  output fe_t              out_dn
);
  localparam int unsigned S = $clog2(N);
  localparam int unsigned T = N / 2;

  logic             sof [S+1];
  logic             vld [S+1];
  logic [TAG_W-1:0] tag [S+1];
  fe_t              up  [S+1];
  fe_t              dn  [S+1];

  assign sof[0] = in_sof;
  assign vld[0] = in_vld;
  assign tag[0] = in_tag;
  assign up[0]  = in_up;
  assign dn[0]  = in_dn;

  for (genvar s = 0; s < int'(S); s++) begin : g_stage
    localparam int unsigned SPAN = INVERSE ? (1 << s) : (T >> s);
    r2mdc_stage #(
      .N(N), .SPAN(SPAN), .INVERSE(INVERSE), .FIRST(s == 0),
      .MUL_LAT(MUL_LAT), .TAG_W(TAG_W)
    ) u_stage (
      .clk(clk), .rst_n(rst_n),
      .in_sof(sof[s]),   .in_vld(vld[s]),   .in_tag(tag[s]),
      .in_up(up[s]),     .in_dn(dn[s]),
      .out_sof(sof[s+1]), .out_vld(vld[s+1]), .out_tag(tag[s+1]),
      .out_up(up[s+1]),   .out_dn(dn[s+1])
    );
  end

  assign out_sof = sof[S];
  assign out_vld = vld[S];
  assign out_tag = tag[S];
  assign out_up  = up[S];
  assign out_dn  = dn[S];

  initial assert (N >= 4 && (1 << S) == N) else $error("ntt_r2mdc: N must be a power of two >= 4");
endmodule

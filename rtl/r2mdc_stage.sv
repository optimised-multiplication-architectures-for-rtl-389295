// One processing stage of a radix-2 multi-path delay commutator (R2MDC) NTT.
//
// Two lanes (up, dn) enter one sample each per cycle. The stage pairs samples that
// lie SPAN positions apart and feeds them to one radix-2 DIT butterfly:
//   dn -> delay D -> commutator (two 2:1 muxes) ; top mux -> delay D -> butterfly a
//                                                 bottom mux ------------> butterfly b
// The commutator is straight for D cycles and crossed for the next D, counted from
// the frame start `in_sof`. D is SPAN in the forward transform and SPAN/2 in the
// inverse one; the first stage of either transform (FIRST) needs no buffers and
// its twiddle is always 1.
//
// Stream order (the same at every stage output): at cycle tau after out_sof,
// up carries array position 2*SPAN*(tau/SPAN) + tau%SPAN and dn the position SPAN
// higher. A frame is N/2 cycles; frames may follow back to back or with gaps.
// Twiddles (w = primitive N-th root of unity mod p):
//   forward : w^(SPAN * bitrev(tau/SPAN))   (natural in, bit-reversed out)
//   inverse : w^-((N/2/SPAN) * (tau%SPAN))  (bit-reversed in, natural out)
// Latency: D + butterfly latency (1 when FIRST, MUL_LAT + 1 otherwise).
// The buffer/commutator/butterfly arrangement follows the source architecture;
// the twiddle schedule and the tag side channel are this design's own.
module r2mdc_stage
  import fhe_pkg::*;
#(
  parameter int unsigned N       = 256,  // transform points k
  parameter int unsigned SPAN    = 64,   // butterfly pair distance
  parameter bit          INVERSE = 1'b0,
  parameter bit          FIRST   = 1'b0,
  parameter int unsigned MUL_LAT = 16,
  parameter int unsigned TAG_W   = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_sof,   // first cycle of a frame
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
  localparam int unsigned T     = N / 2;
  localparam int unsigned TW    = (T > 1) ? $clog2(T) : 1;
  localparam int unsigned D     = FIRST ? 0 : (INVERSE ? SPAN / 2 : SPAN);
  localparam int unsigned BFLAT = FIRST ? 1 : MUL_LAT + 1;
  localparam int unsigned LAT   = D + BFLAT;
  localparam int unsigned LOGM  = $clog2(T / SPAN);   // forward: bits of block index

  // ---------------- twiddle table: w^(+-e), e in [0, T) ----------------
  typedef fe_t tw_tab_t [T];
  function automatic tw_tab_t make_tab();
    tw_tab_t t;
    fe_t w, acc;
    w = mod_pow_const(GEN, (P - 1) / 64'(N));
    if (INVERSE) w = mod_pow_const(w, 64'(N - 1));
    acc = 64'd1;
    for (int unsigned e = 0; e < T; e++) begin
      t[e] = acc;
      acc  = mod_mul_const(acc, w);
    end
    return t;
  endfunction
  localparam tw_tab_t TWID = make_tab();

  // ---------------- commutator and delay buffers ----------------
  fe_t a_in, b_in;
  logic [TW-1:0] cnt_in;   // position within frame at the stage input

  if (D == 0) begin : g_nobuf
    assign a_in = in_up;
    assign b_in = in_dn;
    assign cnt_in = '0;
  end else begin : g_buf
    localparam int unsigned PB = $clog2(D);
    fe_t dn_dly [D];
    fe_t top_dly [D];
    fe_t top_mux, bot_mux;
    logic [TW-1:0] cnt_q;
    logic phase;

    assign cnt_in = in_sof ? '0 : cnt_q;
    assign phase  = cnt_in[PB];
    assign top_mux = phase ? dn_dly[D-1] : in_up;
    assign bot_mux = phase ? in_up : dn_dly[D-1];

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) cnt_q <= '0;
      else        cnt_q <= cnt_in + 1'b1;

    always_ff @(posedge clk) begin
      dn_dly[0]  <= in_dn;
      top_dly[0] <= top_mux;
      for (int i = 1; i < int'(D); i++) begin
        dn_dly[i]  <= dn_dly[i-1];
        top_dly[i] <= top_dly[i-1];
      end
    end
    assign a_in = top_dly[D-1];
    assign b_in = bot_mux;
  end

  // ---------------- control side channel, delayed by LAT ----------------
  logic             sof_d [LAT];
  logic             vld_d [LAT];
  logic [TAG_W-1:0] tag_d [LAT];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < int'(LAT); i++) begin
        sof_d[i] <= 1'b0;
        vld_d[i] <= 1'b0;
        tag_d[i] <= '0;
      end
    end else begin
      sof_d[0] <= in_sof;
      vld_d[0] <= in_vld;
      tag_d[0] <= in_tag;
      for (int i = 1; i < int'(LAT); i++) begin
        sof_d[i] <= sof_d[i-1];
        vld_d[i] <= vld_d[i-1];
        tag_d[i] <= tag_d[i-1];
      end
    end
  assign out_sof = sof_d[LAT-1];
  assign out_vld = vld_d[LAT-1];
  assign out_tag = tag_d[LAT-1];

  // ---------------- twiddle selection at the butterfly input ----------------
  // The pair reaching the butterfly now belongs to output position tau = cnt_bf.
  logic          bf_sof;
  logic [TW-1:0] cnt_bf, cnt_bf_q;
  logic [TW-1:0] tw_idx;
  fe_t           w;

  if (D == 0) begin : g_sof0
    assign bf_sof = in_sof;
  end else begin : g_sofd
    logic sof_buf [D];
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) for (int i = 0; i < int'(D); i++) sof_buf[i] <= 1'b0;
      else begin
        sof_buf[0] <= in_sof;
        for (int i = 1; i < int'(D); i++) sof_buf[i] <= sof_buf[i-1];
      end
    assign bf_sof = sof_buf[D-1];
  end

  assign cnt_bf = bf_sof ? '0 : cnt_bf_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cnt_bf_q <= '0;
    else        cnt_bf_q <= cnt_bf + 1'b1;

  always_comb begin
    int unsigned blk, j;
    blk = int'(cnt_bf) / SPAN;
    j   = int'(cnt_bf) % SPAN;
    if (INVERSE) tw_idx = TW'((T / SPAN) * j);
    else         tw_idx = TW'(SPAN * bitrev(blk, LOGM));
  end
  assign w = TWID[tw_idx];

  ntt_butterfly #(.MUL_LAT(MUL_LAT), .TRIVIAL(FIRST)) u_bf (
    .clk(clk), .a(a_in), .b(b_in), .w(w), .up(out_up), .dn(out_dn)
  );
endmodule

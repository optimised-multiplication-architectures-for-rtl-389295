// Point-wise multiplication of two spectra, one lane pair per cycle.
//
// Each cycle carries two spectrum points (up and dn lane), so the module holds two
// modular multipliers in parallel, as in the source architecture. The 1/k factor
// of the inverse transform is folded in here: after each product the value is
// halved log2(k) times modulo p (add p if odd, shift right), which needs only
// adders. Output Z = X*Y/k mod p. Latency NPW cycles (NPW-1 in the multiplier and
// one for the halving chain); the side channel (sof, vld, tag) is delayed alike.
module pointwise_mult
  import fhe_pkg::*;
#(
  parameter int unsigned N     = 256,  // transform points k (power of two)
  parameter int unsigned NPW   = 15,   // pipeline depth, >= 3
  parameter int unsigned TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_sof,
  input  logic             in_vld,
  input  logic [TAG_W-1:0] in_tag,
  input  fe_t              x_up, x_dn,
  input  fe_t              y_up, y_dn,
  output logic             out_sof,
  output logic             out_vld,
  output logic [TAG_W-1:0] out_tag,
  output fe_t              z_up, z_dn
);
  localparam int unsigned LOGN = $clog2(N);
  fe_t m_up, m_dn;

  mod_mult #(.LAT(NPW - 1)) u_mul_up (.clk(clk), .a(x_up), .b(y_up), .q(m_up));
  mod_mult #(.LAT(NPW - 1)) u_mul_dn (.clk(clk), .a(x_dn), .b(y_dn), .q(m_dn));

  function automatic fe_t div_k(fe_t v);
    fe_t r;
    r = v;
    for (int i = 0; i < int'(LOGN); i++) r = mod_half(r);
    return r;
  endfunction

  always_ff @(posedge clk) begin
    z_up <= div_k(m_up);
    z_dn <= div_k(m_dn);
  end

  logic             sof_d [NPW];
  logic             vld_d [NPW];
  logic [TAG_W-1:0] tag_d [NPW];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < int'(NPW); i++) begin
        sof_d[i] <= 1'b0; vld_d[i] <= 1'b0; tag_d[i] <= '0;
      end
    end else begin
      sof_d[0] <= in_sof; vld_d[0] <= in_vld; tag_d[0] <= in_tag;
      for (int i = 1; i < int'(NPW); i++) begin
        sof_d[i] <= sof_d[i-1]; vld_d[i] <= vld_d[i-1]; tag_d[i] <= tag_d[i-1];
      end
    end
  assign out_sof = sof_d[NPW-1];
  assign out_vld = vld_d[NPW-1];
  assign out_tag = tag_d[NPW-1];
endmodule

// Radix-2 decimation-in-time butterfly modulo p: up = a + w*b, dn = a - w*b.
//
// The twiddle product w*b comes from a pipelined modular multiplier of MUL_LAT
// cycles; `a` is delayed to match, and the final modular add and subtract are one
// register stage. Latency is MUL_LAT + 1. When TRIVIAL is set the twiddle is
// known to be 1 (first stage of each transform), the multiplier is left out and
// the latency is 1, as the source design assumes for its first-stage butterflies.
module ntt_butterfly
  import fhe_pkg::*;
#(
  parameter int unsigned MUL_LAT = 16,
  parameter bit          TRIVIAL = 1'b0
) (
  input  logic clk,
  input  fe_t  a,
  input  fe_t  b,
  input  fe_t  w,     // ignored when TRIVIAL
  output fe_t  up,
  output fe_t  dn
);
  fe_t a_al, wb;

  if (TRIVIAL) begin : g_triv
    assign a_al = a;
    assign wb   = b;
  end else begin : g_mul
    fe_t a_dly [MUL_LAT];
    mod_mult #(.LAT(MUL_LAT)) u_mul (.clk(clk), .a(w), .b(b), .q(wb));
    always_ff @(posedge clk) begin
      a_dly[0] <= a;
      for (int i = 1; i < int'(MUL_LAT); i++) a_dly[i] <= a_dly[i-1];
    end
    assign a_al = a_dly[MUL_LAT-1];
  end

  always_ff @(posedge clk) begin
    up <= mod_add(a_al, wb);
    dn <= mod_sub(a_al, wb);
  end
endmodule

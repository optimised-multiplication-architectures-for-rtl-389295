// Solinas modular reduction for p = 2^64 - 2^32 + 1.
//
// Splits a 128-bit product into 32-bit words x = 2^96 a + 2^64 b + 2^32 c + d and
// uses 2^96 = -1 and 2^64 = 2^32 - 1 (mod p) to form r = 2^32 (b + c) - a - b + d,
// which lies in (-p, 2p). One addition (r + p), one subtraction (r - p) and a
// 3-to-1 multiplexer then give the result in [0, p). This structure is the one
// the source architecture prescribes; the module is purely combinational and the
// caller places the pipeline register after it.
module solinas_reduce
  import fhe_pkg::*;
(
  input  logic [127:0] x,   // value to reduce (any 128-bit value)
  output fe_t          r    // x mod p
);
  logic [31:0] a, b, c, d;
  logic signed [67:0] t, t_plus_p, t_minus_p;

  always_comb begin
    {a, b, c, d} = x;
    t         = ((68'(b) + 68'(c)) <<< 32) - 68'(a) - 68'(b) + 68'(d);
    t_plus_p  = t + 68'(P);
    t_minus_p = t - 68'(P);
    // 3 -> 1 selection
    if (t < 0)              r = t_plus_p[63:0];
    else if (t >= 68'(P))   r = t_minus_p[63:0];
    else                    r = t[63:0];
  end
endmodule

// Pipelined modular multiplier: q = a * b mod p, p = 2^64 - 2^32 + 1.
//
// A full 64x64 -> 128-bit product is registered and carried through LAT-2 further
// register stages (the place where an FPGA flow maps a DSP-block multiplier with
// its internal pipeline), then reduced by the Solinas reduction and registered
// once more. Latency is exactly LAT cycles, one result per cycle, no stall.
// The default of 16 makes a butterfly (multiplier + one add/sub stage) 17 stages
// deep, the butterfly depth the source design reports as optimal.
module mod_mult
  import fhe_pkg::*;
#(
  parameter int unsigned LAT = 16   // total latency in cycles, >= 2
) (
  input  logic clk,
  input  fe_t  a,
  input  fe_t  b,
  output fe_t  q
);
  logic [127:0] prod [LAT-1];
  fe_t          red;

  always_ff @(posedge clk) begin
    prod[0] <= 128'(a) * 128'(b);
    for (int i = 1; i < int'(LAT) - 1; i++) prod[i] <= prod[i-1];
    q <= red;
  end

  solinas_reduce u_red (.x(prod[LAT-2]), .r(red));

  initial assert (LAT >= 2) else $error("mod_mult: LAT must be at least 2");
endmodule

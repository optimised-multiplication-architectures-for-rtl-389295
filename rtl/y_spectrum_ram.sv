// On-chip RAM holding the transformed y block Y_i (the "RAM {Y_i}" of the
// integer-FFT datapath).
//
// The spectrum of y block i is written once, during the first inner iteration of
// outer iteration i, and read back in the same lane-pair order for every later
// inner iteration. One entry per cycle position: DEPTH = k/2 entries of two field
// elements (up and dn lane). Synchronous write, asynchronous read (distributed
// RAM style) so a read address and its data sit in the same cycle.
module y_spectrum_ram
  import fhe_pkg::*;
#(
  parameter int unsigned DEPTH = 128
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  fe_t                      wdata_up,
  input  fe_t                      wdata_dn,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output fe_t                      rdata_up,
  output fe_t                      rdata_dn
);
  fe_t mem_up [DEPTH];
  fe_t mem_dn [DEPTH];

  always_ff @(posedge clk)
    if (we) begin
      mem_up[waddr] <= wdata_up;
      mem_dn[waddr] <= wdata_dn;
    end

  assign rdata_up = mem_up[raddr];
  assign rdata_dn = mem_dn[raddr];
endmodule

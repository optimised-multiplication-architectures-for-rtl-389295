// Concatenation unit of the low-Hamming-weight (LHW) multiplier.
//
// For one set bit e of the LHW operand y, the block of x << e that lands in
// product block c is the NBLK-bit window of x starting at bit lo = c*NBLK - e.
// The window straddles two stored x blocks, lo_blk = floor(lo/NBLK) ("low") and
// lo_blk + 1 ("high"); the unit reads both, shifts the high block left and the low
// block right by the in-block offset and concatenates. Blocks below 0 or at/after
// the x block count read as zero, which gives the zero fill at both ends of x.
// NBLK is a power of two, so the multiply and divide are shifts.
// Timing: zc/e presented in cycle t -> RAM addresses in cycle t (x RAM returns data
// one cycle later) -> window registered, valid in cycle t+2. Disabled units
// (en = 0) output zero. The function follows the source architecture; the two-
// stage pipeline is this design's choice.
module lhw_concat_unit #(
  parameter int unsigned NBLK = 256,  // block bit length (power of two)
  parameter int unsigned IDXW = 12,   // bits of a set-bit index of y
  parameter int unsigned XAW  = 17,   // x block address width
  parameter int unsigned ZAW  = 17    // z block address width
) (
  input  logic            clk,
  input  logic            en,          // this unit holds a set bit
  input  logic [ZAW-1:0]  zc,          // product block address
  input  logic [IDXW-1:0] e,           // set-bit index of y
  input  logic [XAW:0]    nxb,         // number of x blocks
  output logic [XAW-1:0]  x_addr_lo,
  output logic [XAW-1:0]  x_addr_hi,
  input  logic [NBLK-1:0] x_data_lo,   // one cycle after the address
  input  logic [NBLK-1:0] x_data_hi,
  output logic [NBLK-1:0] window
);
  localparam int unsigned LB = $clog2(NBLK);
  localparam int unsigned SW = ZAW + LB + 2;   // signed bit-position width

  logic signed [SW-1:0] lo;
  logic signed [SW-LB-1:0] blk_lo, blk_hi;
  logic [LB-1:0] sh;
  logic ok_lo, ok_hi;

  always_comb begin
    lo     = (SW'(zc) <<< LB) - SW'(e);
    blk_lo = lo[SW-1:LB];
    blk_hi = blk_lo + 1;
    sh     = lo[LB-1:0];
    ok_lo  = en && blk_lo >= 0 && blk_lo < $signed((SW-LB)'(nxb));
    ok_hi  = en && blk_hi >= 0 && blk_hi < $signed((SW-LB)'(nxb));
    x_addr_lo = XAW'(blk_lo);
    x_addr_hi = XAW'(blk_hi);
  end

  logic          ok_lo_q, ok_hi_q;
  logic [LB-1:0] sh_q;
  logic [2*NBLK-1:0] cat;
  always_ff @(posedge clk) begin
    ok_lo_q <= ok_lo;
    ok_hi_q <= ok_hi;
    sh_q    <= sh;
  end
  assign cat = {ok_hi_q ? x_data_hi : '0, ok_lo_q ? x_data_lo : '0} >> sh_q;
  always_ff @(posedge clk) window <= cat[NBLK-1:0];
endmodule

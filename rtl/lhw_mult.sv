// Low-Hamming-weight (LHW) large-integer multiplier: z = x * y where y has at
// most HW set bits and is stored as the list of their indices.
//
// z is computed block by block (NBLK bits per block, one block per clock once
// the pipeline is full) as the sum of the HW shifted copies x << e_i falling in
// that block, plus the carry of the previous block. The FSM controller sequences
// index loading, the block loop and the pipeline drain; the data processing unit
// does the work. Multiplications and divisions by the block length are shifts
// (NBLK must be a power of two). Latency from start to done:
// (HW + 5) + nzb + (HW + 4) clocks: HW + 5 to load the indices and start the
// block counter, one clock per product block, and HW + 4 to drain the
// concatenation/adder pipeline.
// Interface: y index RAM (HW words of IDXW bits), x RAM with 2*HW read ports of
// NBLK bits (two per concatenation unit), z RAM write port of NBLK bits. All RAMs
// have one clock of read latency and are external. nxb = number of x blocks,
// nzb = number of product blocks to produce (ceil((nx + ny) / NBLK)).
module lhw_mult #(
  parameter int unsigned NBLK = 256,
  parameter int unsigned HW   = 15,
  parameter int unsigned IDXW = 12,
  parameter int unsigned XAW  = 17,
  parameter int unsigned ZAW  = 17
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [$clog2(HW+1)-1:0] y_hw,
  input  logic [XAW:0]            nxb,
  input  logic [ZAW:0]            nzb,
  output logic                    busy,
  output logic                    done,
  output logic                    y_re,
  output logic [$clog2(HW)-1:0]   y_addr,
  input  logic [IDXW-1:0]         y_rdata,
  output logic [XAW-1:0]          x_addr [2*HW],
  input  logic [NBLK-1:0]         x_rdata [2*HW],
  output logic                    z_we,
  output logic [ZAW-1:0]          z_addr,
  output logic [NBLK-1:0]         z_wdata
);
  logic load, run, load_done, run_done, drain_done;
  logic [$clog2(HW+1)-1:0] y_hw_q;
  logic [XAW:0]            nxb_q;
  logic [ZAW:0]            nzb_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      y_hw_q <= '0; nxb_q <= '0; nzb_q <= '0;
    end else if (start && !busy) begin
      y_hw_q <= y_hw; nxb_q <= nxb; nzb_q <= nzb;
    end

  lhw_ctrl u_ctrl (.clk, .rst_n, .start, .load_done, .run_done, .drain_done,
                   .load, .run, .busy, .done);

  lhw_dpu #(.NBLK(NBLK), .HW(HW), .IDXW(IDXW), .XAW(XAW), .ZAW(ZAW)) u_dpu (
    .clk, .rst_n, .load, .run, .y_hw(y_hw_q), .nxb(nxb_q), .nzb(nzb_q),
    .load_done, .run_done, .drain_done,
    .y_re, .y_addr, .y_rdata, .x_addr, .x_rdata, .z_we, .z_addr, .z_wdata);
endmodule

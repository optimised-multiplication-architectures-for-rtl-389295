// Data processing unit of the low-Hamming-weight multiplier, z = x * y with y
// given as the list of its set-bit indices.
//
// Parts: a y-index address counter reading the index RAM into a register array
// of HW entries; a product-block address counter running 0 .. nzb-1, one block
// per clock; HW concatenation units, one per set bit; a chain of HW adders with
// HW accumulation registers, stage j adding the window of unit j; and a final
// adder that adds the carry of the previous product block, writing the low NBLK
// bits to the product RAM and keeping the rest as the next carry.
// Unit j receives the block address delayed by j clocks so that its window meets
// the partial sum at chain stage j. Product block c is written HW+3 clocks after
// its address leaves the counter; after the pipeline fills one block is written
// per clock.
// Control: `load` starts index loading (HW clocks + 1), `run` starts the block
// counter; `load_done`, `run_done` and `drain_done` pulse at the ends of the
// phases. Indices beyond y_hw (count of set bits, <= HW) are disabled.
// Structure follows the source architecture (its data processing unit);
// pipeline depths and the enable of unused units are this design's choices.
module lhw_dpu #(
  parameter int unsigned NBLK = 256,
  parameter int unsigned HW   = 15,
  parameter int unsigned IDXW = 12,
  parameter int unsigned XAW  = 17,
  parameter int unsigned ZAW  = 17
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  logic                  run,
  input  logic [$clog2(HW+1)-1:0] y_hw,
  input  logic [XAW:0]          nxb,
  input  logic [ZAW:0]          nzb,
  output logic                  load_done,
  output logic                  run_done,
  output logic                  drain_done,
  // y index RAM
  output logic                  y_re,
  output logic [$clog2(HW)-1:0] y_addr,
  input  logic [IDXW-1:0]       y_rdata,
  // x RAM: two read ports per concatenation unit
  output logic [XAW-1:0]        x_addr [2*HW],
  input  logic [NBLK-1:0]       x_rdata [2*HW],
  // z RAM write port
  output logic                  z_we,
  output logic [ZAW-1:0]        z_addr,
  output logic [NBLK-1:0]       z_wdata
);
  localparam int unsigned YAW  = $clog2(HW);
  localparam int unsigned CW   = $clog2(HW) + 1;   // carry bits
  localparam int unsigned DRN  = HW + 3;

  // ---------------- y index counter and register array ----------------
  logic            loading, ld_wr;
  logic [YAW-1:0]  ycnt, ld_idx;
  logic [IDXW-1:0] idx [HW];
  logic [HW-1:0]   idx_en;

  assign y_re   = loading;
  assign y_addr = ycnt;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      loading <= 1'b0; ycnt <= '0; ld_wr <= 1'b0; ld_idx <= '0; load_done <= 1'b0;
    end else begin
      load_done <= 1'b0;
      ld_wr  <= loading;
      ld_idx <= ycnt;
      if (load) begin
        loading <= 1'b1; ycnt <= '0;
      end else if (loading) begin
        ycnt <= ycnt + 1'b1;
        if (ycnt == YAW'(HW - 1)) loading <= 1'b0;
      end
      if (ld_wr && ld_idx == YAW'(HW - 1)) load_done <= 1'b1;
    end

  always_ff @(posedge clk)
    if (ld_wr) idx[ld_idx] <= y_rdata;

  always_comb
    for (int j = 0; j < int'(HW); j++) idx_en[j] = j < int'(y_hw);

  // ---------------- product block counter ----------------
  logic           running;
  logic [ZAW-1:0] zcnt;
  logic [ZAW-1:0] zc_d [HW];     // block address seen by unit j
  logic           zv_d [DRN];    // block valid along the pipeline
  logic [ZAW-1:0] za_d [DRN];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      running <= 1'b0; zcnt <= '0; run_done <= 1'b0;
      for (int j = 0; j < int'(DRN); j++) begin zv_d[j] <= 1'b0; za_d[j] <= '0; end
    end else begin
      run_done <= 1'b0;
      if (run) begin
        running <= 1'b1; zcnt <= '0;
      end else if (running) begin
        zcnt <= zcnt + 1'b1;
        if ((ZAW+1)'(zcnt) == nzb - 1'b1) begin running <= 1'b0; run_done <= 1'b1; end
      end
      zv_d[0] <= running;
      za_d[0] <= zcnt;
      for (int j = 1; j < int'(DRN); j++) begin zv_d[j] <= zv_d[j-1]; za_d[j] <= za_d[j-1]; end
    end

  assign zc_d[0] = zcnt;
  for (genvar j = 1; j < int'(HW); j++) begin : g_zc
    assign zc_d[j] = za_d[j-1];
  end

  // ---------------- concatenation units ----------------
  logic [NBLK-1:0] win [HW];
  for (genvar j = 0; j < int'(HW); j++) begin : g_cu
    lhw_concat_unit #(.NBLK(NBLK), .IDXW(IDXW), .XAW(XAW), .ZAW(ZAW)) u_cu (
      .clk, .en(idx_en[j]), .zc(zc_d[j]), .e(idx[j]), .nxb,
      .x_addr_lo(x_addr[2*j]), .x_addr_hi(x_addr[2*j+1]),
      .x_data_lo(x_rdata[2*j]), .x_data_hi(x_rdata[2*j+1]),
      .window(win[j]));
  end

  // ---------------- adder chain, carry and product block register ----------------
  logic [NBLK+CW-1:0] acc [HW];
  logic [CW-1:0]      carry;
  logic [NBLK+CW-1:0] fin;

  always_ff @(posedge clk) begin
    acc[0] <= (NBLK+CW)'(win[0]);
    for (int j = 1; j < int'(HW); j++) acc[j] <= acc[j-1] + (NBLK+CW)'(win[j]);
  end

  assign fin = acc[HW-1] + (NBLK+CW)'(carry);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      carry <= '0; z_we <= 1'b0; z_addr <= '0; z_wdata <= '0; drain_done <= 1'b0;
    end else begin
      drain_done <= 1'b0;
      z_we <= zv_d[DRN-2];
      if (zv_d[DRN-2]) begin
        z_addr  <= za_d[DRN-2];
        z_wdata <= fin[NBLK-1:0];
        carry   <= fin[NBLK+CW-1:NBLK];
      end
      if (run) carry <= '0;
      if (zv_d[DRN-1] && !zv_d[DRN-2]) drain_done <= 1'b1;
    end
endmodule

// Self-checking test of the LHW data processing unit driven directly (no FSM):
// pulses load, waits for load_done, pulses run and waits for drain_done, for
// random x and index lists (NBLK = 16, HW = 4). The product RAM must equal the
// shift-and-add product formed here; the clocks between run and the first product
// write must be HW + 4, and product blocks must be written on consecutive clocks.
module tb_lhw_dpu;
  localparam int unsigned NBLK = 16, HW = 4, IDXW = 7, XAW = 5, ZAW = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load, run, load_done, run_done, drain_done, y_re, z_we;
  logic [$clog2(HW+1)-1:0] y_hw;
  logic [XAW:0] nxb;
  logic [ZAW:0] nzb;
  logic [$clog2(HW)-1:0] y_addr;
  logic [IDXW-1:0] y_rdata;
  logic [XAW-1:0] x_addr [2*HW];
  logic [NBLK-1:0] x_rdata [2*HW];
  logic [ZAW-1:0] z_addr;
  logic [NBLK-1:0] z_wdata;
  logic [NBLK-1:0] xmem [1 << XAW];
  logic [IDXW-1:0] ymem [HW];
  logic [NBLK-1:0] zmem [1 << ZAW];
  int checks = 0, failures = 0, cyc = 0, first_we = -1, nwe = 0, last_we = -1;

  lhw_dpu #(.NBLK(NBLK), .HW(HW), .IDXW(IDXW), .XAW(XAW), .ZAW(ZAW)) dut (.*);

  always_ff @(posedge clk) begin
    y_rdata <= ymem[y_addr];
    for (int p = 0; p < int'(2 * HW); p++) x_rdata[p] <= xmem[x_addr[p]];
    if (z_we) zmem[z_addr] <= z_wdata;
  end
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && z_we) begin
      if (first_we < 0) first_we = cyc;
      if (last_we >= 0 && cyc != last_we + 1) begin failures++; $display("FAIL gap in writes"); end
      last_we = cyc; nwe++;
    end
  end

  task automatic mult(int bx, int nset);
    logic [1023:0] xv, zv, got;
    int nz, trun;
    xv = '0; zv = '0;
    for (int b = 0; b < bx; b++) begin xmem[b] = NBLK'($urandom); xv |= 1024'(xmem[b]) << (NBLK * b); end
    for (int i = 0; i < int'(HW); i++) ymem[i] = IDXW'($urandom);
    for (int i = 0; i < nset; i++) zv += xv << ymem[i];
    nz = (bx * NBLK + (1 << IDXW) + NBLK - 1) / NBLK;
    first_we = -1; last_we = -1; nwe = 0;
    @(negedge clk); y_hw = ($clog2(HW+1))'(nset); nxb = (XAW+1)'(bx); nzb = (ZAW+1)'(nz); load = 1;
    @(negedge clk); load = 0;
    while (!load_done) @(negedge clk);
    run = 1; trun = cyc; @(negedge clk); run = 0;
    while (!drain_done) @(negedge clk);
    checks += 3;
    if (first_we - trun != int'(HW + 4)) begin failures++; $display("FAIL first write after %0d", first_we - trun); end
    if (nwe != nz) begin failures++; $display("FAIL %0d writes, exp %0d", nwe, nz); end
    got = '0;
    for (int b = 0; b < nz; b++) got |= 1024'(zmem[b]) << (NBLK * b);
    if (got !== zv) begin failures++; $display("FAIL product bx=%0d nset=%0d", bx, nset); end
  endtask

  initial begin
    load = 0; run = 0; y_hw = 0; nxb = 0; nzb = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    mult(3, 4);
    mult(6, 2);
    mult(1, 4);
    mult(10, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

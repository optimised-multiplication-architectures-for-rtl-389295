// Self-checking test of the low-Hamming-weight multiplier.
// Small blocks (NBLK = 16, HW = 5, 8-bit indices) keep the run short. RAMs are
// modelled here with one clock of read latency. Random x of several block counts
// is multiplied by y with 1..HW distinct set bits, including index 0, the largest
// index and all-ones x (longest carries); the product RAM is compared with a wide
// multiplication, and start-to-done clocks with (HW+5) + nzb + (HW+4).
module tb_lhw_mult;
  localparam int unsigned NBLK = 16, HW = 5, IDXW = 8, XAW = 6, ZAW = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, y_re, z_we;
  logic [$clog2(HW+1)-1:0] y_hw;
  logic [XAW:0] nxb;
  logic [ZAW:0] nzb;
  logic [$clog2(HW)-1:0] y_addr;
  logic [IDXW-1:0] y_rdata;
  logic [XAW-1:0] x_addr [2*HW];
  logic [NBLK-1:0] x_rdata [2*HW];
  logic [ZAW-1:0] z_addr;
  logic [NBLK-1:0] z_wdata;

  lhw_mult #(.NBLK(NBLK), .HW(HW), .IDXW(IDXW), .XAW(XAW), .ZAW(ZAW)) dut (.*);

  logic [NBLK-1:0] xmem [1 << XAW];
  logic [IDXW-1:0] ymem [HW];
  logic [NBLK-1:0] zmem [1 << ZAW];
  always_ff @(posedge clk) begin
    y_rdata <= ymem[y_addr];
    for (int p = 0; p < int'(2 * HW); p++) x_rdata[p] <= xmem[x_addr[p]];
    if (z_we) zmem[z_addr] <= z_wdata;
  end

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic run(int unsigned bx, int unsigned nset, bit ones, bit edges);
    logic [2047:0] xv, yv, zv, got;
    int unsigned e, nz, t0, lat;
    bit used [1 << IDXW];
    xv = '0; yv = '0;
    for (int b = 0; b < int'(bx); b++) begin
      xmem[b] = ones ? '1 : NBLK'($urandom);
      xv |= 2048'(xmem[b]) << (NBLK * b);
    end
    for (int b = int'(bx); b < (1 << XAW); b++) xmem[b] = NBLK'($urandom);  // must be ignored
    for (int i = 0; i < (1 << IDXW); i++) used[i] = 0;
    for (int i = 0; i < int'(HW); i++) ymem[i] = IDXW'($urandom);          // unused entries
    for (int i = 0; i < int'(nset); i++) begin
      if (edges && i == 0) e = 0;
      else if (edges && i == 1) e = (1 << IDXW) - 1;
      else do e = $urandom % (1 << IDXW); while (used[e]);
      used[e] = 1;
      ymem[i] = IDXW'(e);
      yv |= 2048'(1) << e;
    end
    zv = xv * yv;
    nz = (bx * NBLK + (1 << IDXW) + NBLK - 1) / NBLK;
    @(posedge clk);
    y_hw <= ($clog2(HW+1))'(nset); nxb <= (XAW+1)'(bx); nzb <= (ZAW+1)'(nz); start <= 1;
    t0 = cyc + 1;
    @(posedge clk); start <= 0;
    while (!done) @(posedge clk);
    lat = cyc - t0;
    checks++;
    if (lat != (HW + 5) + nz + (HW + 4)) begin
      failures++; $display("FAIL latency %0d exp %0d", lat, (HW + 5) + nz + (HW + 4)); end
    got = '0;
    for (int b = 0; b < int'(nz); b++) got |= 2048'(zmem[b]) << (NBLK * b);
    checks++;
    if (got !== zv) begin failures++; $display("FAIL product bx=%0d nset=%0d\n got %h\n exp %h", bx, nset, got, zv); end
    else $display("ok bx=%0d nset=%0d nzb=%0d latency %0d", bx, nset, nz, lat);
  endtask

  initial begin
    start = 0; y_hw = 0; nxb = 0; nzb = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    run(1, 2, 1, 1);
    run(3, 5, 0, 1);
    run(1, 1, 0, 0);
    run(8, 4, 0, 0);
    run(20, 5, 1, 1);
    run(12, 5, 0, 0);
    run(5, 2, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

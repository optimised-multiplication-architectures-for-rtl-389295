// Workload test of the top level with its default parameters: the larger
// published operand sizes, run end to end. Integer-FFT multiplications: Small
// Type I (830000 x 1476 bits), Medium Type II (4200000 x 4126 bits, two y blocks),
// Large Type I (19350000 x 2556 bits) and Large Type II (19350000 x 10251 bits,
// three y blocks). LHW multiplications with 15 set bits:
// Small, Medium and Large (830000, 4200000 and 19350000-bit x; indices below the
// published y lengths). RAM models keep one clock of read latency and are sized
// for the largest case. References are schoolbook products on 16-bit (FFT) and
// 32-bit (LHW) word arrays; products are compared in full and start-to-done
// clocks are checked against F*k/2 + D0 + k/2 + 5 and (HW+5) + nzb + (HW+4).
module tb_fhe_mult_workloads;
  localparam int unsigned K = 256, T = K / 2, B = 28, NF = 17, NPW = 15;
  localparam int unsigned S = $clog2(K);
  localparam int unsigned D0 = 2 * (T - 1) + 2 * (S - 1) * NF + 2 + NPW;
  localparam int unsigned NBLK = 256, HW = 15, IDXW = 12;
  localparam int unsigned FMEM = 1 << 20, LMEM = 1 << 17;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start_fft, start_lhw, busy, fft_done, lhw_done, start_refused;
  logic [27:0] fft_nxb, fft_nyb;
  logic [3:0] lhw_y_hw;
  logic [17:0] lhw_nxb, lhw_nzb;
  logic fx_a_re, fx_b_re, fy_re, fz_re, fz_we, ly_re, lz_we;
  logic [27:0] fx_a_addr, fx_b_addr, fy_addr, fz_raddr, fz_waddr;
  logic [B-1:0] fx_a_rdata, fx_b_rdata, fy_rdata;
  logic [2*B-1:0] fz_rdata, fz_wdata;
  logic [3:0] ly_addr;
  logic [IDXW-1:0] ly_rdata;
  logic [16:0] lx_addr [2*HW];
  logic [NBLK-1:0] lx_rdata [2*HW];
  logic [16:0] lz_addr;
  logic [NBLK-1:0] lz_wdata;

  fhe_mult_top dut (.*);

  logic [B-1:0]    xmem [FMEM];
  logic [B-1:0]    ymem [FMEM];
  logic [2*B-1:0]  zmem [FMEM];
  logic [NBLK-1:0] lxmem [LMEM];
  logic [IDXW-1:0] lymem [16];
  logic [NBLK-1:0] lzmem [LMEM];
  always_ff @(posedge clk) begin
    fx_a_rdata <= xmem[fx_a_addr % FMEM];
    fx_b_rdata <= xmem[fx_b_addr % FMEM];
    fy_rdata   <= ymem[fy_addr % FMEM];
    fz_rdata   <= zmem[fz_raddr % FMEM];
    if (fz_we) zmem[fz_waddr % FMEM] <= fz_wdata;
    ly_rdata <= lymem[ly_addr];
    for (int p = 0; p < int'(2 * HW); p++) lx_rdata[p] <= lxmem[lx_addr[p] % LMEM];
    if (lz_we) lzmem[lz_addr % LMEM] <= lz_wdata;
  end

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // bit <-> word helpers on flat bit arrays
  bit xb [];
  bit yb [];
  bit zb [];
  function automatic void put(ref bit a [], input int pos, input logic [255:0] v, input int w);
    for (int i = 0; i < w; i++) a[pos + i] = v[i];
  endfunction
  function automatic longint unsigned get(ref bit a [], input int pos, input int w);
    longint unsigned v = 0;
    for (int i = 0; i < w; i++) v |= longint'(a[pos + i]) << i;
    return v;
  endfunction

  task automatic fft_test(int nxbits, int nybits);
    int FNXB = (nxbits + B * T - 1) / (B * T), FNYB = (nybits + B * T - 1) / (B * T);
    int nxd = FNXB * T, nyd = FNYB * T, nxw, nyw, nzw, t0, lat, explat, bad;
    longint unsigned xw [], yw [], acc [], c;
    xb = new[nxd * B]; yb = new[nyd * B];
    for (int e = 0; e < nxd; e++) begin xmem[e] = (e * B + B <= nxbits) ? B'($urandom) : (e * B < nxbits) ? B'($urandom) & B'((1 << (nxbits - e * B)) - 1) : '0; put(xb, e * B, 256'(xmem[e]), B); end
    for (int e = 0; e < nyd; e++) begin ymem[e] = (e * B + B <= nybits) ? B'($urandom) : (e * B < nybits) ? B'($urandom) & B'((1 << (nybits - e * B)) - 1) : '0; put(yb, e * B, 256'(ymem[e]), B); end
        nxw = nxd * B / 16; nyw = nyd * B / 16; nzw = nxw + nyw;
    xw = new[nxw]; yw = new[nyw]; acc = new[nzw];
    for (int i = 0; i < nxw; i++) xw[i] = get(xb, 16 * i, 16);
    for (int i = 0; i < nyw; i++) yw[i] = get(yb, 16 * i, 16);
    for (int i = 0; i < nzw; i++) acc[i] = 0;
    for (int i = 0; i < nxw; i++)
      for (int j = 0; j < nyw; j++) acc[i + j] += xw[i] * yw[j];
    c = 0;
    for (int i = 0; i < nzw; i++) begin c += acc[i]; acc[i] = c & 16'hffff; c >>= 16; end
    @(posedge clk); fft_nxb <= 28'(FNXB); fft_nyb <= 28'(FNYB); start_fft <= 1; t0 = cyc + 1;
    @(posedge clk); start_fft <= 0;
    while (!fft_done) @(posedge clk);
    lat = cyc - t0;
    explat = int'((FNYB * (FNXB / 2 + 1) + 1) * T + D0 + T + 5);
    checks++;
    if (lat != explat) begin failures++; $display("FAIL fft latency %0d exp %0d", lat, explat); end
    zb = new[nzw * 16];
    for (int w = 0; w < nzw * 16 / (2 * B); w++) put(zb, w * 2 * B, 256'(zmem[w]), 2 * B);
    bad = 0;
    for (int i = 0; i < nzw; i++) if (get(zb, 16 * i, 16) != acc[i]) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("FAIL fft product: %0d of %0d words differ", bad, nzw); end
    $display("fft %0d x %0d bits, %0d x %0d blocks: %0d clocks", nxbits, nybits, FNXB, FNYB, lat);
  endtask

  task automatic lhw_test(int nxbits, int nybits);
    int LNXB = (nxbits + 255) / 256, LNZB = (nxbits + nybits + 255) / 256;
    int nxw = LNXB * 8, nzw = LNZB * 8, t0, lat, bad, q, r;
    longint unsigned xw [], acc [], c;
    int idx [15];
    xw = new[nxw]; acc = new[nzw];
    for (int b = 0; b < int'(LNXB); b++) begin
      lxmem[b] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      if (b == int'(LNXB) - 1 && nxbits % 256 != 0) lxmem[b] &= (256'(1) << (nxbits % 256)) - 1;
      for (int k = 0; k < 8; k++) xw[8 * b + k] = longint'(lxmem[b][32 * k +: 32]);
    end
    for (int i = 0; i < nzw; i++) acc[i] = 0;
    for (int i = 0; i < 15; i++) begin
      idx[i] = (i == 0) ? 0 : (i == 1) ? nybits - 1 : (nybits / 15) * i + 3;
      lymem[i] = IDXW'(idx[i]);
      q = idx[i] / 32; r = idx[i] % 32;
      for (int w = 0; w < nxw; w++) begin
        acc[w + q] += (xw[w] << r) & 32'hffffffff;
        if (r != 0) acc[w + q + 1] += xw[w] >> (32 - r);
      end
    end
    c = 0;
    for (int i = 0; i < nzw; i++) begin c += acc[i]; acc[i] = c & 32'hffffffff; c >>= 32; end
    @(posedge clk); lhw_y_hw <= 4'd15; lhw_nxb <= 18'(LNXB); lhw_nzb <= 18'(LNZB); start_lhw <= 1; t0 = cyc + 1;
    @(posedge clk); start_lhw <= 0;
    while (!lhw_done) @(posedge clk);
    lat = cyc - t0;
    checks++;
    if (lat != int'(HW + 5 + LNZB + HW + 4)) begin failures++; $display("FAIL lhw latency %0d", lat); end
    bad = 0;
    for (int b = 0; b < int'(LNZB); b++)
      for (int k = 0; k < 8; k++) if (longint'(lzmem[b][32 * k +: 32]) != acc[8 * b + k]) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("FAIL lhw product: %0d of %0d words differ", bad, nzw); end
    $display("lhw %0d-bit x, %0d blocks, weight 15: %0d clocks", nxbits, LNZB, lat);
  endtask

  initial begin
    start_fft = 0; start_lhw = 0; fft_nxb = 1; fft_nyb = 1; lhw_y_hw = 0; lhw_nxb = 0; lhw_nzb = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    fft_test(830000, 1476);
    fft_test(4200000, 4126);
    fft_test(19350000, 2556);
    fft_test(19350000, 10251);
    lhw_test(830000, 1476);
    lhw_test(4200000, 2016);
    lhw_test(19350000, 2556);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

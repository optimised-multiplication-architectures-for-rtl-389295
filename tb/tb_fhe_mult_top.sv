// End-to-end self-checking test of the top level at reduced size (k = 8, b = 12
// for the integer-FFT multiplier; 16-bit blocks, up to 5 set bits for the LHW
// multiplier). All RAMs are modelled here with one clock of read latency.
// It runs both multipliers back to back, issues starts while busy and a start
// of both at once, and checks every product and every start-to-done clock count.
// It also counts each mechanism as it is exercised and counts a failure for any
// that never happened: first iterations, normal iterations, absent-even-block
// iterations, flush iterations, refused starts, LHW zero fill beyond x, and a
// non-zero carry between LHW product blocks.
module tb_fhe_mult_top;
  localparam int unsigned K = 8, T = K / 2, B = 12, NF = 4, NPW = 4, AW = 10;
  localparam int unsigned S = $clog2(K);
  localparam int unsigned D0 = 2 * (T - 1) + 2 * (S - 1) * NF + 2 + NPW;
  localparam int unsigned NBLK = 16, HW = 5, IDXW = 8, LXAW = 6, LZAW = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start_fft, start_lhw, busy, fft_done, lhw_done, start_refused;
  logic [AW-1:0] fft_nxb, fft_nyb;
  logic [$clog2(HW+1)-1:0] lhw_y_hw;
  logic [LXAW:0] lhw_nxb;
  logic [LZAW:0] lhw_nzb;
  logic fx_a_re, fx_b_re, fy_re, fz_re, fz_we, ly_re, lz_we;
  logic [AW-1:0] fx_a_addr, fx_b_addr, fy_addr, fz_raddr, fz_waddr;
  logic [B-1:0] fx_a_rdata, fx_b_rdata, fy_rdata;
  logic [2*B-1:0] fz_rdata, fz_wdata;
  logic [$clog2(HW)-1:0] ly_addr;
  logic [IDXW-1:0] ly_rdata;
  logic [LXAW-1:0] lx_addr [2*HW];
  logic [NBLK-1:0] lx_rdata [2*HW];
  logic [LZAW-1:0] lz_addr;
  logic [NBLK-1:0] lz_wdata;

  fhe_mult_top #(.K(K), .B(B), .N_F(NF), .N_PW(NPW), .AW(AW),
                 .NBLK(NBLK), .HW(HW), .IDXW(IDXW), .LXAW(LXAW), .LZAW(LZAW)) dut (.*);

  logic [B-1:0]    xmem [1 << AW];
  logic [B-1:0]    ymem [1 << AW];
  logic [2*B-1:0]  zmem [1 << AW];
  logic [NBLK-1:0] lxmem [1 << LXAW];
  logic [IDXW-1:0] lymem [HW];
  logic [NBLK-1:0] lzmem [1 << LZAW];
  always_ff @(posedge clk) begin
    fx_a_rdata <= xmem[fx_a_addr];
    fx_b_rdata <= xmem[fx_b_addr];
    fy_rdata   <= ymem[fy_addr];
    fz_rdata   <= zmem[fz_raddr];
    if (fz_we) zmem[fz_waddr] <= fz_wdata;
    ly_rdata <= lymem[ly_addr];
    for (int p = 0; p < int'(2 * HW); p++) lx_rdata[p] <= lxmem[lx_addr[p]];
    if (lz_we) lzmem[lz_addr] <= lz_wdata;
  end

  int checks = 0, failures = 0, cyc = 0;
  int n_first = 0, n_normal = 0, n_bzero = 0, n_flush = 0, n_refused = 0, n_zfill = 0, n_carry = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (dut.u_fft.c_sof && dut.u_fft.c_vld) begin
        if (dut.u_fft.c_kind == fhe_pkg::IT_FIRST)  n_first++;
        if (dut.u_fft.c_kind == fhe_pkg::IT_NORMAL) n_normal++;
        if (dut.u_fft.c_kind == fhe_pkg::IT_NORMAL && dut.u_fft.c_bzero) n_bzero++;
        if (dut.u_fft.c_kind == fhe_pkg::IT_FLUSH)  n_flush++;
      end
      if (start_refused) n_refused++;
      if (lz_we && 32'(lz_addr) >= 32'(lhw_nxb)) n_zfill++;
      if (lz_we && dut.u_lhw.u_dpu.carry != 0) n_carry++;
    end
  end

  logic [2047:0] fz_exp, lz_exp;
  int fft_nz, lhw_nz;

  task automatic load_fft(int unsigned bx, int unsigned by);
    logic [2047:0] xv, yv;
    xv = '0; yv = '0;
    for (int e = 0; e < int'(bx * T); e++) begin xmem[e] = B'($urandom); xv |= 2048'(xmem[e]) << (B * e); end
    for (int e = 0; e < int'(by * T); e++) begin ymem[e] = B'($urandom); yv |= 2048'(ymem[e]) << (B * e); end
    fz_exp = xv * yv; fft_nz = int'((bx + by) * T / 2);
  endtask

  task automatic load_lhw(int unsigned bx, int unsigned nset, bit ones);
    logic [2047:0] xv;
    xv = '0; lz_exp = '0;
    for (int b = 0; b < int'(bx); b++) begin lxmem[b] = ones ? '1 : NBLK'($urandom); xv |= 2048'(lxmem[b]) << (NBLK * b); end
    for (int i = 0; i < int'(nset); i++) begin
      lymem[i] = IDXW'(i == 0 ? 0 : (i == 1 ? (1 << IDXW) - 1 : 37 * i + 5));
      lz_exp += xv << lymem[i];
    end
    lhw_nz = int'((bx * NBLK + (1 << IDXW) + NBLK - 1) / NBLK);
  endtask

  task automatic check_fft(int lat, int unsigned bx, int unsigned by);
    logic [2047:0] got;
    int explat;
    explat = int'((by * (bx / 2 + 1) + 1) * T + D0 + T + 5);
    got = '0;
    for (int w = 0; w < fft_nz; w++) got |= 2048'(zmem[w]) << (2 * B * w);
    checks += 2;
    if (lat != explat) begin failures++; $display("FAIL fft latency %0d exp %0d", lat, explat); end
    if (got !== fz_exp) begin failures++; $display("FAIL fft product %0d x %0d", bx, by); end
  endtask

  task automatic check_lhw(int lat);
    logic [2047:0] got;
    got = '0;
    for (int b = 0; b < lhw_nz; b++) got |= 2048'(lzmem[b]) << (NBLK * b);
    checks += 2;
    if (lat != int'(HW + 5) + lhw_nz + int'(HW + 4)) begin failures++; $display("FAIL lhw latency %0d", lat); end
    if (got !== lz_exp) begin failures++; $display("FAIL lhw product"); end
  endtask

  // start one multiplier, optionally poke the other start while busy
  task automatic run_fft(int unsigned bx, int unsigned by, bit poke);
    int t0;
    load_fft(bx, by);
    @(posedge clk); fft_nxb <= AW'(bx); fft_nyb <= AW'(by); start_fft <= 1; t0 = cyc + 1;
    @(posedge clk); start_fft <= 0;
    if (poke) begin
      repeat (5) @(posedge clk);
      start_lhw <= 1;
      #1; checks++; if (!start_refused) begin failures++; $display("FAIL lhw start not refused"); end
      @(posedge clk); start_lhw <= 0;
    end
    while (!fft_done) @(posedge clk);
    check_fft(cyc - t0, bx, by);
  endtask

  task automatic run_lhw(int unsigned bx, int unsigned nset, bit ones, bit poke);
    int t0;
    load_lhw(bx, nset, ones);
    @(posedge clk); lhw_y_hw <= ($clog2(HW+1))'(nset); lhw_nxb <= (LXAW+1)'(bx);
    lhw_nzb <= (LZAW+1)'(lhw_nz); start_lhw <= 1; t0 = cyc + 1;
    @(posedge clk); start_lhw <= 0;
    if (poke) begin
      repeat (3) @(posedge clk);
      start_fft <= 1;
      #1; checks++; if (!start_refused) begin failures++; $display("FAIL fft start not refused"); end
      @(posedge clk); start_fft <= 0;
    end
    while (!lhw_done) @(posedge clk);
    check_lhw(cyc - t0);
  endtask

  initial begin
    int t0, tl;
    bit fd, ld;
    start_fft = 0; start_lhw = 0; fft_nxb = 1; fft_nyb = 1; lhw_y_hw = 0; lhw_nxb = 0; lhw_nzb = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    run_fft(3, 2, 1);
    run_lhw(4, 5, 1, 1);
    run_fft(4, 1, 0);
    run_lhw(9, 3, 0, 0);
    // both starts together: the FFT multiplier wins, the LHW start is refused
    load_fft(2, 2);
    load_lhw(3, 4, 1);
    @(posedge clk);
    fft_nxb <= 2; fft_nyb <= 2; start_fft <= 1; start_lhw <= 1;
    lhw_y_hw <= 4; lhw_nxb <= 3; lhw_nzb <= (LZAW+1)'(lhw_nz); t0 = cyc + 1;
    @(posedge clk); start_fft <= 0; start_lhw <= 0;
    #1; checks++; if (!busy || dut.lhw_busy) begin failures++; $display("FAIL tie not won by FFT"); end
    while (!fft_done) @(posedge clk);
    check_fft(cyc - t0, 2, 2);
    run_lhw(3, 4, 1, 0);
    // mechanism coverage
    checks += 7;
    if (n_first   == 0) begin failures++; $display("FAIL no first iteration");   end
    if (n_normal  == 0) begin failures++; $display("FAIL no normal iteration");  end
    if (n_bzero   == 0) begin failures++; $display("FAIL no absent-block iteration"); end
    if (n_flush   == 0) begin failures++; $display("FAIL no flush iteration");   end
    if (n_refused == 0) begin failures++; $display("FAIL no refused start");     end
    if (n_zfill   == 0) begin failures++; $display("FAIL no zero fill");         end
    if (n_carry   == 0) begin failures++; $display("FAIL no block carry");       end
    $display("mechanisms: first=%0d normal=%0d bzero=%0d flush=%0d refused=%0d zfill=%0d carry=%0d",
             n_first, n_normal, n_bzero, n_flush, n_refused, n_zfill, n_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

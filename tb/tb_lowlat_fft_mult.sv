// Self-checking test of the low-latency integer-FFT multiplier.
// Small transform (k = 8, b = 12) so that many block shapes fit in a short run.
// Operand and product RAMs are modelled here with one clock of read latency.
// For several block counts (one x block, even and odd x block counts, several y
// blocks) random operands are multiplied and the product RAM is compared with a
// wide multiplication done here. The clock count from start to done is checked
// against F*k/2 + D0 + k/2 + 5, with F = nyb*(floor(nxb/2)+1) + 1 frames and
// D0 the transform/point-wise pipeline latency of the architecture.
module tb_lowlat_fft_mult;
  localparam int unsigned K = 8, T = K / 2, B = 12, NF = 4, NPW = 4, AW = 10;
  localparam int unsigned S = $clog2(K);
  localparam int unsigned D0 = 2 * (T - 1) + 2 * (S - 1) * NF + 2 + NPW;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  logic [AW-1:0] nxb, nyb;
  logic xa_re, xb_re, y_re, z_re, z_we;
  logic [AW-1:0] xa_addr, xb_addr, y_addr, z_raddr, z_waddr;
  logic [B-1:0] xa_rdata, xb_rdata, y_rdata;
  logic [2*B-1:0] z_rdata, z_wdata;

  lowlat_fft_mult #(.K(K), .B(B), .N_F(NF), .N_PW(NPW), .AW(AW)) dut (
    .clk, .rst_n, .start, .nxb, .nyb, .busy, .done,
    .xa_re, .xa_addr, .xa_rdata, .xb_re, .xb_addr, .xb_rdata, .y_re, .y_addr, .y_rdata,
    .z_re, .z_raddr, .z_rdata, .z_we, .z_waddr, .z_wdata);

  logic [B-1:0]   xmem [1 << AW];
  logic [B-1:0]   ymem [1 << AW];
  logic [2*B-1:0] zmem [1 << AW];
  always_ff @(posedge clk) begin
    xa_rdata <= xmem[xa_addr];
    xb_rdata <= xmem[xb_addr];
    y_rdata  <= ymem[y_addr];
    z_rdata  <= zmem[z_raddr];
    if (z_we) zmem[z_waddr] <= z_wdata;
  end

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic run(int unsigned bx, int unsigned by, bit maxval);
    logic [2047:0] xv, yv, zv, got;
    int t0, lat, explat, frames;
    xv = '0; yv = '0;
    for (int e = 0; e < int'(bx * T); e++) begin
      xmem[e] = maxval ? '1 : B'($urandom);
      xv |= 2048'(xmem[e]) << (B * e);
    end
    for (int e = 0; e < int'(by * T); e++) begin
      ymem[e] = maxval ? '1 : B'($urandom);
      yv |= 2048'(ymem[e]) << (B * e);
    end
    for (int w = 0; w < (1 << AW); w++) zmem[w] = 2*B'($urandom);   // no clearing needed
    zv = xv * yv;
    @(posedge clk);
    nxb <= AW'(bx); nyb <= AW'(by); start <= 1;
    t0 = cyc + 1;
    @(posedge clk); start <= 0;
    while (!done) @(posedge clk);
    lat = cyc - t0;
    frames = by * (bx / 2 + 1) + 1;
    explat = frames * T + D0 + T + 5;
    checks++;
    if (lat != explat) begin failures++; $display("FAIL latency nxb=%0d nyb=%0d got %0d exp %0d", bx, by, lat, explat); end
    got = '0;
    for (int w = 0; w < int'((bx + by) * T / 2); w++) got |= 2048'(zmem[w]) << (2 * B * w);
    checks++;
    if (got !== zv) begin failures++; $display("FAIL product nxb=%0d nyb=%0d\n got %h\n exp %h", bx, by, got, zv); end
    else $display("ok nxb=%0d nyb=%0d latency %0d", bx, by, lat);
  endtask

  initial begin
    start = 0; nxb = 1; nyb = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    run(1, 1, 0);
    run(2, 1, 0);
    run(3, 2, 0);
    run(5, 2, 0);
    run(4, 3, 0);
    run(6, 4, 0);
    run(7, 3, 1);   // all-ones operands: largest coefficients and carries
    run(2, 5, 1);
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

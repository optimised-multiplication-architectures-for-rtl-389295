// Self-checking test of the LHW concatenation unit (NBLK = 16, 8 x blocks).
// For random product-block addresses and set-bit indices (and for the worked
// example's style of edge cases: index 0, windows below bit 0 and past the end of
// x) the window must equal bits [c*NBLK - e +: NBLK] of x, zero outside x,
// taken here from a wide vector, two clocks after the inputs.
module tb_lhw_concat_unit;
  localparam int unsigned NBLK = 16, IDXW = 8, XAW = 5, ZAW = 5, NXB = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en;
  logic [ZAW-1:0] zc;
  logic [IDXW-1:0] e;
  logic [XAW:0] nxb;
  logic [XAW-1:0] x_addr_lo, x_addr_hi;
  logic [NBLK-1:0] x_data_lo, x_data_hi, window;
  logic [NBLK-1:0] xmem [1 << XAW];
  logic [1023:0] xv;
  logic [NBLK-1:0] expq [$];
  int checks = 0, failures = 0;

  lhw_concat_unit #(.NBLK(NBLK), .IDXW(IDXW), .XAW(XAW), .ZAW(ZAW)) dut (.*);

  always_ff @(posedge clk) begin
    x_data_lo <= xmem[x_addr_lo];
    x_data_hi <= xmem[x_addr_hi];
  end

  initial begin
    xv = '0;
    for (int b = 0; b < (1 << XAW); b++) begin
      xmem[b] = NBLK'($urandom);
      if (b < int'(NXB)) xv |= 1024'(xmem[b]) << (NBLK * b);
    end
    nxb = (XAW+1)'(NXB); en = 1; zc = 0; e = 0;
    for (int i = 0; i < 400; i++) begin
      int lo; logic [NBLK-1:0] ex; bit en_i;
      @(negedge clk);
      if (i >= 2) begin
        logic [NBLK-1:0] x;
        x = expq.pop_front();
        checks++;
        if (window !== x) begin failures++; $display("FAIL %0d got %h exp %h", i, window, x); end
      end
      zc = ZAW'($urandom % 24);
      e = (i % 5 == 0) ? 0 : IDXW'($urandom % 200);
      en_i = (i % 17 != 3);
      en = en_i;
      lo = int'(zc) * NBLK - int'(e);
      ex = 0;
      for (int k = 0; k < int'(NBLK); k++)
        if (lo + k >= 0 && lo + k < int'(NXB * NBLK)) ex[k] = xv[lo + k];
      expq.push_back(en_i ? ex : '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

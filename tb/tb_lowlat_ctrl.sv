// Self-checking test of the integer-FFT multiplier controller (k = 8).
// For several block counts the controller's per-clock outputs are compared with
// the schedule built here: per outer iteration i, inner iteration 0 reads x
// block 0 and y block i, inner iteration n >= 1 reads x blocks 2n-1 and 2n (the
// latter only if it exists), each for k/2 clocks, then one flush frame; frame
// kinds, the absent-block flag and the half indices are checked too, and done
// must follow acc_done.
module tb_lowlat_ctrl;
  import fhe_pkg::*;
  localparam int unsigned N = 8, T = N / 2, AW = 8, HW = 9;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, acc_done, busy, done, clear, xa_re, xb_re, y_re, b_from_y;
  logic [AW-1:0] nxb, nyb, xa_addr, xb_addr, y_addr;
  logic f_sof, f_vld, f_bzero;
  iter_kind_e f_kind;
  logic [HW-1:0] f_half;
  int checks = 0, failures = 0;

  lowlat_ctrl #(.N(N), .AW(AW), .HIDX_W(HW)) dut (.*);

  task automatic expect_cycle(bit ea_re, int ea, bit eb_re, int eb, bit ey_re, int ey,
                              bit sof, iter_kind_e k, bit bz, int h);
    #1;
    checks++;
    if (xa_re !== ea_re || (ea_re && xa_addr !== AW'(ea)) ||
        xb_re !== eb_re || (eb_re && xb_addr !== AW'(eb)) ||
        y_re !== ey_re || (ey_re && y_addr !== AW'(ey)) ||
        f_sof !== sof || f_vld !== 1'b1 || f_kind !== k ||
        (k == IT_NORMAL && f_bzero !== bz) || (k != IT_FLUSH && f_half !== HW'(h))) begin
      failures++;
      $display("FAIL k=%0d: xa %b/%0d exp %b/%0d xb %b/%0d exp %b/%0d y %b/%0d exp %b/%0d half %0d exp %0d",
               k, xa_re, xa_addr, ea_re, ea, xb_re, xb_addr, eb_re, eb, y_re, y_addr, ey_re, ey, f_half, h);
    end
    @(posedge clk);
  endtask

  task automatic run(int bx, int by);
    @(negedge clk);
    nxb = AW'(bx); nyb = AW'(by); start = 1;
    @(posedge clk); #1 start = 0;
    for (int i = 0; i < by; i++)
      for (int n = 0; n <= bx / 2; n++)
        for (int t = 0; t < int'(T); t++)
          if (n == 0) expect_cycle(1, t, 0, 0, 1, i * T + t, t == 0, IT_FIRST, 0, i);
          else expect_cycle(1, (2 * n - 1) * T + t, 2 * n < bx, 2 * n * T + t, 0, 0, t == 0,
                            IT_NORMAL, 2 * n >= bx, i + 2 * n - 1);
    for (int t = 0; t < int'(T); t++) expect_cycle(0, 0, 0, 0, 0, 0, t == 0, IT_FLUSH, 0, 0);
    #1; checks++;
    if (!busy || f_vld) begin failures++; $display("FAIL wait state"); end
    repeat (3) @(posedge clk);
    #1 acc_done = 1; @(posedge clk); #1 acc_done = 0;
    checks++;
    if (!done) begin failures++; $display("FAIL done"); end
    @(posedge clk); #1;
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done"); end
  endtask

  initial begin
    start = 0; acc_done = 0; nxb = 1; nyb = 1;
    repeat (2) @(negedge clk); rst_n = 1;
    run(1, 1);
    run(4, 2);
    run(5, 3);
    run(2, 1);
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

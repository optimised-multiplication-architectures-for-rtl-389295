// Self-checking test of the LHW FSM controller: after start it must pulse load,
// wait for load_done, pulse run, wait for run_done and drain_done, then pulse
// done and drop busy; a start while busy must be ignored. Every output is
// checked on every clock against the expected sequence.
module tb_lhw_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, load_done, run_done, drain_done, load, run, busy, done;
  int checks = 0, failures = 0;

  lhw_ctrl dut (.*);

  task automatic expect_out(bit l, bit r, bit b, bit d);
    #1; checks++;
    if ({load, run, busy, done} !== {l, r, b, d}) begin
      failures++; $display("FAIL at %0t: %b%b%b%b exp %b%b%b%b", $time, load, run, busy, done, l, r, b, d); end
  endtask

  initial begin
    start = 0; load_done = 0; run_done = 0; drain_done = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      @(negedge clk); expect_out(0, 0, 0, 0);
      start = 1; @(negedge clk); start = 0; expect_out(1, 0, 1, 0);
      @(negedge clk); expect_out(0, 0, 1, 0);
      start = 1; @(negedge clk); start = 0; expect_out(0, 0, 1, 0);   // ignored
      repeat (rep) begin @(negedge clk); expect_out(0, 0, 1, 0); end
      load_done = 1; @(negedge clk); load_done = 0; expect_out(0, 1, 1, 0);
      repeat (3) begin @(negedge clk); expect_out(0, 0, 1, 0); end
      drain_done = 1; @(negedge clk); drain_done = 0; expect_out(0, 0, 1, 0);  // too early
      run_done = 1; @(negedge clk); run_done = 0; expect_out(0, 0, 1, 0);
      drain_done = 1; @(negedge clk); drain_done = 0; expect_out(0, 0, 0, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

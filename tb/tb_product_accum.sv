// Self-checking test of the product accumulation (4th adder), k = 8, b = 8.
// Drives the slot sequence of a two-pass multiplication: pass 1 covers halves
// 0..4 (its left third, half 5, is emitted with the first slot of pass 2), pass 2
// covers halves 1..6 and ends with a flush slot. Coefficients are random (up to
// 24 bits) except in the last half of each pass. The product RAM starts with
// random content, which the first touch of a half must ignore. At the end the
// RAM must equal the plain sum of all coefficients at their digit positions;
// slot_done must pulse once per slot and mult_done once. The multiplication is
// repeated ten times back to back without clearing the RAM, checking every word.
module tb_product_accum;
  localparam int unsigned N = 8, T = N / 2, B = 8, HW = 8, ZAW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, s_sof, s_vld, v0, v1, z_re, z_we, slot_done, mult_done;
  logic [64:0] s0, s1;
  logic [HW-1:0] h0, h1;
  logic [ZAW-1:0] z_raddr, z_waddr;
  logic [2*B-1:0] z_rdata, z_wdata;
  logic [2*B-1:0] zmem [1 << ZAW];
  int checks = 0, failures = 0, nslot = 0, nmult = 0;
  logic [511:0] expv;

  product_accum #(.N(N), .B(B), .HIDX_W(HW), .ZAW(ZAW)) dut (.*);

  always_ff @(posedge clk) begin
    z_rdata <= zmem[z_raddr];
    if (z_we) zmem[z_waddr] <= z_wdata;
  end
  always @(posedge clk) begin
    if (rst_n && slot_done) nslot++;
    if (rst_n && mult_done) nmult++;
  end

  // one slot; zero_h0 / zero_h1 force zero coefficients in that half
  task automatic slot(bit a0, int g0, bit a1, int g1, bit zero_h0, bit zero_h1);
    for (int t = 0; t < int'(T); t++) begin
      @(negedge clk);
      s_sof = (t == 0); s_vld = 1;
      v0 = a0; h0 = HW'(g0); v1 = a1; h1 = HW'(g1);
      s0 = zero_h0 ? 0 : 65'($urandom % (1 << 24));
      s1 = zero_h1 ? 0 : 65'($urandom % (1 << 24));
      if (a0) expv += 512'(s0) << (B * (g0 * T + t));
      if (a1) expv += 512'(s1) << (B * (g1 * T + t));
    end
    @(negedge clk); s_vld = 0; s_sof = 0;
  endtask

  initial begin
    clear = 0; s_sof = 0; s_vld = 0; v0 = 0; v1 = 0; h0 = 0; h1 = 0; s0 = 0; s1 = 0;
    for (int i = 0; i < (1 << ZAW); i++) zmem[i] = 16'($urandom);
    repeat (2) @(negedge clk); rst_n = 1;
    for (int run = 0; run < 10; run++) begin
      expv = '0;
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      // pass 1: halves 0, 1-2, 3-4 (half 5 stays zero)
      slot(0, 0, 1, 0, 0, 0);
      slot(1, 1, 1, 2, 0, 0);
      slot(1, 3, 1, 4, 0, 0);
      // pass 2: flush of pass-1 half 5 with pass-2 half 1, then 2-3, 4-5, flush 6
      slot(1, 5, 1, 1, 1, 0);
      slot(1, 2, 1, 3, 0, 0);
      slot(1, 4, 1, 5, 0, 0);
      slot(1, 6, 0, 0, 1, 1);
      repeat (2 * T + 6) @(negedge clk);
      // every product word; the previous run's product must not leak in
      for (int w = 0; w < int'(7 * T / 2); w++) begin
        checks++;
        if (zmem[w] !== expv[2 * B * w +: 2 * B]) begin
          failures++; $display("FAIL run %0d word %0d got %h exp %h", run, w, zmem[w], expv[2 * B * w +: 2 * B]); end
      end
    end
    checks += 2;
    if (nslot != 70) begin failures++; $display("FAIL slot_done count %0d", nslot); end
    if (nmult != 10) begin failures++; $display("FAIL mult_done count %0d", nmult); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking test of the radix-2 DIT butterfly, general (MUL_LAT = 4,
// latency 5) and trivial (twiddle 1, latency 1) forms, fed a new random triple
// every clock: up must be (a + w*b) mod p and dn (a - w*b) mod p, computed here
// with plain 128-bit remainders, at exactly the stated latency.
module tb_ntt_butterfly;
  localparam int unsigned ML = 4;
  localparam logic [127:0] P = 128'hFFFF_FFFF_0000_0001;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [63:0] a, b, w, up, dn, up1, dn1;
  logic [63:0] eu [$], ed [$], eu1 [$], ed1 [$];
  int checks = 0, failures = 0;

  ntt_butterfly #(.MUL_LAT(ML), .TRIVIAL(0)) dut  (.clk, .a, .b, .w, .up, .dn);
  ntt_butterfly #(.MUL_LAT(ML), .TRIVIAL(1)) dut1 (.clk, .a, .b, .w, .up(up1), .dn(dn1));

  initial begin
    for (int i = 0; i < 500; i++) begin
      logic [127:0] t;
      @(negedge clk);
      a = 64'({$urandom, $urandom} % P); b = 64'({$urandom, $urandom} % P);
      w = (i % 7 == 0) ? 64'(P - 1) : 64'({$urandom, $urandom} % P);
      if (i % 11 == 0) a = 0;
      t = (128'(w) * 128'(b)) % P;
      eu.push_back(64'((128'(a) + t) % P));
      ed.push_back(64'((128'(a) + P - t) % P));
      eu1.push_back(64'((128'(a) + 128'(b)) % P));
      ed1.push_back(64'((128'(a) + P - 128'(b)) % P));
      if (i >= int'(ML) + 1) begin
        logic [63:0] x, y;
        x = eu.pop_front(); y = ed.pop_front();
        checks += 2;
        if (up !== x) begin failures++; $display("FAIL up %0d", i); end
        if (dn !== y) begin failures++; $display("FAIL dn %0d", i); end
      end
      if (i >= 1) begin
        logic [63:0] x, y;
        x = eu1.pop_front(); y = ed1.pop_front();
        checks += 2;
        if (up1 !== x || dn1 !== y) begin failures++; $display("FAIL trivial %0d", i); end
      end
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

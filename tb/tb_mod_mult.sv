// Self-checking test of the pipelined modular multiplier (LAT = 5): a new random
// operand pair every clock, each result compared LAT clocks later with
// (a*b) mod p from a plain 128-bit remainder; a counter checks the latency.
module tb_mod_mult;
  localparam int unsigned LAT = 5;
  localparam logic [127:0] P = 128'hFFFF_FFFF_0000_0001;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [63:0] a, b, q;
  logic [63:0] exp_q [$];
  int checks = 0, failures = 0;

  mod_mult #(.LAT(LAT)) dut (.clk, .a, .b, .q);

  initial begin
    a = 0; b = 0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      if (i < 4) begin a = 64'(P - 1); b = 64'(P - 1 - i); end
      else begin a = 64'({$urandom, $urandom} % P); b = 64'({$urandom, $urandom} % P); end
      exp_q.push_back(64'((128'(a) * 128'(b)) % P));
      if (i >= int'(LAT)) begin
        logic [63:0] e;
        e = exp_q.pop_front();
        checks++;
        if (q !== e) begin failures++; $display("FAIL %0d got %h exp %h", i, q, e); end
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

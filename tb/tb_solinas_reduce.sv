// Self-checking test of the Solinas reduction: random 128-bit values, products
// of residues and boundary values (0, p, p-1, 2^128-1, words at their limits) are
// reduced and compared with the remainder of a plain 128-bit division by p.
module tb_solinas_reduce;
  localparam logic [127:0] P = 128'hFFFF_FFFF_0000_0001;
  logic [127:0] x;
  logic [63:0]  r;
  int checks = 0, failures = 0;

  solinas_reduce dut (.x(x), .r(r));

  task automatic check(logic [127:0] v);
    x = v;
    #1;
    checks++;
    if (r !== 64'(v % P)) begin
      failures++; $display("FAIL x=%h r=%h exp=%h", v, r, 64'(v % P));
    end
  endtask

  initial begin
    check(0); check(P); check(P - 1); check(P + 1); check('1);
    check(128'hFFFF_FFFF_0000_0000_0000_0000_0000_0000);
    check(128'h0000_0000_FFFF_FFFF_FFFF_FFFF_FFFF_FFFF);
    check(128'h0000_0000_FFFF_FFFF_0000_0000_0000_0000);
    check((P - 1) * (P - 1));
    for (int i = 0; i < 2000; i++) check({$urandom, $urandom, $urandom, $urandom});
    for (int i = 0; i < 2000; i++) begin
      logic [63:0] a, b;
      a = 64'({$urandom, $urandom} % P); b = 64'({$urandom, $urandom} % P);
      check(128'(a) * 128'(b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

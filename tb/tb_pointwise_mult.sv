// Self-checking test of the point-wise multiplier (k = 16, NPW = 6): random
// spectrum pairs each clock; both lanes must give x*y/k mod p (1/k found here as
// the modular inverse by Fermat, p-2 power) exactly NPW clocks later, with the
// sof/valid/tag side channel delayed by the same amount.
module tb_pointwise_mult;
  localparam int unsigned N = 16, NPW = 6;
  localparam logic [127:0] P = 128'hFFFF_FFFF_0000_0001;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_sof, in_vld, out_sof, out_vld;
  logic [7:0] in_tag, out_tag;
  logic [63:0] x_up, x_dn, y_up, y_dn, z_up, z_dn;
  logic [63:0] eu [$], ed [$];
  logic [9:0]  es [$];
  int checks = 0, failures = 0;

  pointwise_mult #(.N(N), .NPW(NPW), .TAG_W(8)) dut (.*);

  function automatic logic [63:0] mulm(logic [63:0] a, logic [63:0] b);
    return 64'((128'(a) * 128'(b)) % P);
  endfunction
  function automatic logic [63:0] powm(logic [63:0] a, logic [63:0] e);
    logic [63:0] r; r = 1;
    for (int i = 63; i >= 0; i--) begin r = mulm(r, r); if (e[i]) r = mulm(r, a); end
    return r;
  endfunction

  initial begin
    logic [63:0] kinv;
    kinv = powm(N, 64'(P - 2));
    in_sof = 0; in_vld = 0; in_tag = 0; x_up = 0; x_dn = 0; y_up = 0; y_dn = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      if (i >= int'(NPW)) begin
        logic [63:0] u, d; logic [9:0] s;
        u = eu.pop_front(); d = ed.pop_front(); s = es.pop_front();
        checks += 3;
        if (z_up !== u) begin failures++; $display("FAIL up %0d", i); end
        if (z_dn !== d) begin failures++; $display("FAIL dn %0d", i); end
        if ({out_sof, out_vld, out_tag} !== s) begin failures++; $display("FAIL side %0d", i); end
      end
      x_up = 64'({$urandom, $urandom} % P); x_dn = 64'({$urandom, $urandom} % P);
      y_up = 64'({$urandom, $urandom} % P); y_dn = (i % 5 == 0) ? 64'(P - 1) : 64'({$urandom, $urandom} % P);
      in_sof = (i % 8 == 0); in_vld = (i % 13 != 0); in_tag = 8'($urandom);
      eu.push_back(mulm(mulm(x_up, y_up), kinv));
      ed.push_back(mulm(mulm(x_dn, y_dn), kinv));
      es.push_back({in_sof, in_vld, in_tag});
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

// Self-checking test of single R2MDC stages (k = 16): a forward stage of span 4
// (buffers of 4) and an inverse stage of span 4 (buffers of 2). Each is fed three
// random frames (back to back, then after a gap) in the stream order its previous
// stage produces; every output pair is compared with the butterfly of the two
// array positions the stream order prescribes, using twiddles computed here.
// Output latency (buffer depth + butterfly) is checked at every frame start.
module tb_r2mdc_stage;
  localparam int unsigned N = 16, T = N / 2, SPAN = 4, ML = 3;
  localparam logic [127:0] P = 128'hFFFF_FFFF_0000_0001;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_sof, in_vld; logic [7:0] in_tag;
  logic [63:0] fu, fd, iu, id;
  logic f_sof, i_sof, f_vld, i_vld; logic [7:0] f_tag, i_tag;
  logic [63:0] f_up, f_dn, i_up, i_dn;

  r2mdc_stage #(.N(N), .SPAN(SPAN), .INVERSE(0), .FIRST(0), .MUL_LAT(ML), .TAG_W(8)) u_f (
    .clk, .rst_n, .in_sof, .in_vld, .in_tag, .in_up(fu), .in_dn(fd),
    .out_sof(f_sof), .out_vld(f_vld), .out_tag(f_tag), .out_up(f_up), .out_dn(f_dn));
  r2mdc_stage #(.N(N), .SPAN(SPAN), .INVERSE(1), .FIRST(0), .MUL_LAT(ML), .TAG_W(8)) u_i (
    .clk, .rst_n, .in_sof, .in_vld, .in_tag, .in_up(iu), .in_dn(id),
    .out_sof(i_sof), .out_vld(i_vld), .out_tag(i_tag), .out_up(i_up), .out_dn(i_dn));

  function automatic logic [63:0] mulm(logic [63:0] a, logic [63:0] b);
    return 64'((128'(a) * 128'(b)) % P);
  endfunction
  function automatic logic [63:0] powm(logic [63:0] a, logic [63:0] e);
    logic [63:0] r; r = 1;
    for (int i = 63; i >= 0; i--) begin r = mulm(r, r); if (e[i]) r = mulm(r, a); end
    return r;
  endfunction

  logic [63:0] arr [3][N];
  logic [63:0] w, wi;
  int checks = 0, failures = 0, cyc = 0, start [3];
  int fpos = -1, ffr = 0, ipos = -1, ifr = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // forward stage: pairs (8*blk + j, +4), twiddle w^(4*bitrev1(blk))
  always @(posedge clk) if (rst_n) begin
    if (f_sof) begin
      fpos = 0; checks++;
      if (cyc - start[ffr] != int'(SPAN + ML + 1)) begin failures++; $display("FAIL fwd latency"); end
    end
    if (fpos >= 0) begin
      int blk, j, p, q; logic [63:0] t, tw;
      blk = fpos / SPAN; j = fpos % SPAN; p = 2 * SPAN * blk + j; q = p + SPAN;
      tw = powm(w, SPAN * blk);   // bitrev of a 1-bit block index is itself
      t = mulm(tw, arr[ffr][q]);
      checks += 2;
      if (f_up !== 64'((128'(arr[ffr][p]) + t) % P) || f_dn !== 64'((128'(arr[ffr][p]) + P - t) % P)) begin
        failures++; $display("FAIL fwd frame %0d pos %0d", ffr, fpos); end
      fpos++;
      if (fpos == int'(T)) begin fpos = -1; ffr++; end
    end
  end
  // inverse stage: pairs (8*blk + j, +4), twiddle w^-((T/SPAN)*j)
  always @(posedge clk) if (rst_n) begin
    if (i_sof) begin
      ipos = 0; checks++;
      if (cyc - start[ifr] != int'(SPAN / 2 + ML + 1)) begin failures++; $display("FAIL inv latency"); end
    end
    if (ipos >= 0) begin
      int blk, j, p, q; logic [63:0] t;
      blk = ipos / SPAN; j = ipos % SPAN; p = 2 * SPAN * blk + j; q = p + SPAN;
      t = mulm(powm(wi, (T / SPAN) * j), arr[ifr][q]);
      checks += 2;
      if (i_up !== 64'((128'(arr[ifr][p]) + t) % P) || i_dn !== 64'((128'(arr[ifr][p]) + P - t) % P)) begin
        failures++; $display("FAIL inv frame %0d pos %0d", ifr, ipos); end
      ipos++;
      if (ipos == int'(T)) begin ipos = -1; ifr++; end
    end
  end

  initial begin
    w  = powm(7, (P - 1) / N);
    wi = powm(w, N - 1);
    for (int f = 0; f < 3; f++) for (int n = 0; n < int'(N); n++) arr[f][n] = 64'({$urandom, $urandom} % P);
    in_sof = 0; in_vld = 0; in_tag = 0; fu = 0; fd = 0; iu = 0; id = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int f = 0; f < 3; f++) begin
      if (f == 2) begin in_sof <= 0; in_vld <= 0; repeat (3) @(posedge clk); end
      for (int tau = 0; tau < int'(T); tau++) begin
        // previous forward stage (span 8): up = tau, dn = tau + 8
        fu <= arr[f][tau]; fd <= arr[f][tau + 8];
        // previous inverse stage (span 2): up = 4*(tau/2) + tau%2, dn = +2
        iu <= arr[f][4 * (tau / 2) + tau % 2]; id <= arr[f][4 * (tau / 2) + tau % 2 + 2];
        in_sof <= (tau == 0); in_vld <= 1; in_tag <= 8'(f);
        if (tau == 0) start[f] = cyc + 1;
        @(posedge clk);
      end
    end
    in_sof <= 0; in_vld <= 0;
    repeat (30) @(posedge clk);
    checks++;
    if (ffr != 3 || ifr != 3) begin failures++; $display("FAIL frame count"); end
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

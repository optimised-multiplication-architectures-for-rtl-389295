// Self-checking test of the R2MDC forward and inverse NTT.
// A forward transform feeds an inverse transform directly. Three random frames
// (two back to back, one after a gap) go in with the dn lane zero, as in the
// multiplier. Forward outputs are compared with a direct O(N^2) transform
// computed here with plain % arithmetic, in bit-reversed order; inverse outputs
// must equal N times the input. Latencies of both transforms are checked against
// the closed-form value.
module tb_ntt_r2mdc;
  localparam int unsigned N = 16, T = N / 2, ML = 3, TW = 8;
  localparam logic [63:0] P = 64'hFFFF_FFFF_0000_0001;
  localparam int unsigned LAT = (T - 1) + ($clog2(N) - 1) * (ML + 1) + 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_sof, in_vld; logic [TW-1:0] in_tag; logic [63:0] in_up, in_dn;
  logic f_sof, f_vld; logic [TW-1:0] f_tag; logic [63:0] f_up, f_dn;
  logic i_sof, i_vld; logic [TW-1:0] i_tag; logic [63:0] i_up, i_dn;

  ntt_r2mdc #(.N(N), .INVERSE(0), .MUL_LAT(ML), .TAG_W(TW)) u_f (
    .clk, .rst_n, .in_sof, .in_vld, .in_tag, .in_up, .in_dn,
    .out_sof(f_sof), .out_vld(f_vld), .out_tag(f_tag), .out_up(f_up), .out_dn(f_dn));
  ntt_r2mdc #(.N(N), .INVERSE(1), .MUL_LAT(ML), .TAG_W(TW)) u_i (
    .clk, .rst_n, .in_sof(f_sof), .in_vld(f_vld), .in_tag(f_tag), .in_up(f_up), .in_dn(f_dn),
    .out_sof(i_sof), .out_vld(i_vld), .out_tag(i_tag), .out_up(i_up), .out_dn(i_dn));

  int checks = 0, failures = 0;
  logic [63:0] x [3][N];
  logic [63:0] X [3][N];

  function automatic logic [63:0] mulm(logic [63:0] a, logic [63:0] b);
    logic [127:0] t; t = 128'(a) * 128'(b); return 64'(t % 128'(P));
  endfunction
  function automatic logic [63:0] powm(logic [63:0] a, logic [63:0] e);
    logic [63:0] r; r = 1;
    for (int i = 63; i >= 0; i--) begin r = mulm(r, r); if (e[i]) r = mulm(r, a); end
    return r;
  endfunction
  function automatic int unsigned brev(int unsigned v, int unsigned bits);
    int unsigned r; r = 0;
    for (int i = 0; i < int'(bits); i++) if (v[i]) r |= 1 << (bits - 1 - i);
    return r;
  endfunction

  int cyc = 0, sof_in_cyc [3], f_frame = 0, i_frame = 0, f_pos = -1, i_pos = -1;
  always @(posedge clk) cyc <= cyc + 1;

  // forward monitor
  always @(posedge clk) if (rst_n) begin
    if (f_sof) begin f_pos = 0; checks++; if (cyc - sof_in_cyc[f_frame] != LAT - 0) begin
      failures++; $display("FAIL fwd latency %0d exp %0d", cyc - sof_in_cyc[f_frame], LAT); end
    end
    if (f_pos >= 0 && f_pos < int'(T)) begin
      checks += 2;
      if (f_up !== X[f_frame][brev(2*f_pos, $clog2(N))] || f_dn !== X[f_frame][brev(2*f_pos+1, $clog2(N))]) begin
        failures++; $display("FAIL fwd frame %0d pos %0d", f_frame, f_pos); end
      f_pos++;
      if (f_pos == int'(T)) begin f_pos = -1; f_frame++; end
    end
  end
  // inverse monitor
  always @(posedge clk) if (rst_n) begin
    if (i_sof) begin i_pos = 0; checks++; if (cyc - sof_in_cyc[i_frame] != 2 * LAT) begin
      failures++; $display("FAIL inv latency %0d", cyc - sof_in_cyc[i_frame]); end
    end
    if (i_pos >= 0 && i_pos < int'(T)) begin
      checks += 2;
      if (i_up !== mulm(x[i_frame][i_pos], N) || i_dn !== mulm(x[i_frame][i_pos + T], N)) begin
        failures++; $display("FAIL inv frame %0d pos %0d got %h exp %h", i_frame, i_pos, i_up, mulm(x[i_frame][i_pos], N)); end
      i_pos++;
      if (i_pos == int'(T)) begin i_pos = -1; i_frame++; end
    end
  end

  initial begin
    logic [63:0] w;
    w = powm(7, (P - 1) / N);
    for (int f = 0; f < 3; f++) begin
      for (int n = 0; n < int'(N); n++) x[f][n] = (n < int'(T)) ? {$urandom, $urandom} % P : 0;
      for (int m = 0; m < int'(N); m++) begin
        X[f][m] = 0;
        for (int n = 0; n < int'(N); n++)
          X[f][m] = 64'((128'(X[f][m]) + 128'(mulm(x[f][n], powm(w, (m * n) % N)))) % 128'(P));
      end
    end
    in_sof = 0; in_vld = 0; in_tag = 0; in_up = 0; in_dn = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int f = 0; f < 3; f++) begin
      if (f == 2) begin
        in_vld <= 0; in_sof <= 0; repeat (5) @(posedge clk);
      end
      for (int n = 0; n < int'(T); n++) begin
        in_sof <= (n == 0); in_vld <= 1; in_tag <= 8'(f);
        in_up <= x[f][n]; in_dn <= 0;
        if (n == 0) sof_in_cyc[f] = cyc + 1;
        @(posedge clk);
      end
    end
    in_sof <= 0; in_vld <= 0;
    repeat (2 * LAT + 10) @(posedge clk);
    checks++;
    if (i_frame != 3 || f_frame != 3) begin failures++; $display("FAIL frames f=%0d i=%0d", f_frame, i_frame); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

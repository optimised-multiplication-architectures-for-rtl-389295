// Self-checking test of the addition-recovery stage (k = 8, half = 4 positions).
// A sequence of frames FIRST, NORMAL, NORMAL, FIRST, NORMAL, FLUSH with random
// inverse-transform outputs is driven; a reference kept here (its own copy of the
// left-third buffer) predicts, one clock later, the two coefficient streams and
// the slot descriptor (valid flags and half indices) of every frame.
module tb_addition_recovery;
  import fhe_pkg::*;
  localparam int unsigned N = 8, T = N / 2, HW = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, in_sof, in_vld, s_sof, s_vld, v0, v1;
  iter_kind_e in_kind;
  logic [HW-1:0] in_half, h0, h1;
  logic [63:0] a_up, a_dn, b_up, b_dn;
  logic [64:0] s0, s1;
  int checks = 0, failures = 0;

  addition_recovery #(.N(N), .HIDX_W(HW)) dut (.*);

  logic [63:0] ref_lb [T];
  bit ref_valid = 0;
  int ref_half = 0;

  task automatic frame(iter_kind_e k, int h);
    logic [64:0] e0 [T], e1 [T];
    bit ev0, ev1; int eh0, eh1;
    unique case (k)
      IT_FIRST:  begin ev0 = ref_valid; eh0 = ref_half; ev1 = 1; eh1 = h; end
      IT_NORMAL: begin ev0 = 1; eh0 = h; ev1 = 1; eh1 = h + 1; end
      default:   begin ev0 = ref_valid; eh0 = ref_half; ev1 = 0; eh1 = 0; end
    endcase
    for (int t = 0; t < int'(T); t++) begin
      @(negedge clk);
      in_sof = (t == 0); in_vld = 1; in_kind = k; in_half = HW'(h);
      a_up = {$urandom, $urandom}; a_dn = {$urandom, $urandom};
      b_up = {$urandom, $urandom}; b_dn = {$urandom, $urandom};
      unique case (k)
        IT_FIRST:  begin e0[t] = 65'(ref_lb[t]); e1[t] = 65'(a_up); ref_lb[t] = a_dn; end
        IT_NORMAL: begin e0[t] = 65'(ref_lb[t]) + 65'(a_up); e1[t] = 65'(a_dn) + 65'(b_up); ref_lb[t] = b_dn; end
        default:   begin e0[t] = 65'(ref_lb[t]); e1[t] = 0; ref_lb[t] = 0; end
      endcase
      @(posedge clk); #1;
      checks++;
      if (s_sof !== (t == 0) || s_vld !== 1'b1) begin failures++; $display("FAIL sof/vld"); end
      if (t == 0) begin
        checks++;
        if (v0 !== ev0 || v1 !== ev1 || (ev0 && h0 !== HW'(eh0)) || (ev1 && h1 !== HW'(eh1))) begin
          failures++; $display("FAIL descriptor kind %0d: %b %0d %b %0d", k, v0, h0, v1, h1); end
      end
      if (ev0) begin checks++; if (s0 !== e0[t]) begin failures++; $display("FAIL s0 kind %0d t %0d", k, t); end end
      if (ev1) begin checks++; if (s1 !== e1[t]) begin failures++; $display("FAIL s1 kind %0d t %0d", k, t); end end
    end
    unique case (k)
      IT_FIRST:  begin ref_valid = 1; ref_half = h + 1; end
      IT_NORMAL: begin ref_valid = 1; ref_half = h + 2; end
      default:   ref_valid = 0;
    endcase
  endtask

  initial begin
    clear = 0; in_sof = 0; in_vld = 0; in_kind = IT_FLUSH; in_half = 0;
    a_up = 0; a_dn = 0; b_up = 0; b_dn = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    frame(IT_FIRST, 0);
    frame(IT_NORMAL, 1);
    frame(IT_NORMAL, 3);
    @(negedge clk); in_vld = 0; in_sof = 0; repeat (3) @(negedge clk);   // gap
    frame(IT_FIRST, 1);
    frame(IT_NORMAL, 2);
    frame(IT_FLUSH, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

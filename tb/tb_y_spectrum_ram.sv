// Self-checking test of the Y spectrum RAM: fills all entries with random pairs,
// reads them back in a different order (asynchronous read), then overwrites
// while reading another address in the same clock and checks both results.
module tb_y_spectrum_ram;
  localparam int unsigned DEPTH = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [3:0] waddr, raddr;
  logic [63:0] wdata_up, wdata_dn, rdata_up, rdata_dn;
  logic [63:0] mu [DEPTH], md [DEPTH];
  int checks = 0, failures = 0;

  y_spectrum_ram #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata_up = 0; wdata_dn = 0;
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < int'(DEPTH); i++) begin
        @(negedge clk);
        we = 1; waddr = 4'(i); wdata_up = {$urandom, $urandom}; wdata_dn = {$urandom, $urandom};
        mu[i] = wdata_up; md[i] = wdata_dn;
        raddr = 4'(i + 7);
        if (r > 0) begin
          #1; checks++;
          if (rdata_up !== mu[4'(i + 7)] || rdata_dn !== md[4'(i + 7)]) begin
            failures++; $display("FAIL concurrent read %0d", i); end
        end
      end
      @(negedge clk); we = 0;
      for (int i = int'(DEPTH) - 1; i >= 0; i--) begin
        raddr = 4'(i); #1; checks++;
        if (rdata_up !== mu[i] || rdata_dn !== md[i]) begin failures++; $display("FAIL read %0d", i); end
      end
    end
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

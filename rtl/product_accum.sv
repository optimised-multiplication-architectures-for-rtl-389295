// Product accumulation (the "4th adder"): resolves the carry chain of the
// coefficient sums and adds them into the product RAM, 2b bits per clock.
//
// A slot from addition_recovery (k/2 cycles, two halves of k/2 coefficients) is
// written into one bank of a ping-pong buffer. Once complete it is read out in
// digit order, two coefficients per clock: half 0 first, then half 1, k/2 clocks
// per slot, so accumulation keeps pace with the 2b-bit advance of the block
// products. Each clock
//   acc   = c[2j] + c[2j+1]*2^b + carry + (half already written ? z_word : 0)
//   z_word <= acc mod 2^(2b),  carry <= acc >> 2b
// with z_word the 2b-bit product RAM word at digit pair j of that half (read one
// clock ahead; the RAM has one clock of read latency). Invalid halves are skipped.
// A half index is "already written" if it is not above the highest half written
// so far in this multiplication; otherwise the RAM content is ignored, so the
// product RAM needs no clearing.
// Interface: slot in (s_sof/s_vld/s0/s1 + descriptor); z RAM read and write ports
// of 2b bits; `slot_done` pulses after the last write of a slot and `mult_done`
// after a slot whose second half is invalid (the final flush).
// The 2b-bit read/write buses and the role follow the source architecture; the
// ping-pong reorder buffer is this design's own way of ordering the digits.
module product_accum #(
  parameter int unsigned N      = 256,  // transform points k
  parameter int unsigned B      = 28,   // base bit length b
  parameter int unsigned HIDX_W = 24,
  parameter int unsigned ZAW    = 28    // z RAM word address width (words of 2b bits)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,        // start of a multiplication
  input  logic              s_sof,
  input  logic              s_vld,
  input  logic [64:0]       s0, s1,
  input  logic              v0, v1,
  input  logic [HIDX_W-1:0] h0, h1,
  output logic              z_re,
  output logic [ZAW-1:0]    z_raddr,
  input  logic [2*B-1:0]    z_rdata,      // valid one clock after z_re
  output logic              z_we,
  output logic [ZAW-1:0]    z_waddr,
  output logic [2*B-1:0]    z_wdata,
  output logic              slot_done,
  output logic              mult_done
);
  localparam int unsigned T    = N / 2;
  localparam int unsigned TW   = $clog2(T);
  localparam int unsigned ACCW = 65 + B + 3;

  // ---------------- ping-pong slot buffer ----------------
  logic [64:0] bank [2][N];
  logic          wbank, rbank;
  logic [TW-1:0] wpos, wpos_q;
  logic          v0_q, v1_q;
  logic [HIDX_W-1:0] h0_q, h1_q;

  assign wpos = s_sof ? '0 : wpos_q;

  always_ff @(posedge clk)
    if (s_vld) begin
      bank[wbank][{1'b0, wpos}] <= s0;
      bank[wbank][{1'b1, wpos}] <= s1;
    end

  // ---------------- read-out engine ----------------
  logic              run;
  logic [TW-1:0]     c;          // digit-pair counter within the slot
  logic              r_v0, r_v1;
  logic [HIDX_W-1:0] r_h0, r_h1;
  logic              hw_valid;
  logic [HIDX_W-1:0] hw_half;    // highest half written so far

  logic              cur_valid, cur_fresh, cur_hi;
  logic [HIDX_W-1:0] cur_half;
  logic [TW-1:0]     cur_idx;

  always_comb begin
    cur_hi    = c >= TW'(T / 2);
    cur_half  = cur_hi ? r_h1 : r_h0;
    cur_valid = run && (cur_hi ? r_v1 : r_v0);
    cur_fresh = !hw_valid || (cur_half > hw_half);
    cur_idx   = c - (cur_hi ? TW'(T / 2) : '0);
  end

  // stage 1 registers
  logic              p1_valid, p1_fresh, p1_last, p1_flush;
  logic [ACCW-1:0]   p1_pair;
  logic [ZAW-1:0]    p1_addr;
  logic [ACCW-1:0]   carry;
  logic [ACCW-1:0]   acc;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wbank <= 1'b0; rbank <= 1'b0; wpos_q <= '0;
      v0_q <= 1'b0; v1_q <= 1'b0; h0_q <= '0; h1_q <= '0;
      run <= 1'b0; c <= '0;
      r_v0 <= 1'b0; r_v1 <= 1'b0; r_h0 <= '0; r_h1 <= '0;
      hw_valid <= 1'b0; hw_half <= '0;
      p1_valid <= 1'b0; p1_fresh <= 1'b0; p1_last <= 1'b0; p1_flush <= 1'b0;
      p1_pair <= '0; p1_addr <= '0; carry <= '0;
      slot_done <= 1'b0; mult_done <= 1'b0;
    end else begin
      slot_done <= 1'b0;
      mult_done <= 1'b0;
      if (s_sof) begin
        v0_q <= v0; v1_q <= v1; h0_q <= h0; h1_q <= h1;
      end
      if (s_vld) wpos_q <= wpos + 1'b1;

      // engine step
      if (run) begin
        c <= c + 1'b1;
        if (c == TW'(T - 1)) run <= 1'b0;
      end
      // slot complete: hand the bank to the engine
      if (s_vld && wpos == TW'(T - 1)) begin
        wbank <= ~wbank;
        rbank <= wbank;
        run   <= 1'b1;
        c     <= '0;
        r_v0 <= s_sof ? v0 : v0_q;  r_h0 <= s_sof ? h0 : h0_q;
        r_v1 <= s_sof ? v1 : v1_q;  r_h1 <= s_sof ? h1 : h1_q;
      end
      // high-water mark: updated at the last digit pair of each valid half
      if (cur_valid && (cur_idx == TW'(T / 2 - 1)) && (!hw_valid || cur_half > hw_half)) begin
        hw_valid <= 1'b1;
        hw_half  <= cur_half;
      end

      p1_valid <= cur_valid;
      p1_fresh <= cur_fresh;
      p1_last  <= run && (c == TW'(T - 1));
      p1_flush <= run && !r_v1;
      p1_pair  <= ACCW'(bank[rbank][2*c]) + (ACCW'(bank[rbank][2*c + 1]) << B);
      p1_addr  <= ZAW'(cur_half) * ZAW'(T / 2) + ZAW'(cur_idx);

      // stage 2: accumulate with carry
      if (p1_valid) carry <= acc >> (2 * B);
      if (p1_last) begin
        slot_done <= 1'b1;
        mult_done <= p1_flush;
      end
      if (clear) begin
        hw_valid <= 1'b0;
        carry    <= '0;
      end
    end

  assign z_re    = cur_valid && !cur_fresh;
  assign z_raddr = ZAW'(cur_half) * ZAW'(T / 2) + ZAW'(cur_idx);
  assign acc     = p1_pair + carry + (p1_fresh ? '0 : ACCW'(z_rdata));
  assign z_we    = p1_valid;
  assign z_waddr = p1_addr;
  assign z_wdata = acc[2*B-1:0];
endmodule

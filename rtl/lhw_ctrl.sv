// FSM controller of the low-Hamming-weight multiplier.
//
// Sequences one multiplication through the data processing unit: load the set-bit
// indices of y into the register array, run the product-block counter over all
// nzb blocks, wait for the adder pipeline to drain, then pulse done.
// States: IDLE -> LOAD -> RUN -> DRAIN -> IDLE. `busy` is high outside IDLE;
// a start while busy is ignored.
module lhw_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic load_done,
  input  logic run_done,
  input  logic drain_done,
  output logic load,      // one-clock pulses to the data processing unit
  output logic run,
  output logic busy,
  output logic done
);
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_RUN, S_DRAIN} state_e;
  state_e state;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= S_IDLE; load <= 1'b0; run <= 1'b0; done <= 1'b0;
    end else begin
      load <= 1'b0; run <= 1'b0; done <= 1'b0;
      unique case (state)
        S_IDLE:  if (start)      begin state <= S_LOAD; load <= 1'b1; end
        S_LOAD:  if (load_done)  begin state <= S_RUN;  run  <= 1'b1; end
        S_RUN:   if (run_done)   state <= S_DRAIN;
        S_DRAIN: if (drain_done) begin state <= S_IDLE; done <= 1'b1; end
        default: state <= S_IDLE;
      endcase
    end

  assign busy = state != S_IDLE;
endmodule

// thread_sel: static round-robin thread selection (pipeline stage 0).
//
// Every cycle after reset the next hardware thread is issued into the
// pipeline, 0, 1, ..., NTHREADS-1, 0, ... with no skipping: a thread that is
// waiting on memory or halted is still given its slot and simply replays or
// bubbles, which keeps the schedule static as the model requires. The thread
// number and a valid bit are registered, so the selected thread appears one
// cycle after the slot is granted.
//
// Interface: clk, rst_n (active-low synchronous reset), tid/valid outputs.
// The static round-robin order follows the model; the reset value (thread 0
// first) is this implementation's choice.
module thread_sel #(
  parameter int NTHREADS = 64,
  localparam int TID_W = (NTHREADS > 1) ? $clog2(NTHREADS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [TID_W-1:0] tid,
  output logic             valid
);
  logic [TID_W-1:0] next_tid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      next_tid <= '0;
      tid      <= '0;
      valid    <= 1'b0;
    end else begin
      tid      <= next_tid;
      valid    <= 1'b1;
      next_tid <= (next_tid == TID_W'(NTHREADS - 1)) ? '0 : next_tid + 1'b1;
    end
  end
endmodule

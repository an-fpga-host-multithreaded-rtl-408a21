// mem_cmd_fifo: the memory command FIFO between a host cache controller and
// the memory controller.
//
// A synchronous first-in first-out queue of W-bit commands with DEPTH
// entries (default 64, one outstanding miss for each of the 64 threads).
// push/pop in the same cycle are allowed; pushing when full or popping when
// empty is a protocol error, checked by assertions. The head entry is shown
// combinationally on dout whenever empty is low.
//
// Interface: clk, rst_n, push/din, pop/dout, full, empty, count.
// The model names this FIFO; its depth and interface are this design's own.
module mem_cmd_fifo #(
  parameter int W     = 32,
  parameter int DEPTH = 64,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         full,
  output logic         empty,
  output logic [AW:0]  count
);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;

  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);
  assign dout  = mem[rp];

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule

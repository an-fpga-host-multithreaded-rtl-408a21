// mem_arbiter: the cluster interconnect that lets the host caches of several
// pipelines share one memory controller port.
//
// N requesters (default 8: the I-cache and D-cache of four pipelines) send
// 128-bit beats with a valid/ready handshake. A round-robin arbiter grants
// one requester at a time; a granted write burst (beat 0 then beat 1) keeps
// the grant until its last beat, so the two halves of a line reach the
// controller back to back. Refill beats coming back from the controller are
// steered to the requester named by the memory ID: bits [6 +: log2(N)] of the
// ID are {core within cluster, I/D}, as the caches build it.
//
// Interface: per-requester req_valid/req_ready/req and resp_valid/resp,
// controller side m_valid/m_ready/m_req and m_resp_valid/m_resp.
// Follows the model: four pipelines per cluster sharing one DDR2 controller.
// The arbitration policy, burst locking and ID routing are this design's own.
module mem_arbiter
  import sparc_pkg::*;
#(
  parameter int N = 8,
  localparam int SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid [N],
  output logic        req_ready [N],
  input  mem_req_t    req [N],
  output logic        resp_valid [N],
  output mem_resp_t   resp [N],
  output logic        m_valid,
  input  logic        m_ready,
  output mem_req_t    m_req,
  input  logic        m_resp_valid,
  input  mem_resp_t   m_resp
);
  logic [SW-1:0] last_q, sel;
  logic          found, locked_q;
  logic [SW-1:0] lock_sel_q;

  // round-robin pick, starting after the last granted requester
  always_comb begin
    sel   = last_q;
    found = 1'b0;
    for (int k = 1; k <= N; k++) begin
      logic [SW-1:0] c;
      c = SW'((int'(last_q) + k) % N);
      if (!found && req_valid[c]) begin
        sel   = c;
        found = 1'b1;
      end
    end
    if (locked_q) begin
      sel   = lock_sel_q;
      found = req_valid[lock_sel_q];
    end
  end

  always_comb begin
    m_valid = found;
    m_req   = req[sel];
    for (int k = 0; k < N; k++) req_ready[k] = found && (SW'(k) == sel) && m_ready;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      last_q     <= '0;
      locked_q   <= 1'b0;
      lock_sel_q <= '0;
    end else if (found && m_ready) begin
      last_q     <= sel;
      locked_q   <= req[sel].write && !req[sel].beat;
      lock_sel_q <= sel;
    end
  end

  // refill routing
  logic [SW-1:0] dst;
  assign dst = m_resp.id[6 +: SW];
  always_comb begin
    for (int k = 0; k < N; k++) begin
      resp[k]       = m_resp;
      resp_valid[k] = m_resp_valid && (dst == SW'(k));
    end
  end

  a_burst_kept: assert property (@(posedge clk) disable iff (!rst_n)
    (m_valid && m_ready && m_req.write && !m_req.beat) |=> (m_valid && m_req.write && m_req.beat));
endmodule

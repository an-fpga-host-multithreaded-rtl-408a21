// mem_model: behavioural stand-in for a DDR2 memory controller port, for
// simulation only (not synthesizable).
//
// Accepts 128-bit request beats (sparc_pkg::mem_req_t). A write line arrives
// as beat 0 then beat 1 and is stored at once. A read is answered LATENCY
// cycles after it was accepted with two response beats on consecutive
// cycles, in request order. Storage is a sparse array of 32-bit words,
// reading as zero where never written; word w of a 32-byte line sits in beat
// w/4, bits 64*((w/2)%2) + 32*(1 - w%2) of the 128-bit beat (big-endian
// words inside each 64-bit quarter, as the host caches store them).
// req_ready drops when more than MAXQ reads wait. Testbenches load and
// inspect memory with the poke/peek functions.
module mem_model
  import sparc_pkg::*;
#(
  parameter int LATENCY = 25,
  parameter int MAXQ    = 64
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      req_valid,
  output logic      req_ready,
  input  mem_req_t  req,
  output logic      resp_valid,
  output mem_resp_t resp
);
  logic [31:0] words [logic [29:0]];
  typedef struct { longint due; logic [LINE_AW-1:0] line; logic [MEM_ID_W-1:0] id; } rd_t;
  rd_t    q [$];
  longint now;
  int     beat_out;
  int     reads, writes;

  function automatic void poke(logic [31:0] addr, logic [31:0] data);
    words[addr[31:2]] = data;
  endfunction

  function automatic logic [31:0] peek(logic [31:0] addr);
    return words.exists(addr[31:2]) ? words[addr[31:2]] : 32'd0;
  endfunction

  function automatic int wpos(int w);
    return 64 * ((w / 2) % 2) + 32 * (1 - (w % 2));
  endfunction

  assign req_ready = (q.size() < MAXQ);

  initial begin
    now = 0; beat_out = 0; reads = 0; writes = 0;
  end

  always @(posedge clk) begin
    now <= now + 1;
    resp_valid <= 1'b0;
    if (rst_n && req_valid && req_ready) begin
      if (req.write) begin
        for (int w = 0; w < 4; w++) begin
          int lw;
          lw = int'(req.beat) * 4 + w;
          words[{req.line, 3'(lw)}] = req.data[wpos(lw) +: 32];
        end
        if (req.beat) writes++;
      end else begin
        rd_t e;
        e.due = now + longint'(LATENCY); e.line = req.line; e.id = req.id;
        q.push_back(e);
        reads++;
      end
    end
    if (rst_n && q.size() > 0 && q[0].due <= now) begin
      mem_resp_t r;
      r.line = q[0].line;
      r.id   = q[0].id;
      r.beat = (beat_out == 1);
      r.data = '0;
      for (int w = 0; w < 4; w++) begin
        int lw;
        lw = beat_out * 4 + w;
        r.data[wpos(lw) +: 32] = peek({q[0].line, 3'(lw), 2'b00});
      end
      resp       <= r;
      resp_valid <= 1'b1;
      if (beat_out == 1) begin
        beat_out = 0;
        void'(q.pop_front());
      end else begin
        beat_out = 1;
      end
    end
  end
endmodule

// tb_host_cache: drives one host_cache (16 threads, small command FIFO so
// that it fills) against the behavioural memory model the way the pipeline
// does: one access per cycle, threads in round-robin order, a missed access
// replayed on the thread's next turn. Each thread loads and stores random
// words (random byte masks) over three lines that conflict on every index,
// so misses, write-backs of dirty victims and a full FIFO all happen. A
// reference copy of memory checks every load hit. At the end each thread
// touches a fourth tag on every index, forcing all dirty lines out, and the
// memory model's contents are compared with the reference.
module tb_host_cache;
  import sparc_pkg::*;
  localparam int NT = 16;
  localparam int TW = $clog2(NT);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          req_valid, req_write;
  logic [TW-1:0] req_tid;
  logic [31:0]   req_addr, req_wdata;
  logic [3:0]    req_mask;
  logic          resp_valid, resp_hit;
  logic [31:0]   resp_rdata;
  logic          mreq_valid, mreq_ready, mresp_valid;
  mem_req_t      mreq;
  mem_resp_t     mresp;
  logic          ev_miss, ev_wb, ev_full, e_tp, e_c, e_d;
  int checks = 0, failures = 0;
  int n_miss = 0, n_wb = 0, n_full = 0, n_hit = 0, n_err = 0;

  host_cache #(.NTHREADS(NT), .FIFO_DEPTH(4)) dut (
    .clk, .rst_n, .cache_id (4'd0),
    .req_valid, .req_tid, .req_addr, .req_write, .req_wdata, .req_mask,
    .resp_valid, .resp_hit, .resp_rdata,
    .mreq_valid, .mreq_ready, .mreq, .mresp_valid, .mresp,
    .ev_miss, .ev_writeback (ev_wb), .ev_fifo_full (ev_full),
    .err_tag_parity (e_tp), .err_ecc_corrected (e_c), .err_ecc_double (e_d)
  );

  mem_model #(.LATENCY(20)) u_mem (
    .clk, .rst_n, .req_valid (mreq_valid), .req_ready (mreq_ready), .req (mreq),
    .resp_valid (mresp_valid), .resp (mresp)
  );

  logic [31:0] refm [logic [31:0]];
  typedef struct { logic wr; logic [31:0] addr, data; logic [3:0] mask; } op_t;
  op_t cur [NT];
  op_t inflight, chk;          // issued this cycle / answered this cycle
  logic inflight_v, chk_v;
  logic [TW-1:0] inflight_t, chk_t;
  int done_ops [NT];
  int phase;            // 0 random traffic, 1 eviction sweep
  int sweep [NT];

  function automatic logic [31:0] addr_of(int t, int tagsel, int idx, int w);
    return 32'h0002_0000 + 32'(t) * 32'h1000 + 32'(tagsel) * 32'h100 + 32'(idx) * 32 + 32'(w) * 4;
  endfunction

  function automatic op_t new_op(int t);
    op_t o;
    o.wr   = ($urandom % 2) == 0;
    o.addr = addr_of(t, $urandom % 3, $urandom % 8, $urandom % 8);
    o.data = $urandom;
    o.mask = 4'($urandom);
    if (o.mask == 0) o.mask = 4'hF;
    return o;
  endfunction

  function automatic logic [31:0] ref_rd(logic [31:0] a);
    return refm.exists(a) ? refm[a] : 32'd0;
  endfunction

  // memory side: initial contents known to both the model and the reference
  initial begin
    for (int t = 0; t < NT; t++)
      for (int s = 0; s < 4; s++)
        for (int i = 0; i < 8; i++)
          for (int w = 0; w < 8; w++) begin
            logic [31:0] a, d;
            a = addr_of(t, s, i, w); d = $urandom;
            u_mem.poke(a, d); refm[a] = d;
          end
  end

  int cyc = 0;
  logic [TW-1:0] rr = '0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (ev_miss) n_miss++;
    if (ev_wb)   n_wb++;
    if (ev_full) n_full++;
    if (e_tp || e_c || e_d) n_err++;
    // response of the access issued in the previous cycle
    if (chk_v) begin
      checks++;
      if (!resp_valid) begin failures++; $display("FAIL no resp_valid"); end
      if (resp_hit) begin
        n_hit++;
        if (chk.wr) begin
          logic [31:0] o;
          o = ref_rd(chk.addr);
          for (int k = 0; k < 4; k++) if (chk.mask[k]) o[8*k +: 8] = chk.data[8*k +: 8];
          refm[chk.addr] = o;
        end else if (resp_rdata !== ref_rd(chk.addr)) begin
          failures++;
          $display("FAIL load t%0d %h: got %h expected %h", chk_t, chk.addr,
                   resp_rdata, ref_rd(chk.addr));
        end
        done_ops[chk_t]++;
        if (phase == 0) cur[chk_t] = new_op(int'(chk_t));
        else begin
          sweep[chk_t]++;
          cur[chk_t].wr = 1'b0;
          cur[chk_t].addr = addr_of(int'(chk_t), 3, sweep[chk_t] % 8, 0);
        end
      end
    end
    chk = inflight; chk_v = inflight_v; chk_t = inflight_t;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      inflight   = cur[rr];
      inflight_v = 1'b1;
      inflight_t = rr;
      req_valid  = 1'b1;
      req_tid    = rr;
      req_write  = cur[rr].wr;
      req_addr   = cur[rr].addr;
      req_wdata  = cur[rr].data;
      req_mask   = cur[rr].wr ? cur[rr].mask : 4'h0;
      rr         = rr + 1'b1;
    end
  end

  initial begin
    req_valid = 0; req_tid = '0; req_write = 0; req_addr = '0; req_wdata = '0; req_mask = '0;
    inflight_v = 0; chk_v = 0; phase = 0;
    for (int t = 0; t < NT; t++) begin cur[t] = new_op(t); done_ops[t] = 0; sweep[t] = 0; end
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (cyc > 30000);
    // eviction sweep: every thread reads tag 3 on all its indices
    @(posedge clk);
    phase = 1;
    for (int t = 0; t < NT; t++) begin
      sweep[t] = 0;
      cur[t].wr = 1'b0; cur[t].addr = addr_of(t, 3, 0, 0);
    end
    while (1) begin
      int mn;
      @(posedge clk);
      mn = 1 << 30;
      for (int t = 0; t < NT; t++) if (sweep[t] < mn) mn = sweep[t];
      if (mn >= 8) break;
    end
    repeat (200) @(posedge clk);
    // every word of the three working tags must now be in memory
    for (int t = 0; t < NT; t++)
      for (int s = 0; s < 3; s++)
        for (int i = 0; i < 8; i++)
          for (int w = 0; w < 8; w++) begin
            logic [31:0] a;
            a = addr_of(t, s, i, w);
            checks++;
            if (u_mem.peek(a) !== ref_rd(a)) begin
              failures++;
              if (failures < 10) $display("FAIL memory %h: %h expected %h", a, u_mem.peek(a), ref_rd(a));
            end
          end
    checks++; if (n_miss < 100) begin failures++; $display("FAIL too few misses %0d", n_miss); end
    checks++; if (n_wb < 50)    begin failures++; $display("FAIL too few write-backs %0d", n_wb); end
    checks++; if (n_full == 0)  begin failures++; $display("FAIL FIFO never full"); end
    checks++; if (n_hit < 5000) begin failures++; $display("FAIL too few hits %0d", n_hit); end
    checks++; if (n_err != 0)   begin failures++; $display("FAIL RAM errors %0d", n_err); end
    $display("hits=%0d misses=%0d writebacks=%0d fifo_full=%0d", n_hit, n_miss, n_wb, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

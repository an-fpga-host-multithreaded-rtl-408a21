// tb_mem_arbiter: four requesters issue random streams of single read beats
// and two-beat write bursts (each beat tagged with the requester and a
// sequence number) into a controller side whose ready toggles randomly.
// Checks: every accepted controller beat is the beat the granted requester
// handed over in that cycle, exactly one requester is accepted per transfer,
// beat 1 of a burst follows its beat 0 from the same requester with nothing
// between, every requester's beats arrive in order and all are served
// (no starvation), and refill responses reach only the requester named by
// the ID bits.
module tb_mem_arbiter;
  import sparc_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      req_valid [N], req_ready [N], resp_valid [N];
  mem_req_t  req [N];
  mem_resp_t resp [N];
  logic      m_valid, m_ready, m_resp_valid;
  mem_req_t  m_req;
  mem_resp_t m_resp;
  int checks = 0, failures = 0;

  mem_arbiter #(.N(N)) dut (.clk, .rst_n, .req_valid, .req_ready, .req, .resp_valid, .resp,
                            .m_valid, .m_ready, .m_req, .m_resp_valid, .m_resp);

  int sent [N], got [N];          // beats handed over / seen at the controller
  int served [N];
  logic burst_open;
  int   burst_src;

  task automatic chk(logic c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask

  function automatic mem_req_t mk(int i, int seq, logic wr, logic beat);
    mem_req_t r;
    r = '0;
    r.write = wr; r.beat = beat;
    r.id    = MEM_ID_W'(i << 6);
    r.line  = LINE_AW'(seq);
    r.data  = {32'(i), 32'(seq), 64'hA5A5_0000_0000_5A5A};
    return r;
  endfunction

  // requesters: new request drawn after the previous one is accepted; write
  // beat 1 is presented right after beat 0
  always @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin req_valid[i] <= 1'b0; sent[i] = 0; end
    end else begin
      for (int i = 0; i < N; i++) begin
        if (req_valid[i] && req_ready[i]) begin
          sent[i]++;
          if (req[i].write && !req[i].beat) req[i] <= mk(i, sent[i], 1'b1, 1'b1);
          else begin
            req_valid[i] <= ($urandom % 4) != 0;
            req[i]       <= mk(i, sent[i], $urandom % 2 == 0, 1'b0);
          end
        end else if (!req_valid[i] && ($urandom % 3) == 0) begin
          req_valid[i] <= 1'b1;
          req[i]       <= mk(i, sent[i], $urandom % 2 == 0, 1'b0);
        end
      end
    end
  end

  // controller side: random ready, checks on each transfer
  always @(negedge clk) m_ready = ($urandom % 4) != 0;

  always @(posedge clk) if (rst_n) begin
    int nacc, src;
    nacc = 0; src = -1;
    for (int i = 0; i < N; i++) if (req_valid[i] && req_ready[i]) begin nacc++; src = i; end
    if (m_valid && m_ready) begin
      chk(nacc == 1, "exactly one requester accepted");
      if (src >= 0) begin
        chk(m_req == req[src], "controller beat equals granted request");
        chk(int'(m_req.data[95:64]) == got[src], $sformatf("in-order beats of %0d", src));
        got[src]++;
        served[src]++;
      end
      if (burst_open) chk(src == burst_src && m_req.write && m_req.beat, "burst kept together");
      burst_open = m_req.write && !m_req.beat;
      burst_src  = src;
    end else begin
      chk(nacc == 0, "no accept without a transfer");
      if (burst_open && m_valid) chk(m_req.write && m_req.beat, "burst holds the grant");
    end
  end

  // refill routing: a random ID every cycle
  always @(negedge clk) begin
    m_resp_valid = ($urandom % 2) == 0;
    m_resp = '0;
    m_resp.id = MEM_ID_W'($urandom);
    m_resp.line = LINE_AW'($urandom);
    m_resp.data = {$urandom, $urandom, $urandom, $urandom};
    m_resp.beat = $urandom % 2 == 0;
    #1;
    for (int i = 0; i < N; i++) begin
      chk(resp_valid[i] == (m_resp_valid && int'(m_resp.id[7:6]) == i), "response routed");
      if (resp_valid[i]) chk(resp[i] == m_resp, "response payload");
    end
  end

  initial begin
    burst_open = 0;
    for (int i = 0; i < N; i++) begin got[i] = 0; served[i] = 0; req[i] = '0; end
    m_ready = 0; m_resp_valid = 0; m_resp = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (20000) @(posedge clk);
    for (int i = 0; i < N; i++) chk(served[i] > 1000, $sformatf("requester %0d served %0d", i, served[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mt_pipeline: end-to-end test of one multithreaded pipeline with its two
// host caches, a 2-way mem_arbiter and the behavioural memory.
//
// NTHREADS = 16 threads all run the test program of sparc_prog_pkg from
// address 0. The test waits until every thread has halted, then checks each
// thread's data area in memory against values computed here, checks that the
// pipeline commits at most one instruction per cycle and that a thread never
// commits twice within NTHREADS cycles (the round-robin issue rate), and that
// I-cache replays, D-cache replays, misses, write-backs, traps and microcode
// steps all occurred. Even threads also request a level-15 interrupt, taken
// once as soon as they enable traps (the handler returns at once); odd
// threads request level 7, which PIL = 15 must mask.
module tb_mt_pipeline;
  import sparc_pkg::*;
  import sparc_prog_pkg::*;
  import sparc_asm_pkg::*;

  localparam int NT = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      rv [2], rr [2], sv [2];
  mem_req_t  rq [2];
  mem_resp_t sp [2];
  logic      m_valid, m_ready, mr_valid;
  mem_req_t  m_req;
  mem_resp_t m_resp;
  logic [NT-1:0] halted;
  logic ev_commit, ev_ireplay, ev_dreplay, ev_trap, ev_uop, ev_miss, ev_wb;
  logic err_par, err_corr, err_dbl;
  logic [3:0] irq_level [NT];

  mt_pipeline #(.NTHREADS(NT)) dut (
    .clk, .rst_n, .core_id (3'd0),
    .imreq_valid (rv[0]), .imreq_ready (rr[0]), .imreq (rq[0]),
    .imresp_valid (sv[0]), .imresp (sp[0]),
    .dmreq_valid (rv[1]), .dmreq_ready (rr[1]), .dmreq (rq[1]),
    .dmresp_valid (sv[1]), .dmresp (sp[1]),
    .irq_level, .halted, .ev_commit, .ev_ireplay, .ev_dreplay, .ev_trap, .ev_uop,
    .ev_miss, .ev_writeback (ev_wb), .err_parity (err_par),
    .err_ecc_corrected (err_corr), .err_ecc_double (err_dbl)
  );

  mem_arbiter #(.N(2)) u_arb (
    .clk, .rst_n, .req_valid (rv), .req_ready (rr), .req (rq),
    .resp_valid (sv), .resp (sp),
    .m_valid, .m_ready, .m_req, .m_resp_valid (mr_valid), .m_resp
  );

  mem_model #(.LATENCY(25)) u_mem (
    .clk, .rst_n, .req_valid (m_valid), .req_ready (m_ready), .req (m_req),
    .resp_valid (mr_valid), .resp (m_resp)
  );

  int checks = 0, failures = 0;
  int n_commit = 0, n_ireplay = 0, n_dreplay = 0, n_trap = 0, n_uop = 0;
  int n_miss = 0, n_wb = 0, n_ecc = 0;
  int n_irq [NT];
  int irq_bad = 0;
  longint cyc = 0;
  longint last_commit [NT];
  int rate_fail = 0;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      n_ireplay += int'(ev_ireplay);
      n_dreplay += int'(ev_dreplay);
      n_trap    += int'(ev_trap);
      n_uop     += int'(ev_uop);
      n_miss    += int'(ev_miss);
      n_wb      += int'(ev_wb);
      n_ecc     += int'(err_corr) + int'(err_dbl) + int'(err_par);
      // interrupts: even threads request level 15 (taken as soon as they
      // enable traps), odd threads level 7, masked by PIL = 15; a request
      // is withdrawn once its trap has been taken
      if (ev_trap && dut.wb_q.tt[7:4] == 4'h1) begin
        n_irq[dut.wb_q.tid]++;
        if (dut.wb_q.tt != 8'h1F) irq_bad++;
        irq_level[dut.wb_q.tid] <= 4'd0;
      end
      if (dut.wb_q.v) begin
        n_commit++;
        if (last_commit[dut.wb_q.tid] >= 0 && cyc - last_commit[dut.wb_q.tid] < longint'(NT))
          rate_fail++;
        last_commit[dut.wb_q.tid] = cyc;
      end
    end
  end

  initial begin
    for (int t = 0; t < NT; t++) begin
      last_commit[t] = -1;
      n_irq[t]       = 0;
      irq_level[t]   = (t % 2 == 0) ? 4'd15 : 4'd7;
    end
    // interrupt handler for level 15: return to the interrupted instruction
    u_mem.poke(TBA + 32'h1F0, a_r(O3_JMPL, 0, 17, 0));
    u_mem.poke(TBA + 32'h1F4, a_i(O3_RETT, 0, 18, 0));
    for (int i = 0; i < PROG_LEN; i++) u_mem.poke(32'(4 * i), prog_word(i));
    for (int i = 0; i < HAND_LEN; i++) u_mem.poke(HANDLER + 32'(4 * i), handler_word(i));
    for (int i = 0; i < HAND_LEN; i++) u_mem.poke(TAG_HANDLER + 32'(4 * i), tag_handler_word(i));
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    while (!(&halted)) @(posedge clk);
    repeat (20) @(posedge clk);
    for (int t = 0; t < NT; t++)
      for (int k = 0; k < NCHECK; k++)
        check($sformatf("thread %0d word %0d", t, k), u_mem.peek(data_addr(t, k)), expected(t, k));
    check("round-robin commit spacing violations", 32'(rate_fail), 0);
    check("traps taken (one per thread, one interrupt per even thread, one tag overflow per thread not a multiple of 4)",
          32'(n_trap), 32'(NT + NT / 2 + 3 * NT / 4));
    for (int t = 0; t < NT; t++)
      check($sformatf("interrupts taken by thread %0d", t), 32'(n_irq[t]), (t % 2 == 0) ? 1 : 0);
    check("interrupt trap type", 32'(irq_bad), 0);
    checks++; if (n_ireplay == 0) begin failures++; $display("FAIL no I-cache replay"); end
    checks++; if (n_dreplay == 0) begin failures++; $display("FAIL no D-cache replay"); end
    checks++; if (n_uop == 0)     begin failures++; $display("FAIL no microcode step"); end
    checks++; if (n_miss == 0)    begin failures++; $display("FAIL no cache miss"); end
    checks++; if (n_wb < 2 * NT)  begin failures++; $display("FAIL too few write-backs %0d", n_wb); end
    check("RAM errors reported", 32'(n_ecc), 0);
    $display("cycles=%0d commits=%0d ireplay=%0d dreplay=%0d traps=%0d uops=%0d misses=%0d writebacks=%0d",
             cyc, n_commit, n_ireplay, n_dreplay, n_trap, n_uop, n_miss, n_wb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: halted=%b", halted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

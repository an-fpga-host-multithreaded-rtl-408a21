// tb_sparc_mt_top: end-to-end test of the full model at its default size:
// two clusters of four pipelines, 64 threads each (512 SPARC contexts), each
// cluster connected to its own behavioural memory controller.
//
// Every thread runs the sparc_prog_pkg test program. When all 512 threads
// have halted, each thread's data area is compared with the expected image.
// The test also counts, and requires at least once: I-cache and D-cache
// replays, cache misses, dirty write-backs, traps, microcode steps and
// cycles in which several caches of a cluster competed for the memory port,
// and one interrupt per pipeline (thread p of pipeline p requests level 15);
// and it checks that no pipeline ever commits two instructions of the same
// thread within 64 cycles (round-robin issue) and that no ECC or parity
// error was reported.
module tb_sparc_mt_top;
  import sparc_pkg::*;
  import sparc_prog_pkg::*;
  import sparc_asm_pkg::*;

  localparam int NCL = 2, CPC = 4, NT = 64, NC = NCL * CPC;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      mc_req_valid [NCL], mc_req_ready [NCL], mc_resp_valid [NCL];
  mem_req_t  mc_req [NCL];
  mem_resp_t mc_resp [NCL];
  logic [NT-1:0] halted [NC];
  logic [NC-1:0] ev_commit, ev_ireplay, ev_dreplay, ev_trap, ev_uop, ev_miss, ev_wb;
  logic [NC-1:0] err_par, err_corr, err_dbl;

  sparc_mt_top dut (
    .clk, .rst_n, .irq_level,
    .mc_req_valid, .mc_req_ready, .mc_req, .mc_resp_valid, .mc_resp,
    .halted, .ev_commit, .ev_ireplay, .ev_dreplay, .ev_trap, .ev_uop,
    .ev_miss, .ev_writeback (ev_wb), .err_parity (err_par),
    .err_ecc_corrected (err_corr), .err_ecc_double (err_dbl)
  );

  mem_model #(.LATENCY(25)) u_mem0 (
    .clk, .rst_n, .req_valid (mc_req_valid[0]), .req_ready (mc_req_ready[0]),
    .req (mc_req[0]), .resp_valid (mc_resp_valid[0]), .resp (mc_resp[0])
  );
  mem_model #(.LATENCY(25)) u_mem1 (
    .clk, .rst_n, .req_valid (mc_req_valid[1]), .req_ready (mc_req_ready[1]),
    .req (mc_req[1]), .resp_valid (mc_resp_valid[1]), .resp (mc_resp[1])
  );

  int checks = 0, failures = 0;
  int n_commit = 0, n_ireplay = 0, n_dreplay = 0, n_trap = 0, n_uop = 0;
  int n_miss = 0, n_wb = 0, n_err = 0, n_contend = 0, rate_fail = 0;
  longint cyc = 0;
  longint last_commit [NC][NT];
  logic [3:0] irq_level [NC][NT];
  int n_irq = 0;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic require(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  function automatic bit all_halted();
    for (int c = 0; c < NC; c++) if (!(&halted[c])) return 1'b0;
    return 1'b1;
  endfunction

  // commit spacing per thread, watched at each pipeline's commit stage
  for (genvar c = 0; c < NC; c++) begin : g_mon
    always @(posedge clk) begin
      if (rst_n && dut.g_cl[c / CPC].g_core[c % CPC].u_pipe.wb_q.v) begin
        automatic int t = int'(dut.g_cl[c / CPC].g_core[c % CPC].u_pipe.wb_q.tid);
        if (last_commit[c][t] >= 0 && cyc - last_commit[c][t] < longint'(NT)) rate_fail++;
        last_commit[c][t] = cyc;
      end
      // thread c of pipeline c gets a level-15 interrupt request, withdrawn
      // when the interrupt trap has been taken
      if (rst_n && ev_trap[c] && dut.g_cl[c / CPC].g_core[c % CPC].u_pipe.wb_q.tt == 8'h1F) begin
        n_irq++;
        irq_level[c][dut.g_cl[c / CPC].g_core[c % CPC].u_pipe.wb_q.tid] <= 4'd0;
      end
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      n_commit  += $countones(ev_commit);
      n_ireplay += $countones(ev_ireplay);
      n_dreplay += $countones(ev_dreplay);
      n_trap    += $countones(ev_trap);
      n_uop     += $countones(ev_uop);
      n_miss    += $countones(ev_miss);
      n_wb      += $countones(ev_wb);
      n_err     += $countones(err_par) + $countones(err_corr) + $countones(err_dbl);
      for (int k = 0; k < NCL; k++) begin
        int nv = 0;
        for (int r = 0; r < 2 * CPC; r++) nv += int'(dut.g_cl[0].rv[r] && k == 0);
        for (int r = 0; r < 2 * CPC; r++) nv += int'(dut.g_cl[1].rv[r] && k == 1);
        if (nv > 1) n_contend++;
      end
    end
  end

  initial begin
    for (int c = 0; c < NC; c++)
      for (int t = 0; t < NT; t++) begin
        last_commit[c][t] = -1;
        irq_level[c][t]   = (t == c) ? 4'd15 : 4'd0;
      end
    u_mem0.poke(TBA + 32'h1F0, a_r(O3_JMPL, 0, 17, 0));   // interrupt handler:
    u_mem0.poke(TBA + 32'h1F4, a_i(O3_RETT, 0, 18, 0));   // return at once
    u_mem1.poke(TBA + 32'h1F0, a_r(O3_JMPL, 0, 17, 0));
    u_mem1.poke(TBA + 32'h1F4, a_i(O3_RETT, 0, 18, 0));
    for (int i = 0; i < PROG_LEN; i++) begin
      u_mem0.poke(32'(4 * i), prog_word(i));
      u_mem1.poke(32'(4 * i), prog_word(i));
    end
    for (int i = 0; i < HAND_LEN; i++) begin
      u_mem0.poke(HANDLER + 32'(4 * i), handler_word(i));
      u_mem1.poke(HANDLER + 32'(4 * i), handler_word(i));
      u_mem0.poke(TAG_HANDLER + 32'(4 * i), tag_handler_word(i));
      u_mem1.poke(TAG_HANDLER + 32'(4 * i), tag_handler_word(i));
    end
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    while (!all_halted()) @(posedge clk);
    repeat (20) @(posedge clk);
    for (int c = 0; c < NC; c++)
      for (int t = 0; t < NT; t++)
        for (int k = 0; k < NCHECK; k++) begin
          automatic int hw = c * NT + t;
          automatic logic [31:0] got = (c < CPC) ? u_mem0.peek(data_addr(hw, k))
                                                 : u_mem1.peek(data_addr(hw, k));
          check($sformatf("core %0d thread %0d word %0d", c, t, k), got, expected(hw, k));
        end
    check("commit spacing violations", 32'(rate_fail), 0);
    check("traps taken (one per thread, one interrupt per pipeline, one tag overflow per thread not a multiple of 4)",
          32'(n_trap), 32'(NC * NT + NC + 3 * NC * NT / 4));
    check("interrupts taken", 32'(n_irq), 32'(NC));
    require("interrupt", n_irq);
    check("RAM errors reported", 32'(n_err), 0);
    require("I-cache replay", n_ireplay);
    require("D-cache replay", n_dreplay);
    require("cache miss", n_miss);
    require("dirty write-back", n_wb);
    require("microcode step", n_uop);
    require("memory port contention", n_contend);
    $display("cycles=%0d commits=%0d ireplay=%0d dreplay=%0d traps=%0d uops=%0d misses=%0d writebacks=%0d contention=%0d",
             cyc, n_commit, n_ireplay, n_dreplay, n_trap, n_uop, n_miss, n_wb, n_contend);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_throughput: issue-rate workload for one pipeline at its default size
// (64 threads), with the fixed-latency memory model.
//
// Every thread runs a counted loop of ALU instructions and a conditional
// branch (subcc / bne / add in the delay slot, ITER times), stores its
// result, loads an aliasing address to force the dirty line out, and halts.
// The only misses are the cold I-cache and D-cache misses, so nearly every
// issue slot should commit an instruction. The testbench measures commits
// per cycle from the first commit to the last halt (cold misses included)
// and requires at least 0.95. It turns the rate into the aggregate rate of
// 8 such pipelines at the 150 MHz clock quoted for the FPGA design, which
// must exceed 1 G instructions/s. It requires that a miss costs on average
// no more than two replayed slots: the refill normally arrives within one
// 64-cycle round, but the cold misses of all 64 threads arrive together and
// queue at the memory port. Replays during the caches' tag clear after reset
// are not caused by misses and are not counted. Finally it checks each
// thread's stored result in memory.
module tb_throughput;
  import sparc_pkg::*;
  import sparc_asm_pkg::*;

  localparam int NT   = 64;
  localparam int ITER = 100;
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
  initial for (int t = 0; t < NT; t++) irq_level[t] = 4'd0;

  mt_pipeline dut (
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

  function automatic logic [31:0] prog(int i);
    unique case (i)
      0: return a_r(O3_RDY, 1, ASR_TID, 0);          // %g1 = thread number
      1: return a_i(O3_OR, 2, 0, ITER);              // %g2 = ITER
      2: return a_i(O3_OR, 3, 0, 0);                 // %g3 = 0
      3: return a_i(6'h14, 2, 2, 1);                 // loop: subcc %g2, 1, %g2
      4: return bicc(C_NE, 1'b0, -1);                //       bne loop
      5: return a_i(O3_ADD, 3, 3, 2);                //       add %g3, 2, %g3
      6: return a_i(O3_SLL, 4, 1, 6);                // %g4 = thread * 64
      7: return m_i(O3_ST, 3, 4, 32'h800);           // st %g3, [%g4 + 0x800]
      8: return m_i(O3_LD, 5, 4, 32'h900);           // ld [%g4 + 0x900] (same index)
      default: return ticc(C_A, 0, 0);               // ta 0 with ET = 0: halt
    endcase
  endfunction
  localparam int PLEN  = 10;
  localparam int NINST = 3 + 3 * ITER + 3;           // committed per thread (ta 0 traps)

  int checks = 0, failures = 0;
  longint cyc = 0, first = -1, last = 0;
  int n_commit = 0, n_replay = 0, n_miss = 0, n_err = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (ev_commit) begin
        n_commit++;
        if (first < 0) first = cyc;
        last = cyc;
      end
      // replays while the caches still clear their tags after reset are
      // not caused by misses
      if (!dut.u_icache.init_busy && !dut.u_dcache.init_busy)
        n_replay += int'(ev_ireplay) + int'(ev_dreplay);
      n_miss   += int'(ev_miss);
      n_err    += int'(err_par) + int'(err_corr) + int'(err_dbl);
    end
  end

  initial begin
    real rate, gips, per_miss;
    for (int i = 0; i < PLEN; i++) u_mem.poke(32'(4 * i), prog(i));
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    while (!(&halted)) @(posedge clk);
    repeat (200) @(posedge clk);
    rate     = real'(n_commit) / real'(last - first + 1);
    gips     = rate * 8.0 * 0.150;
    per_miss = real'(n_replay) / real'(n_miss);
    $display("instructions=%0d cycles=%0d commits/cycle=%0.3f replays=%0d misses=%0d replays/miss=%0.2f",
             n_commit, last - first + 1, rate, n_replay, n_miss, per_miss);
    $display("8 pipelines at 150 MHz: %0.3f G instructions/s", gips);
    checks++;
    if (n_commit != NT * NINST) begin
      failures++; $display("FAIL committed %0d expected %0d", n_commit, NT * NINST);
    end
    checks++; if (rate < 0.95)     begin failures++; $display("FAIL issue rate below 0.95"); end
    checks++; if (gips <= 1.0)     begin failures++; $display("FAIL aggregate rate not above 1 GIPS"); end
    checks++; if (per_miss > 2.0)  begin failures++; $display("FAIL more than two replays per miss"); end
    checks++; if (n_err != 0)      begin failures++; $display("FAIL RAM errors %0d", n_err); end
    for (int t = 0; t < NT; t++) begin
      checks++;
      if (u_mem.peek(32'h800 + 32'(t) * 64) !== 32'(2 * ITER)) begin
        failures++;
        $display("FAIL thread %0d result %0d", t, u_mem.peek(32'h800 + 32'(t) * 64));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: halted=%b", halted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// mt_pipeline: one host-multithreaded SPARC v8 integer pipeline.
//
// NTHREADS independent SPARC v8 contexts share one single-issue, in-order,
// 11-stage pipeline. A static round-robin scheduler issues a different
// thread every cycle, so with at least as many threads as stages no two
// instructions of one thread are ever in flight together: there are no data
// hazards, no forwarding network and no interlocks. All architectural state
// of a thread (register file, special registers) is written only in the last
// stage, at commit. An instruction that cannot finish (I-cache or D-cache
// miss) simply does not commit: the thread's PC is unchanged and the same
// instruction is "replayed" the next time the thread is scheduled, by which
// time the miss has usually been served in the background.
//
// Stages (each ends in a pipeline register):
//   TS    thread selection (thread_sel)
//   IF1   read special registers (PC, PSR, ...), issue I-cache read, address
//         the microcode ROM
//   IF2   I-cache tag compare; in microcode mode take the synthesized
//         instruction instead of the fetched one
//   DE    decode, resolve branches, map register numbers through the window
//   RF1   register file read issued      RF2  register file read pipelined
//   RF3   operand select (OP1 = rs1, OP2 = rs2 or immediate)
//   EX    simple ALU (with the tag check and MULScc operand shaping) /
//         MUL-DIV-SHF / special register read, trap checks
//   MEM1  alignment check, store preparation, D-cache access issued
//   MEM2  D-cache tag compare and word select, final trap decision
//   WB    load align, register file and special register commit, trap entry
//         into microcode
// Complex instructions (store reg+reg, LDD, STD, SWAP, LDSTUB) and trap entry
// run as microcode sequences (microcode_rom), one micro-instruction per turn
// of the thread.
//
// Interface: clk, rst_n, core_id (upper bits of the thread number reported by
// RDASR %asr16 and of memory IDs); two memory ports (I-cache, D-cache) of
// 128-bit beats; halted[] per thread (error mode reached); event pulses for
// statistics; error flags from the RAM parity and ECC checks; irq_level[]
// per thread, a SPARC interrupt request level (1-15, 0 = none) that is
// level-sensitive: a request is taken as trap 0x10+level when the thread
// has ET = 1 and the level is 15 or above PIL, in place of the thread's next
// instruction outside a microcode sequence.
//
// Follows the model: the stage list, static round robin, replay on long
// latency, commit-only state update, 3 register windows, microcode for
// complex instructions and traps, separate I and D host caches. This design's
// own choices: the exact work placed in each stage, trap entry through
// microcode that writes %l1/%l2 and jumps to TBA+tt*16, and the interrupt
// interface (the model handles interrupts through the same trap path but
// gives no interface; the per-thread request level follows SPARC v8).
// NTHREADS must be at least the pipeline depth (11), checked at elaboration.
module mt_pipeline
  import sparc_pkg::*;
#(
  parameter int          NTHREADS = 64,
  parameter logic [31:0] RESET_PC = 32'h0000_0000,
  localparam int TID_W = (NTHREADS > 1) ? $clog2(NTHREADS) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [2:0]          core_id,
  // I-cache memory port
  output logic                imreq_valid,
  input  logic                imreq_ready,
  output mem_req_t            imreq,
  input  logic                imresp_valid,
  input  mem_resp_t           imresp,
  // D-cache memory port
  output logic                dmreq_valid,
  input  logic                dmreq_ready,
  output mem_req_t            dmreq,
  input  logic                dmresp_valid,
  input  mem_resp_t           dmresp,
  // interrupt request level per thread (0 = none), held until software
  // clears its source
  input  logic [3:0]          irq_level [NTHREADS],
  // status
  output logic [NTHREADS-1:0] halted,
  output logic                ev_commit,
  output logic                ev_ireplay,
  output logic                ev_dreplay,
  output logic                ev_trap,
  output logic                ev_uop,
  output logic                ev_miss,
  output logic                ev_writeback,
  output logic                err_parity,
  output logic                err_ecc_corrected,
  output logic                err_ecc_double
);
  if (NTHREADS < 11) begin : g_check
    $error("mt_pipeline: NTHREADS must be at least the pipeline depth (11)");
  end

  typedef struct packed {
    logic             v;
    logic [TID_W-1:0] tid;
    tstate_t          st;
    logic [31:0]      inst;
    logic             scr_rd;
    logic             scr_rs1;
    logic             ulast;
    dec_t             d;
    logic [31:0]      op1;
    logic [31:0]      op2;
    logic [31:0]      stdata;
    logic [31:0]      result;
    logic [3:0]       icc;
    logic [31:0]      y;
    logic             trap;
    logic [7:0]       tt;
    logic             mem;     // performs a D-cache access
  } pipe_t;

  pipe_t if2_q, de_q, rf1_q, rf2_q, rf3_q, ex_q, m1_q, m2_q, wb_q;

  // ================================================================ TS
  logic [TID_W-1:0] ts_tid;
  logic             ts_v;
  thread_sel #(.NTHREADS(NTHREADS)) u_ts (.clk, .rst_n, .tid(ts_tid), .valid(ts_v));

  // ================================================================ IF1
  tstate_t if1_st;
  logic    wb_we;
  tstate_t wb_state;
  logic    ic_hit, ic_rvalid;
  logic [31:0] ic_word;
  logic    ic_miss, ic_wb, ic_full, ic_perr, ic_corr, ic_dbl;

  special_regs #(.NTHREADS(NTHREADS), .RESET_PC(RESET_PC)) u_sr (
    .clk, .rst_n,
    .rd_tid (ts_tid), .rd_state (if1_st),
    .we (wb_we), .wr_tid (wb_q.tid), .wr_state (wb_state),
    .halted (halted)
  );

  logic if1_v;
  assign if1_v = ts_v && !if1_st.halted;

  host_cache #(.NTHREADS(NTHREADS)) u_icache (
    .clk, .rst_n, .cache_id ({core_id, 1'b0}),
    .req_valid (if1_v && !if1_st.umode), .req_tid (ts_tid), .req_addr (if1_st.pc),
    .req_write (1'b0), .req_wdata (32'd0), .req_mask (4'd0),
    .resp_valid (ic_rvalid), .resp_hit (ic_hit), .resp_rdata (ic_word),
    .mreq_valid (imreq_valid), .mreq_ready (imreq_ready), .mreq (imreq),
    .mresp_valid (imresp_valid), .mresp (imresp),
    .ev_miss (ic_miss), .ev_writeback (ic_wb), .ev_fifo_full (ic_full),
    .err_tag_parity (ic_perr), .err_ecc_corrected (ic_corr), .err_ecc_double (ic_dbl)
  );

  logic [31:0] u_inst;
  logic        u_scr_rd, u_scr_rs1, u_last;
  microcode_rom u_rom (
    .clk, .useq (if1_st.useq), .upc (if1_st.upc), .orig_inst (if1_st.uinst),
    .tt (if1_st.tt), .inst (u_inst), .scr_rd (u_scr_rd), .scr_rs1 (u_scr_rs1),
    .last (u_last)
  );

  always_ff @(posedge clk) begin
    if2_q     <= '0;
    if2_q.v   <= rst_n && if1_v;
    if2_q.tid <= ts_tid;
    if2_q.st  <= if1_st;
  end

  // ================================================================ IF2
  logic if2_ok;
  assign if2_ok     = if2_q.st.umode || ic_hit;
  assign ev_ireplay = if2_q.v && !if2_ok;

  always_ff @(posedge clk) begin
    de_q         <= if2_q;
    de_q.v       <= rst_n && if2_q.v && if2_ok;
    de_q.inst    <= if2_q.st.umode ? u_inst : ic_word;
    de_q.scr_rd  <= if2_q.st.umode && u_scr_rd;
    de_q.scr_rs1 <= if2_q.st.umode && u_scr_rs1;
    de_q.ulast   <= if2_q.st.umode && u_last;
  end

  // ================================================================ DE
  dec_t de_d;
  decode u_dec (
    .inst (de_q.inst), .scr_rd (de_q.scr_rd), .scr_rs1 (de_q.scr_rs1),
    .umode (de_q.st.umode), .ulast (de_q.ulast),
    .pc (de_q.st.pc), .npc (de_q.st.npc), .psr (de_q.st.psr), .wim (de_q.st.wim),
    .d (de_d)
  );

  always_ff @(posedge clk) begin
    rf1_q   <= de_q;
    rf1_q.v <= rst_n && de_q.v;
    rf1_q.d <= de_d;
  end

  // ================================================================ RF1/RF2/RF3
  logic [31:0] rf_rd1, rf_rd2;
  logic        rf_perr1, rf_perr2;
  logic        rf_we;
  logic [31:0] rf_wd;

  mt_regfile #(.NTHREADS(NTHREADS)) u_rf (
    .clk,
    .rd_tid (rf1_q.tid), .ra1 (rf1_q.d.rs1), .ra2 (rf1_q.d.rs2),
    .rd1 (rf_rd1), .rd2 (rf_rd2), .rd1_perr (rf_perr1), .rd2_perr (rf_perr2),
    .we (rf_we), .wr_tid (wb_q.tid), .wa (wb_q.d.rd), .wd (rf_wd)
  );

  always_ff @(posedge clk) begin
    rf2_q   <= rf1_q;
    rf2_q.v <= rst_n && rf1_q.v;
    rf3_q   <= rf2_q;
    rf3_q.v <= rst_n && rf2_q.v;
  end

  // RF3: operand selection
  always_ff @(posedge clk) begin
    ex_q        <= rf3_q;
    ex_q.v      <= rst_n && rf3_q.v;
    ex_q.op1    <= rf_rd1;
    ex_q.op2    <= rf3_q.d.use_imm ? rf3_q.d.imm : rf_rd2;
    ex_q.stdata <= rf_rd2;
  end

  // ================================================================ EX
  logic [31:0] alu_res, mds_res, mds_y, spr_val, ex_res;
  logic [3:0]  alu_icc, mds_icc;
  logic        div_zero, ex_trap;
  logic [7:0]  ex_tt;

  // MULScc: rs1 shifted right with N xor V entering at the top, plus the
  // second operand only when Y[0] is set; Y shifts right taking rs1[0]
  logic [31:0] alu_a, alu_b;
  logic [3:0]  add_icc;
  logic        tag_ovf;
  assign alu_a = ex_q.d.is_muls ? {ex_q.st.psr.icc[3] ^ ex_q.st.psr.icc[1], ex_q.op1[31:1]}
                                : ex_q.op1;
  assign alu_b = (ex_q.d.is_muls && !ex_q.st.y[0]) ? 32'd0 : ex_q.op2;

  alu u_alu (
    .op (ex_q.d.alu_op), .a (alu_a), .b (alu_b), .cin (ex_q.st.psr.icc[0]),
    .result (alu_res), .icc (add_icc)
  );

  // tagged add/subtract: a nonzero tag (bits 1:0) in either operand also
  // counts as overflow
  assign tag_ovf = ex_q.d.is_tagged &&
                   (add_icc[1] || ex_q.op1[1:0] != 2'b00 || ex_q.op2[1:0] != 2'b00);
  assign alu_icc = {add_icc[3:2], add_icc[1] | tag_ovf, add_icc[0]};

  muldiv_shf u_mds (
    .op (ex_q.d.mds_op), .a (ex_q.op1), .b (ex_q.op2), .y_in (ex_q.st.y),
    .result (mds_res), .y_out (mds_y), .icc (mds_icc), .div_zero (div_zero)
  );

  // special register handling (RDY/RDPSR/RDWIM/RDTBR/RDASR)
  always_comb begin
    unique case (ex_q.d.spr)
      SPR_Y:    spr_val = ex_q.st.y;
      SPR_PSR:  spr_val = psr_to_word(ex_q.st.psr);
      SPR_WIM:  spr_val = 32'(ex_q.st.wim);
      SPR_TBR:  spr_val = {ex_q.op1[31:12], ex_q.st.tt, 4'b0000};
      SPR_TID:  spr_val = 32'({core_id, 6'(ex_q.tid)});
      SPR_TPC:  spr_val = ex_q.st.tpc;
      default:  spr_val = ex_q.st.tnpc;
    endcase
    unique case (ex_q.d.unit)
      UNIT_MDS:  ex_res = mds_res;
      UNIT_SPR:  ex_res = spr_val;
      UNIT_LINK: ex_res = ex_q.st.pc;
      default:   ex_res = ex_q.d.wr_tbr ? {alu_res[31:12], 12'd0} : alu_res;
    endcase
    ex_trap = ex_q.d.trap;
    ex_tt   = ex_q.d.tt;
    if (!ex_trap) begin
      if (ex_q.d.unit == UNIT_MDS && div_zero) begin
        ex_trap = 1'b1; ex_tt = TT_DIV_ZERO;
      end else if ((ex_q.d.is_jmpl || ex_q.d.is_rett || ex_q.d.is_ujmp) && alu_res[1:0] != 2'b00) begin
        ex_trap = 1'b1; ex_tt = TT_ALIGN;
      end else if (ex_q.d.tag_tv && tag_ovf) begin
        ex_trap = 1'b1; ex_tt = TT_TAG_OVF;
      end else if (ex_q.d.is_ticc && ex_q.d.ticc_taken) begin
        ex_trap = 1'b1; ex_tt = TT_TICC_BASE + {1'b0, alu_res[6:0]};
      end
    end
  end

  always_ff @(posedge clk) begin
    m1_q        <= ex_q;
    m1_q.v      <= rst_n && ex_q.v;
    m1_q.result <= ex_res;
    m1_q.op1    <= alu_res;   // effective address / jump target
    m1_q.icc    <= (ex_q.d.unit == UNIT_MDS) ? mds_icc : alu_icc;
    m1_q.y      <= ex_q.d.wr_y ? alu_res :
                   ex_q.d.is_muls ? {ex_q.op1[0], ex_q.st.y[31:1]} :
                   (ex_q.d.unit == UNIT_MDS) ? mds_y : ex_q.st.y;
    m1_q.trap   <= ex_trap;
    m1_q.tt     <= ex_tt;
  end

  // ================================================================ MEM1
  logic        mis;
  logic [31:0] st_word;
  logic [3:0]  st_mask;
  logic [31:0] ld_data;
  logic        m1_mem;

  lsu_align u_lsu (
    .addr_lo (m1_q.op1[1:0]), .size (m1_q.d.msize), .misaligned (mis),
    .st_data (m1_q.stdata), .st_word (st_word), .st_mask (st_mask),
    .ld_addr_lo (wb_q.op1[1:0]), .ld_size (wb_q.d.msize), .ld_signed (wb_q.d.msigned),
    .ld_word (wb_q.op2), .ld_data (ld_data)
  );

  // interrupt: taken in place of the thread's next instruction outside
  // microcode when traps are enabled and the level is 15 or above PIL; the
  // instruction does not execute and is returned to by RETT
  logic [3:0] m1_irl;
  logic       m1_irq;
  assign m1_irl = irq_level[m1_q.tid];
  assign m1_irq = m1_q.v && !m1_q.st.umode && m1_q.st.psr.et &&
                  (m1_irl == 4'd15 || m1_irl > m1_q.st.psr.pil);

  assign m1_mem = m1_q.v && !m1_q.trap && !m1_irq && !mis && (m1_q.d.mem_ld || m1_q.d.mem_st);

  logic        dc_rvalid, dc_hit, dc_full, dc_perr, dc_corr, dc_dbl, dc_miss, dc_wb;
  logic [31:0] dc_word;

  host_cache #(.NTHREADS(NTHREADS)) u_dcache (
    .clk, .rst_n, .cache_id ({core_id, 1'b1}),
    .req_valid (m1_mem), .req_tid (m1_q.tid), .req_addr (m1_q.op1),
    .req_write (m1_q.d.mem_st), .req_wdata (st_word), .req_mask (st_mask),
    .resp_valid (dc_rvalid), .resp_hit (dc_hit), .resp_rdata (dc_word),
    .mreq_valid (dmreq_valid), .mreq_ready (dmreq_ready), .mreq (dmreq),
    .mresp_valid (dmresp_valid), .mresp (dmresp),
    .ev_miss (dc_miss), .ev_writeback (dc_wb), .ev_fifo_full (dc_full),
    .err_tag_parity (dc_perr), .err_ecc_corrected (dc_corr), .err_ecc_double (dc_dbl)
  );

  always_ff @(posedge clk) begin
    m2_q      <= m1_q;
    m2_q.v    <= rst_n && m1_q.v;
    m2_q.mem  <= m1_mem;
    if (m1_irq) begin
      m2_q.trap <= 1'b1;
      m2_q.tt   <= TT_IRQ_BASE + {4'd0, m1_irl};
    end else if (!m1_q.trap && mis && (m1_q.d.mem_ld || m1_q.d.mem_st)) begin
      m2_q.trap <= 1'b1;
      m2_q.tt   <= TT_ALIGN;
    end
  end

  // ================================================================ MEM2
  logic m2_ok;
  assign m2_ok      = !m2_q.mem || dc_hit;
  assign ev_dreplay = m2_q.v && !m2_ok;

  always_ff @(posedge clk) begin
    wb_q     <= m2_q;
    wb_q.v   <= rst_n && m2_q.v && m2_ok;
    wb_q.op2 <= dc_word;     // loaded word
  end

  // ================================================================ WB
  tstate_t ns;
  logic    trap_taken;

  always_comb begin
    ns         = wb_q.st;
    rf_we      = 1'b0;
    rf_wd      = wb_q.d.mem_ld ? ld_data : wb_q.result;
    trap_taken = 1'b0;
    if (wb_q.trap) begin
      if (!wb_q.st.psr.et) begin
        ns.halted = 1'b1;                  // error mode
      end else begin
        trap_taken   = 1'b1;
        ns.psr.et    = 1'b0;
        ns.psr.ps    = wb_q.st.psr.s;
        ns.psr.s     = 1'b1;
        ns.psr.cwp   = (wb_q.st.psr.cwp == 2'd0) ? 2'(NWIN - 1) : wb_q.st.psr.cwp - 2'd1;
        ns.tt        = wb_q.tt;
        ns.tpc       = wb_q.st.pc;
        ns.tnpc      = wb_q.st.npc;
        ns.umode     = 1'b1;               // microcode request: trap entry
        ns.useq      = USEQ_TRAP;
        ns.upc       = 3'd0;
      end
    end else if (wb_q.d.enter_u) begin
      ns.umode = 1'b1;
      ns.useq  = wb_q.d.useq;
      ns.upc   = 3'd0;
      ns.uinst = wb_q.inst;
    end else begin
      rf_we = wb_q.v && wb_q.d.we;
      if (wb_q.d.set_cc) ns.psr.icc = wb_q.icc;
      ns.y = wb_q.y;
      if (wb_q.d.wr_psr) ns.psr = word_to_psr(wb_q.result);
      if (wb_q.d.wr_wim) ns.wim = wb_q.result[NWIN-1:0];
      if (wb_q.d.is_save)
        ns.psr.cwp = (wb_q.st.psr.cwp == 2'd0) ? 2'(NWIN - 1) : wb_q.st.psr.cwp - 2'd1;
      if (wb_q.d.is_restore || wb_q.d.is_rett)
        ns.psr.cwp = (wb_q.st.psr.cwp == 2'(NWIN - 1)) ? 2'd0 : wb_q.st.psr.cwp + 2'd1;
      if (wb_q.d.is_rett) begin
        ns.psr.s  = wb_q.st.psr.ps;
        ns.psr.et = 1'b1;
      end
      if (wb_q.st.umode && !wb_q.ulast) begin
        ns.upc = wb_q.st.upc + 3'd1;
      end else begin
        ns.umode = 1'b0;
        if (wb_q.d.is_ujmp) begin
          ns.pc  = wb_q.op1;
          ns.npc = wb_q.op1 + 32'd4;
        end else if (wb_q.d.redirect) begin
          ns.pc  = wb_q.d.nxt_pc;
          ns.npc = wb_q.d.nxt_npc;
        end else if (wb_q.d.is_jmpl || wb_q.d.is_rett) begin
          ns.pc  = wb_q.st.npc;
          ns.npc = wb_q.op1;
        end else begin
          ns.pc  = wb_q.st.npc;
          ns.npc = wb_q.st.npc + 32'd4;
        end
      end
    end
  end

  assign wb_we    = wb_q.v;
  assign wb_state = ns;

  assign ev_commit    = wb_q.v && !wb_q.trap;
  assign ev_trap      = wb_q.v && trap_taken;
  assign ev_uop       = wb_q.v && wb_q.st.umode && !wb_q.trap;
  assign ev_miss      = ic_miss || dc_miss;
  assign ev_writeback = ic_wb || dc_wb;
  assign err_parity   = (rf3_q.v && ((rf3_q.d.use_rs1 && rf_perr1) || (rf3_q.d.use_rs2 && rf_perr2)))
                      || ic_perr || dc_perr;
  assign err_ecc_corrected = ic_corr || dc_corr;
  assign err_ecc_double    = ic_dbl || dc_dbl;
endmodule

// sparc_pkg: types and constants shared by the host-multithreaded SPARC v8
// functional model.
//
// The model runs many SPARC v8 integer contexts ("threads") on one 11-stage
// pipeline. This package holds the instruction-field constants, the decoded
// instruction record that flows down the pipeline, the per-thread special
// register record, the microcode word format and the memory command format
// used between the host caches and the memory controller.
//
// Fixed by the SPARC v8 architecture: opcode fields, PSR layout, trap types.
// Design choices of this model (not fixed by SPARC): three register windows
// (NWIN = 3) laid out in a 64-word chunk per thread whose top eight words are
// microcode scratch registers (word 56 holds the trap base address), the
// microcode sequence numbering, the 128-bit memory beat format and its ID.
package sparc_pkg;

  // ---------------------------------------------------------------- windows
  localparam int NWIN       = 3;    // register windows per thread
  localparam int REGS_PER_T = 64;   // words of register file per thread
  localparam int SCR_BASE   = 56;   // scratch words 56..63 (56 = TBR base)

  // ---------------------------------------------------------------- opcodes
  localparam logic [1:0] OP_FMT2 = 2'b00;  // SETHI / Bicc
  localparam logic [1:0] OP_CALL = 2'b01;
  localparam logic [1:0] OP_ARIT = 2'b10;
  localparam logic [1:0] OP_MEM  = 2'b11;

  // op3 values for op = 2
  localparam logic [5:0] O3_ADD = 6'h00, O3_AND = 6'h01, O3_OR = 6'h02, O3_XOR = 6'h03,
                         O3_SUB = 6'h04, O3_ANDN = 6'h05, O3_ORN = 6'h06, O3_XNOR = 6'h07,
                         O3_ADDX = 6'h08, O3_UMUL = 6'h0A, O3_SMUL = 6'h0B, O3_SUBX = 6'h0C,
                         O3_UDIV = 6'h0E, O3_SDIV = 6'h0F,
                         O3_SLL = 6'h25, O3_SRL = 6'h26, O3_SRA = 6'h27,
                         O3_RDY = 6'h28, O3_RDPSR = 6'h29, O3_RDWIM = 6'h2A, O3_RDTBR = 6'h2B,
                         O3_WRY = 6'h30, O3_WRPSR = 6'h31, O3_WRWIM = 6'h32, O3_WRTBR = 6'h33,
                         O3_JMPL = 6'h38, O3_RETT = 6'h39, O3_TICC = 6'h3A, O3_FLUSH = 6'h3B,
                         O3_SAVE = 6'h3C, O3_RESTORE = 6'h3D;
  // op3 values for op = 3
  localparam logic [5:0] O3_LD = 6'h00, O3_LDUB = 6'h01, O3_LDUH = 6'h02, O3_LDD = 6'h03,
                         O3_ST = 6'h04, O3_STB = 6'h05, O3_STH = 6'h06, O3_STD = 6'h07,
                         O3_LDSB = 6'h09, O3_LDSH = 6'h0A, O3_LDSTUB = 6'h0D, O3_SWAP = 6'h0F;

  // ASR numbers readable with RDASR (rs1 field of RDY encoding)
  localparam logic [4:0] ASR_TID  = 5'd16;  // hardware thread number (model's own)
  localparam logic [4:0] ASR_TPC  = 5'd30;  // trapped PC, microcode only
  localparam logic [4:0] ASR_TNPC = 5'd31;  // trapped nPC, microcode only

  // ---------------------------------------------------------------- traps
  localparam logic [7:0] TT_ILLEGAL   = 8'h02;
  localparam logic [7:0] TT_PRIV      = 8'h03;
  localparam logic [7:0] TT_WIN_OVF   = 8'h05;
  localparam logic [7:0] TT_WIN_UNF   = 8'h06;
  localparam logic [7:0] TT_ALIGN     = 8'h07;
  localparam logic [7:0] TT_TAG_OVF   = 8'h0A;
  localparam logic [7:0] TT_DIV_ZERO  = 8'h2A;
  localparam logic [7:0] TT_IRQ_BASE  = 8'h10;   // + interrupt level
  localparam logic [7:0] TT_TICC_BASE = 8'h80;

  // ---------------------------------------------------------------- units
  typedef enum logic [3:0] {
    ALU_ADD, ALU_ADDX, ALU_SUB, ALU_SUBX, ALU_AND, ALU_ANDN,
    ALU_OR, ALU_ORN, ALU_XOR, ALU_XNOR, ALU_PASSB
  } alu_op_e;

  typedef enum logic [2:0] {
    MDS_SLL, MDS_SRL, MDS_SRA, MDS_UMUL, MDS_SMUL, MDS_UDIV, MDS_SDIV
  } mds_op_e;

  typedef enum logic [1:0] { UNIT_ALU, UNIT_MDS, UNIT_SPR, UNIT_LINK } unit_e;

  typedef enum logic [2:0] {
    SPR_Y, SPR_PSR, SPR_WIM, SPR_TBR, SPR_TID, SPR_TPC, SPR_TNPC
  } spr_e;

  typedef enum logic [1:0] { MSZ_B, MSZ_H, MSZ_W } msize_e;

  // microcode sequences
  typedef enum logic [2:0] {
    USEQ_TRAP, USEQ_STRR, USEQ_LDD, USEQ_STD, USEQ_SWAP, USEQ_LDSTUB
  } useq_e;

  // ---------------------------------------------------------------- PSR
  typedef struct packed {
    logic [3:0] icc;   // N Z V C
    logic [3:0] pil;
    logic       s;
    logic       ps;
    logic       et;
    logic [1:0] cwp;
  } psr_t;

  function automatic logic [31:0] psr_to_word(psr_t p);
    return {4'h0, 4'h0, p.icc, 6'b0, 1'b0, 1'b0, p.pil, p.s, p.ps, p.et, 3'b0, p.cwp};
  endfunction

  function automatic psr_t word_to_psr(logic [31:0] w);
    psr_t p;
    p.icc = w[23:20];
    p.pil = w[11:8];
    p.s   = w[7];
    p.ps  = w[6];
    p.et  = w[5];
    p.cwp = (w[4:0] >= 5'(NWIN)) ? 2'(NWIN - 1) : w[1:0];
    return p;
  endfunction

  // per-thread state kept in LUT RAM (special registers + thread control)
  typedef struct packed {
    logic [31:0] pc;
    logic [31:0] npc;
    psr_t        psr;
    logic [NWIN-1:0] wim;
    logic [31:0] y;
    logic        umode;     // executing a microcode sequence
    useq_e       useq;
    logic [2:0]  upc;
    logic [31:0] uinst;     // instruction that entered microcode
    logic [7:0]  tt;        // last trap type
    logic [31:0] tpc;       // PC / nPC saved at trap
    logic [31:0] tnpc;
    logic        halted;    // error mode (trap while ET = 0)
  } tstate_t;

  // microcode word: a SPARC instruction template plus field-substitution
  // controls that build the "synthesized instruction"
  typedef enum logic [1:0] { URD_TMPL, URD_ORIG, URD_EVEN, URD_ODD } urd_e;
  typedef struct packed {
    logic [31:0] inst;      // template
    urd_e        rd_sel;
    logic        rs1_orig;  // rs1 from the original instruction
    logic        op2_orig;  // i, rs2 / simm13 from the original instruction
    logic        op3_orig;  // memory op3 from the original instruction
    logic        scr_rd;    // template rd names a scratch word
    logic        scr_rs1;   // template rs1 names a scratch word
    logic        imm_tt;    // simm13 := tt * 16 (trap vector offset)
    logic        last;
  } uword_t;

  // decoded instruction
  typedef struct packed {
    logic        trap;       // trap detected in decode
    logic [7:0]  tt;
    unit_e       unit;
    alu_op_e     alu_op;
    mds_op_e     mds_op;
    spr_e        spr;
    logic        set_cc;
    logic        we;         // writes rd
    logic [5:0]  rd;         // physical word in the thread's 64-word chunk
    logic [5:0]  rs1;
    logic [5:0]  rs2;        // or store-data register
    logic        use_rs1;    // rs1 / rs2 are really read (for error checks)
    logic        use_rs2;
    logic        use_imm;
    logic [31:0] imm;
    logic        redirect;   // branch/call resolved in decode: use nxt_pc/nxt_npc
    logic [31:0] nxt_pc;
    logic [31:0] nxt_npc;
    logic        is_jmpl;
    logic        is_ujmp;    // microcode jump to trap vector
    logic        is_rett;
    logic        is_save;
    logic        is_restore;
    logic        is_ticc;
    logic        is_tagged;  // TADDcc/TSUBcc: V also set by nonzero tag bits
    logic        tag_tv;     // ...and trap on tag overflow (TADDccTV/TSUBccTV)
    logic        is_muls;    // MULScc multiply step
    logic        ticc_taken;
    logic        wr_y, wr_psr, wr_wim, wr_tbr;
    logic        mem_ld, mem_st;
    msize_e      msize;
    logic        msigned;
    logic        enter_u;    // start a microcode sequence
    useq_e       useq;
    logic        ulast;      // last micro-instruction of a sequence
  } dec_t;

  // ---------------------------------------------------------------- memory
  localparam int LINE_BYTES = 32;   // matches the DDR2 burst
  localparam int LINE_AW    = 27;   // line address width (32 - 5)
  localparam int MEM_ID_W   = 10;   // {core[2:0], icache/dcache, tid[5:0]}

  // one 128-bit beat on the memory interface; a line is two beats
  typedef struct packed {
    logic                write;
    logic [LINE_AW-1:0]  line;
    logic [MEM_ID_W-1:0] id;
    logic                beat;    // 0 = low half of the line, 1 = high half
    logic [127:0]        data;
  } mem_req_t;

  typedef struct packed {
    logic [LINE_AW-1:0]  line;
    logic [MEM_ID_W-1:0] id;
    logic                beat;
    logic [127:0]        data;
  } mem_resp_t;

  // map a 6-bit register name (bit 5 = scratch) to the thread's word index
  function automatic logic [5:0] phys_reg(logic scr, logic [4:0] r, logic [1:0] cwp);
    logic [6:0] off;
    if (scr)             return 6'(SCR_BASE) + 6'(r[2:0]);
    else if (r < 5'd8)   return {1'b0, r};
    else begin
      off = 7'(r - 5'd8) + 7'(cwp) * 7'd16;
      if (off >= 7'(NWIN * 16)) off = off - 7'(NWIN * 16);
      return 6'(off) + 6'd8;
    end
  endfunction

  function automatic logic cond_true(logic [3:0] cond, logic [3:0] icc);
    logic n, z, v, c, r;
    {n, z, v, c} = icc;
    case (cond[2:0])
      3'd0: r = 1'b0;              // never
      3'd1: r = z;                 // e
      3'd2: r = z | (n ^ v);       // le
      3'd3: r = n ^ v;             // l
      3'd4: r = c | z;             // leu
      3'd5: r = c;                 // cs
      3'd6: r = n;                 // neg
      default: r = v;              // vs
    endcase
    return cond[3] ? ~r : r;
  endfunction

endpackage

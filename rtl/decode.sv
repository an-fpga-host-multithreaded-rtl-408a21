// decode: SPARC v8 integer instruction decode (pipeline Decode stage).
//
// Turns one 32-bit instruction (fetched, or synthesized by microcode) into
// the dec_t control record: execution unit and operation, condition-code
// update, physical register-file word numbers of rd/rs1/rs2 (the thread's
// CWP applied through the window mapping, rd in the new window for SAVE and
// RESTORE), immediate operand, memory access, special-register access, and
// traps found at decode (illegal instruction, privileged instruction, window
// overflow/underflow). Branches and CALL are resolved here: the condition is
// evaluated against the thread's icc and the record carries the thread's
// next PC and nPC, including the annul rule. For stores the rs2 field names
// the store-data register (rd), so a store needs only two register reads;
// store with a register+register address, LDD, STD, SWAP and LDSTUB instead
// request a microcode sequence (enter_u) and execute nothing themselves.
//
// Purely combinational. Inputs: inst, the scratch flags for rd/rs1 supplied
// by microcode, umode/ulast, the thread's pc, npc, psr and wim.
// Implemented: all of the SPARC v8 integer ALU, shift, multiply/divide,
// SETHI, Bicc, CALL, JMPL, RETT, Ticc, SAVE/RESTORE, RD/WR of Y, PSR, WIM,
// TBR, loads/stores, LDD/STD/SWAP/LDSTUB, tagged add/subtract (with and
// without trap on overflow) and MULScc; the tag check and the multiply-step
// operand shaping are done in the pipeline's EX stage. Left out (decoded as
// illegal): alternate-space accesses, coprocessor and floating-point
// instructions. FLUSH and STBAR execute as no-ops.
module decode
  import sparc_pkg::*;
(
  input  logic [31:0]     inst,
  input  logic            scr_rd,
  input  logic            scr_rs1,
  input  logic            umode,
  input  logic            ulast,
  input  logic [31:0]     pc,
  input  logic [31:0]     npc,
  input  psr_t            psr,
  input  logic [NWIN-1:0] wim,
  output dec_t            d
);
  logic [1:0]  op;
  logic [4:0]  rd, rs1, rs2;
  logic [5:0]  op3;
  logic [2:0]  op2;
  logic        i;
  logic [31:0] simm13, disp22, disp30;
  logic [1:0]  cwp_m1, cwp_p1;
  logic        taken;
  logic        illegal, priv;

  always_comb begin
    op     = inst[31:30];
    rd     = inst[29:25];
    op3    = inst[24:19];
    op2    = inst[24:22];
    rs1    = inst[18:14];
    i      = inst[13];
    rs2    = inst[4:0];
    simm13 = {{19{inst[12]}}, inst[12:0]};
    disp22 = {{8{inst[21]}}, inst[21:0], 2'b00};
    disp30 = {inst[29:0], 2'b00};
    cwp_m1 = (psr.cwp == 2'd0) ? 2'(NWIN - 1) : psr.cwp - 2'd1;
    cwp_p1 = (psr.cwp == 2'(NWIN - 1)) ? 2'd0 : psr.cwp + 2'd1;
    taken  = cond_true(inst[28:25], psr.icc);
    illegal = 1'b0;
    priv    = 1'b0;

    d          = '0;
    d.unit     = UNIT_ALU;
    d.alu_op   = ALU_ADD;
    d.mds_op   = MDS_SLL;
    d.spr      = SPR_Y;
    d.msize    = MSZ_W;
    d.useq     = USEQ_TRAP;
    d.ulast    = ulast;
    d.rd       = phys_reg(scr_rd, rd, psr.cwp);
    d.rs1      = phys_reg(scr_rs1, rs1, psr.cwp);
    d.rs2      = phys_reg(1'b0, rs2, psr.cwp);
    d.use_imm  = i;
    d.imm      = simm13;
    d.nxt_pc   = npc;
    d.nxt_npc  = npc + 32'd4;

    unique case (op)
      OP_CALL: begin
        d.unit     = UNIT_LINK;
        d.we       = 1'b1;
        d.rd       = phys_reg(1'b0, 5'd15, psr.cwp);
        d.redirect = 1'b1;
        d.nxt_pc   = npc;
        d.nxt_npc  = pc + disp30;
      end
      OP_FMT2: begin
        if (op2 == 3'b100) begin            // SETHI (and NOP)
          d.alu_op  = ALU_PASSB;
          d.use_imm = 1'b1;
          d.imm     = {inst[21:0], 10'd0};
          d.we      = 1'b1;
        end else if (op2 == 3'b010) begin   // Bicc
          d.redirect = 1'b1;
          if (taken) begin
            if (inst[29] && inst[28:25] == 4'b1000) begin   // ba,a
              d.nxt_pc  = pc + disp22;
              d.nxt_npc = pc + disp22 + 32'd4;
            end else begin
              d.nxt_pc  = npc;
              d.nxt_npc = pc + disp22;
            end
          end else if (inst[29]) begin      // untaken, annulled
            d.nxt_pc  = npc + 32'd4;
            d.nxt_npc = npc + 32'd8;
          end
        end else begin
          illegal = 1'b1;
        end
      end
      OP_ARIT: begin
        d.we = 1'b1;
        unique casez (op3)
          6'b0?_0000: d.alu_op = ALU_ADD;
          6'b0?_0001: d.alu_op = ALU_AND;
          6'b0?_0010: d.alu_op = ALU_OR;
          6'b0?_0011: d.alu_op = ALU_XOR;
          6'b0?_0100: d.alu_op = ALU_SUB;
          6'b0?_0101: d.alu_op = ALU_ANDN;
          6'b0?_0110: d.alu_op = ALU_ORN;
          6'b0?_0111: d.alu_op = ALU_XNOR;
          6'b0?_1000: d.alu_op = ALU_ADDX;
          6'b0?_1100: d.alu_op = ALU_SUBX;
          6'h20, 6'h22: begin d.alu_op = ALU_ADD; d.is_tagged = 1'b1; d.tag_tv = op3[1]; end
          6'h21, 6'h23: begin d.alu_op = ALU_SUB; d.is_tagged = 1'b1; d.tag_tv = op3[1]; end
          6'h24: begin d.alu_op = ALU_ADD; d.is_muls = 1'b1; end
          6'b0?_1010: begin d.unit = UNIT_MDS; d.mds_op = MDS_UMUL; end
          6'b0?_1011: begin d.unit = UNIT_MDS; d.mds_op = MDS_SMUL; end
          6'b0?_1110: begin d.unit = UNIT_MDS; d.mds_op = MDS_UDIV; end
          6'b0?_1111: begin d.unit = UNIT_MDS; d.mds_op = MDS_SDIV; end
          O3_SLL: begin d.unit = UNIT_MDS; d.mds_op = MDS_SLL; end
          O3_SRL: begin d.unit = UNIT_MDS; d.mds_op = MDS_SRL; end
          O3_SRA: begin d.unit = UNIT_MDS; d.mds_op = MDS_SRA; end
          O3_RDY: begin
            d.unit = UNIT_SPR;
            if (rs1 == 5'd0)                       d.spr = SPR_Y;
            else if (rs1 == 5'd15 && rd == 5'd0)   d.we = 1'b0;     // STBAR
            else if (rs1 == ASR_TID)               d.spr = SPR_TID;
            else if (rs1 == ASR_TPC && umode)      d.spr = SPR_TPC;
            else if (rs1 == ASR_TNPC && umode)     d.spr = SPR_TNPC;
            else illegal = 1'b1;
          end
          O3_RDPSR: begin d.unit = UNIT_SPR; d.spr = SPR_PSR; priv = 1'b1; end
          O3_RDWIM: begin d.unit = UNIT_SPR; d.spr = SPR_WIM; priv = 1'b1; end
          O3_RDTBR: begin
            d.unit = UNIT_SPR; d.spr = SPR_TBR; priv = 1'b1;
            d.rs1  = phys_reg(1'b1, 5'd0, psr.cwp);   // TBA lives in scratch word 0
          end
          O3_WRY:   begin d.alu_op = ALU_XOR; d.we = 1'b0; d.wr_y = 1'b1; end
          O3_WRPSR: begin d.alu_op = ALU_XOR; d.we = 1'b0; d.wr_psr = 1'b1; priv = 1'b1; end
          O3_WRWIM: begin d.alu_op = ALU_XOR; d.we = 1'b0; d.wr_wim = 1'b1; priv = 1'b1; end
          O3_WRTBR: begin
            d.alu_op = ALU_XOR; d.wr_tbr = 1'b1; priv = 1'b1;
            d.rd     = phys_reg(1'b1, 5'd0, psr.cwp);
          end
          O3_JMPL: begin
            d.unit    = UNIT_LINK;
            d.is_jmpl = !umode;
            d.is_ujmp = umode;
          end
          O3_RETT: begin
            d.we      = 1'b0;
            d.is_rett = 1'b1;
            priv      = 1'b1;
            if (psr.et)                d.trap = 1'b1;
            else if (wim[cwp_p1])      begin d.trap = 1'b1; d.tt = TT_WIN_UNF; end
          end
          O3_TICC: begin
            d.we         = 1'b0;
            d.is_ticc    = 1'b1;
            d.ticc_taken = taken;
          end
          O3_FLUSH: d.we = 1'b0;
          O3_SAVE: begin
            d.is_save = 1'b1;
            d.rd      = phys_reg(1'b0, rd, cwp_m1);
            if (wim[cwp_m1]) begin d.trap = 1'b1; d.tt = TT_WIN_OVF; end
          end
          O3_RESTORE: begin
            d.is_restore = 1'b1;
            d.rd         = phys_reg(1'b0, rd, cwp_p1);
            if (wim[cwp_p1]) begin d.trap = 1'b1; d.tt = TT_WIN_UNF; end
          end
          default: illegal = 1'b1;
        endcase
        d.set_cc = (op3[4] && (op3[5] == 1'b0)) || d.is_tagged || d.is_muls;
      end
      default: begin // OP_MEM
        // stores read the data register (rd) on the second port; their
        // address is always rs1 + simm13 (reg+reg stores go to microcode)
        if (op3[2] && !op3[3] && !(op3 == O3_LDSTUB) && !(op3 == O3_SWAP)) begin
          d.rs2     = phys_reg(scr_rd, rd, psr.cwp);
          d.use_rs2 = 1'b1;
        end
        unique case (op3)
          O3_LD:   begin d.mem_ld = 1'b1; d.we = 1'b1; end
          O3_LDUB: begin d.mem_ld = 1'b1; d.we = 1'b1; d.msize = MSZ_B; end
          O3_LDUH: begin d.mem_ld = 1'b1; d.we = 1'b1; d.msize = MSZ_H; end
          O3_LDSB: begin d.mem_ld = 1'b1; d.we = 1'b1; d.msize = MSZ_B; d.msigned = 1'b1; end
          O3_LDSH: begin d.mem_ld = 1'b1; d.we = 1'b1; d.msize = MSZ_H; d.msigned = 1'b1; end
          O3_ST, O3_STB, O3_STH: begin
            d.msize = (op3 == O3_STB) ? MSZ_B : (op3 == O3_STH) ? MSZ_H : MSZ_W;
            if (!i && !umode) begin d.enter_u = 1'b1; d.useq = USEQ_STRR; end
            else d.mem_st = 1'b1;
          end
          O3_LDD:    begin d.enter_u = 1'b1; d.useq = USEQ_LDD; end
          O3_STD:    begin d.enter_u = 1'b1; d.useq = USEQ_STD; end
          O3_SWAP:   begin d.enter_u = 1'b1; d.useq = USEQ_SWAP; end
          O3_LDSTUB: begin d.enter_u = 1'b1; d.useq = USEQ_LDSTUB; end
          default:   illegal = 1'b1;
        endcase
        if (umode && d.enter_u) begin     // microcode never nests
          d.enter_u = 1'b0;
          illegal   = 1'b1;
        end
      end
    endcase

    d.use_rs1 = (op == OP_ARIT) || (op == OP_MEM);
    if (((op == OP_ARIT) || (op == OP_MEM)) && !i) d.use_rs2 = 1'b1;
    if (d.unit == UNIT_SPR && d.spr != SPR_TBR) begin   // rs1 field is an ASR number
      d.use_rs1 = 1'b0;
      d.use_rs2 = 1'b0;
    end

    if (d.trap && d.tt == 8'd0) d.tt = TT_ILLEGAL;
    if (illegal) begin
      d.trap = 1'b1; d.tt = TT_ILLEGAL;
    end else if (priv && !psr.s && !umode) begin
      d.trap = 1'b1; d.tt = TT_PRIV;
    end
    if (d.trap) begin
      d.we = 1'b0; d.mem_ld = 1'b0; d.mem_st = 1'b0; d.enter_u = 1'b0;
      d.redirect = 1'b0; d.is_ticc = 1'b0;
    end
  end
endmodule

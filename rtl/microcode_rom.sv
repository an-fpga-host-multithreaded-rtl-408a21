// microcode_rom: microcode ROM and instruction synthesis.
//
// Complex SPARC instructions are not executed by the integer datapath
// directly. Instead the thread enters microcode mode and executes a short
// sequence of simple instructions read from this ROM, one per turn of the
// thread, in place of fetching from the I-cache:
//   USEQ_TRAP    trap entry: r17 <- trapped PC, r18 <- trapped nPC,
//                jump to TBA + tt*16 (window and PSR already updated)
//   USEQ_STRR    store with register+register address (needs three register
//                reads otherwise): s1 <- rs1+rs2 ; st rd,[s1]
//   USEQ_LDD     s1 <- address ; ld [s1] -> rd(even) ; ld [s1+4] -> rd+1
//   USEQ_STD     s1 <- address ; st rd(even),[s1] ; st rd+1,[s1+4]
//   USEQ_SWAP    s1 <- address ; ld [s1] -> s2 ; st rd,[s1] ; rd <- s2
//   USEQ_LDSTUB  s1 <- address ; ldub [s1] -> s2 ; s3 <- 0xff ;
//                stb s3,[s1] ; rd <- s2
// (sN are the thread's scratch words 56+N.) Each ROM word is a SPARC
// instruction template plus controls that substitute fields of the original
// instruction (rd, rs1, the i/rs2/simm13 operand, the store op3) or the trap
// vector offset; the result is the "synthesized instruction" handed to
// decode together with the scratch-register flags and the last-step flag.
//
// Timing: the address (sequence, micro-PC) and the original instruction and
// trap type are registered in the first fetch stage; the synthesized
// instruction is valid in the second. The ROM contents, sequences and word
// format are this design's; the model states only that microcode handles
// atomic operations, traps and similar instructions.
module microcode_rom
  import sparc_pkg::*;
(
  input  logic        clk,
  input  useq_e       useq,
  input  logic [2:0]  upc,
  input  logic [31:0] orig_inst,
  input  logic [7:0]  tt,
  output logic [31:0] inst,
  output logic        scr_rd,
  output logic        scr_rs1,
  output logic        last
);
  // template builders
  function automatic logic [31:0] f3(logic [1:0] op, logic [4:0] rd, logic [5:0] op3,
                                     logic [4:0] rs1, logic i, logic [12:0] low);
    return {op, rd, op3, rs1, i, low};
  endfunction

  function automatic uword_t uw(logic [31:0] t, urd_e rsel, logic r1o, logic o2o,
                                logic o3o, logic srd, logic srs1, logic itt, logic lst);
    uword_t w;
    w.inst = t; w.rd_sel = rsel; w.rs1_orig = r1o; w.op2_orig = o2o; w.op3_orig = o3o;
    w.scr_rd = srd; w.scr_rs1 = srs1; w.imm_tt = itt; w.last = lst;
    return w;
  endfunction

  function automatic uword_t rom(useq_e s, logic [2:0] p);
    // s1 <- rs1 + op2 (address of the original instruction)
    uword_t addr = uw(f3(OP_ARIT, 5'd1, O3_ADD, 5'd0, 1'b0, 13'd0), URD_TMPL,
                      1'b1, 1'b1, 1'b0, 1'b1, 1'b0, 1'b0, 1'b0);
    uword_t w = uw(32'd0, URD_TMPL, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1);
    unique case (s)
      USEQ_TRAP: unique case (p)
        3'd0: w = uw(f3(OP_ARIT, 5'd17, O3_RDY, ASR_TPC, 1'b0, 13'd0), URD_TMPL,
                     1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0);
        3'd1: w = uw(f3(OP_ARIT, 5'd18, O3_RDY, ASR_TNPC, 1'b0, 13'd0), URD_TMPL,
                     1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0);
        default: w = uw(f3(OP_ARIT, 5'd0, O3_JMPL, 5'd0, 1'b1, 13'd0), URD_TMPL,
                     1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b1, 1'b1);
      endcase
      USEQ_STRR: unique case (p)
        3'd0: w = addr;
        default: w = uw(f3(OP_MEM, 5'd0, O3_ST, 5'd1, 1'b1, 13'd0), URD_ORIG,
                     1'b0, 1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 1'b1);
      endcase
      USEQ_LDD: unique case (p)
        3'd0: w = addr;
        3'd1: w = uw(f3(OP_MEM, 5'd0, O3_LD, 5'd1, 1'b1, 13'd0), URD_EVEN,
                     1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0);
        default: w = uw(f3(OP_MEM, 5'd0, O3_LD, 5'd1, 1'b1, 13'd4), URD_ODD,
                     1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b1);
      endcase
      USEQ_STD: unique case (p)
        3'd0: w = addr;
        3'd1: w = uw(f3(OP_MEM, 5'd0, O3_ST, 5'd1, 1'b1, 13'd0), URD_EVEN,
                     1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0);
        default: w = uw(f3(OP_MEM, 5'd0, O3_ST, 5'd1, 1'b1, 13'd4), URD_ODD,
                     1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b1);
      endcase
      USEQ_SWAP: unique case (p)
        3'd0: w = addr;
        3'd1: w = uw(f3(OP_MEM, 5'd2, O3_LD, 5'd1, 1'b1, 13'd0), URD_TMPL,
                     1'b0, 1'b0, 1'b0, 1'b1, 1'b1, 1'b0, 1'b0);
        3'd2: w = uw(f3(OP_MEM, 5'd0, O3_ST, 5'd1, 1'b1, 13'd0), URD_ORIG,
                     1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0);
        default: w = uw(f3(OP_ARIT, 5'd0, O3_OR, 5'd2, 1'b1, 13'd0), URD_ORIG,
                     1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b1);
      endcase
      USEQ_LDSTUB: unique case (p)
        3'd0: w = addr;
        3'd1: w = uw(f3(OP_MEM, 5'd2, O3_LDUB, 5'd1, 1'b1, 13'd0), URD_TMPL,
                     1'b0, 1'b0, 1'b0, 1'b1, 1'b1, 1'b0, 1'b0);
        3'd2: w = uw(f3(OP_ARIT, 5'd3, O3_OR, 5'd0, 1'b1, 13'h0FF), URD_TMPL,
                     1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0, 1'b0);
        3'd3: w = uw(f3(OP_MEM, 5'd3, O3_STB, 5'd1, 1'b1, 13'd0), URD_TMPL,
                     1'b0, 1'b0, 1'b0, 1'b1, 1'b1, 1'b0, 1'b0);
        default: w = uw(f3(OP_ARIT, 5'd0, O3_OR, 5'd2, 1'b1, 13'd0), URD_ORIG,
                     1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b1);
      endcase
      default: ;
    endcase
    return w;
  endfunction

  uword_t      w_q;
  logic [31:0] orig_q;
  logic [7:0]  tt_q;

  always_ff @(posedge clk) begin
    w_q    <= rom(useq, upc);
    orig_q <= orig_inst;
    tt_q   <= tt;
  end

  // instruction synthesis
  always_comb begin
    inst = w_q.inst;
    unique case (w_q.rd_sel)
      URD_ORIG: inst[29:25] = orig_q[29:25];
      URD_EVEN: inst[29:25] = {orig_q[29:26], 1'b0};
      URD_ODD:  inst[29:25] = {orig_q[29:26], 1'b1};
      default: ;
    endcase
    if (w_q.rs1_orig) inst[18:14] = orig_q[18:14];
    if (w_q.op2_orig) inst[13:0]  = orig_q[13:0];
    if (w_q.op3_orig) inst[24:19] = orig_q[24:19];
    if (w_q.imm_tt)   inst[12:0]  = {1'b0, tt_q, 4'b0000};
    scr_rd  = w_q.scr_rd;
    scr_rs1 = w_q.scr_rs1;
    last    = w_q.last;
  end
endmodule

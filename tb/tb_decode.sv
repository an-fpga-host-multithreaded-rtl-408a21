// tb_decode: hand-picked SPARC instructions with the decode fields expected
// for each: window mapping of registers (including SAVE/RESTORE writing rd in
// the new window and the in/out overlap), immediates, branch resolution with
// delay slot and annul, CALL, window overflow/underflow, privileged and
// illegal instruction traps, tagged arithmetic and MULScc, stores reading rd
// on the second port, and the instructions that request microcode.
module tb_decode;
  import sparc_pkg::*;
  import sparc_asm_pkg::*;
  logic [31:0] inst, pc, npc;
  logic srd, srs1, um, ul;
  psr_t psr;
  logic [NWIN-1:0] wim;
  dec_t d;
  int checks = 0, failures = 0;

  decode dut (.inst, .scr_rd (srd), .scr_rs1 (srs1), .umode (um), .ulast (ul), .pc, .npc,
              .psr, .wim, .d);

  task automatic chk(string w, logic [31:0] g, logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: got %h expected %h", w, g, e); end
  endtask

  initial begin
    srd = 0; srs1 = 0; um = 0; ul = 0; pc = 32'h100; npc = 32'h104; wim = '0;
    psr = '0; psr.s = 1; psr.cwp = 1; psr.icc = 4'b0100;   // Z set

    // add %i1, %o2, %l3  in window 1: ins at 8+(16+16)%48.., outs at 8+16
    inst = a_r(O3_ADD, 19, 25, 10); #1;
    chk("add rd (l3, w1)", d.rd, 8 + 16 + 11);
    chk("add rs1 (i1, w1)", d.rs1, 8 + ((16 + 17) % 48));
    chk("add rs2 (o2, w1)", d.rs2, 8 + 16 + 2);
    chk("add we", d.we, 1);
    chk("add no trap", d.trap, 0);
    // the ins of window 1 are the outs of window 2
    psr.cwp = 2; inst = a_r(O3_ADD, 9, 0, 0); #1;
    chk("o1 of w2 = i1 of w1", d.rd, 8 + ((16 + 17) % 48));
    psr.cwp = 1;
    // globals unaffected by the window
    inst = a_i(O3_SUB, 3, 4, -5); #1;
    chk("g3", d.rd, 3); chk("g4", d.rs1, 4);
    chk("imm", d.imm, 32'hFFFF_FFFB); chk("use_imm", d.use_imm, 1);
    chk("sub op", d.alu_op, ALU_SUB); chk("no cc", d.set_cc, 0);
    inst = a_i(6'h14, 3, 4, 1); #1;
    chk("subcc sets cc", d.set_cc, 1);
    // sethi
    inst = sethi(5, 32'h1234_5400); #1;
    chk("sethi imm", d.imm, 32'h1234_5400); chk("sethi op", d.alu_op, ALU_PASSB);
    // branches: be taken (Z=1), bne not taken, bne,a annuls, ba,a
    inst = bicc(C_E, 0, 8); #1;
    chk("be redirect", d.redirect, 1); chk("be pc", d.nxt_pc, 32'h104);
    chk("be npc", d.nxt_npc, 32'h120);
    inst = bicc(C_NE, 0, 8); #1;
    chk("bne pc", d.nxt_pc, 32'h104); chk("bne npc", d.nxt_npc, 32'h108);
    inst = bicc(C_NE, 1, 8); #1;
    chk("bne,a pc", d.nxt_pc, 32'h108); chk("bne,a npc", d.nxt_npc, 32'h10C);
    inst = bicc(C_A, 1, -4); #1;
    chk("ba,a pc", d.nxt_pc, 32'hF0); chk("ba,a npc", d.nxt_npc, 32'hF4);
    // call writes %o7 and jumps
    inst = call(16); #1;
    chk("call rd o7", d.rd, 8 + 16 + 7); chk("call npc", d.nxt_npc, 32'h140);
    chk("call unit", d.unit, UNIT_LINK);
    // save: rd in window 0, overflow when WIM marks window 0
    inst = a_i(O3_SAVE, 30, 14, -96); #1;
    chk("save rd i6 in w0 (= o6 of w1)", d.rd, 8 + 16 + 6); chk("save rs1 o6 in w1", d.rs1, 8 + 16 + 6);
    chk("save no trap", d.trap, 0);
    wim = 3'b001; #1;
    chk("save overflow", d.trap, 1); chk("save tt", d.tt, TT_WIN_OVF);
    wim = 3'b100; inst = a_i(O3_RESTORE, 8, 24, 0); #1;
    chk("restore underflow", d.trap, 1); chk("restore tt", d.tt, TT_WIN_UNF);
    wim = '0; #1;
    chk("restore rd o0 in w2", d.rd, 8 + 32); chk("restore ok", d.trap, 0);
    // privileged instruction in user mode
    psr.s = 0; inst = a_r(O3_RDPSR, 4, 0, 0); #1;
    chk("rdpsr user traps", d.trap, 1); chk("priv tt", d.tt, TT_PRIV);
    psr.s = 1; #1;
    chk("rdpsr supervisor ok", d.trap, 0);
    // tagged arithmetic and the multiply step set the condition codes
    inst = a_r(6'h20, 1, 1, 1); #1;
    chk("taddcc legal", d.trap, 0); chk("taddcc tagged", d.is_tagged, 1);
    chk("taddcc no tv", d.tag_tv, 0); chk("taddcc cc", d.set_cc, 1);
    inst = a_r(6'h23, 1, 1, 1); #1;
    chk("tsubcctv sub", d.alu_op, ALU_SUB); chk("tsubcctv tv", d.tag_tv, 1);
    inst = a_r(6'h24, 1, 1, 1); #1;
    chk("mulscc step", d.is_muls, 1); chk("mulscc cc", d.set_cc, 1); chk("mulscc we", d.we, 1);
    // illegal: unimp
    inst = 32'h0000_0000; #1;
    chk("unimp illegal", d.trap, 1);
    // stores: data register on port 2; reg+reg store goes to microcode
    inst = m_i(O3_ST, 17, 2, 8); #1;
    chk("st data reg l1", d.rs2, 8 + 16 + 9); chk("st mem", d.mem_st, 1);
    inst = m_r(O3_ST, 17, 2, 3); #1;
    chk("st rr microcode", d.enter_u, 1); chk("st rr seq", d.useq, USEQ_STRR);
    chk("st rr no mem", d.mem_st, 0);
    inst = m_r(O3_LD, 17, 2, 3); #1;
    chk("ld rr rs2", d.rs2, 3); chk("ld mem", d.mem_ld, 1);
    inst = m_i(O3_LDD, 16, 2, 0); #1; chk("ldd seq", d.useq, USEQ_LDD);
    inst = m_i(O3_SWAP, 16, 2, 0); #1; chk("swap seq", d.useq, USEQ_SWAP);
    inst = m_i(O3_LDSTUB, 16, 2, 0); #1; chk("ldstub u", d.enter_u, 1);
    // in microcode: scratch registers, RDASR of the trapped PC, trap jump
    um = 1; srd = 1; srs1 = 1;
    inst = a_r(O3_ADD, 1, 2, 0); #1;
    chk("scratch rd", d.rd, 57); chk("scratch rs1", d.rs1, 58);
    srd = 0; srs1 = 0;
    inst = a_r(O3_RDY, 17, ASR_TPC, 0); #1;
    chk("rd tpc", d.spr, SPR_TPC); chk("rd tpc ok", d.trap, 0);
    inst = a_i(O3_JMPL, 0, 0, 32'h850); #1;
    chk("micro jmpl", d.is_ujmp, 1);
    um = 0; inst = a_r(O3_RDY, 17, ASR_TPC, 0); #1;
    chk("rd tpc outside microcode illegal", d.trap, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

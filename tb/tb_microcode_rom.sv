// tb_microcode_rom: walks every microcode sequence for a chosen original
// instruction and checks each synthesized instruction word, its scratch
// flags and the last-step flag one cycle after the ROM is addressed.
module tb_microcode_rom;
  import sparc_pkg::*;
  import sparc_asm_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  useq_e useq;
  logic [2:0] upc;
  logic [31:0] orig, inst;
  logic [7:0] tt;
  logic srd, srs1, last;
  int checks = 0, failures = 0;

  microcode_rom dut (.clk, .useq, .upc, .orig_inst (orig), .tt, .inst, .scr_rd (srd),
                     .scr_rs1 (srs1), .last);

  task automatic step(useq_e s, int p, logic [31:0] exp, logic e_srd, logic e_srs1, logic e_last);
    @(negedge clk);
    useq = s; upc = 3'(p);
    @(posedge clk); #1;
    checks++;
    if (inst !== exp || srd !== e_srd || srs1 !== e_srs1 || last !== e_last) begin
      failures++;
      $display("FAIL seq %s step %0d: got %h %b%b%b expected %h %b%b%b", s.name(), p,
               inst, srd, srs1, last, exp, e_srd, e_srs1, e_last);
    end
  endtask

  initial begin
    tt = 8'h85;
    // trap entry
    orig = 32'h0;
    step(USEQ_TRAP, 0, a_r(O3_RDY, 17, ASR_TPC, 0), 0, 0, 0);
    step(USEQ_TRAP, 1, a_r(O3_RDY, 18, ASR_TNPC, 0), 0, 0, 0);
    step(USEQ_TRAP, 2, a_i(O3_JMPL, 0, 0, 32'h850), 0, 1, 1);
    // st %o1, [%l2 + %i3]  (stb variant keeps its op3)
    orig = m_r(O3_STB, 9, 18, 27);
    step(USEQ_STRR, 0, a_r(O3_ADD, 1, 18, 27), 1, 0, 0);
    step(USEQ_STRR, 1, m_i(O3_STB, 9, 1, 0), 0, 1, 1);
    // ldd [%g3 + 8], %o3 -> even/odd pair o2/o3
    orig = m_i(O3_LDD, 11, 3, 8);
    step(USEQ_LDD, 0, a_i(O3_ADD, 1, 3, 8), 1, 0, 0);
    step(USEQ_LDD, 1, m_i(O3_LD, 10, 1, 0), 0, 1, 0);
    step(USEQ_LDD, 2, m_i(O3_LD, 11, 1, 4), 0, 1, 1);
    // std %l4, [%g2]
    orig = m_i(O3_STD, 20, 2, 0);
    step(USEQ_STD, 1, m_i(O3_ST, 20, 1, 0), 0, 1, 0);
    step(USEQ_STD, 2, m_i(O3_ST, 21, 1, 4), 0, 1, 1);
    // swap [%g2 + 4], %l4
    orig = m_i(O3_SWAP, 20, 2, 4);
    step(USEQ_SWAP, 0, a_i(O3_ADD, 1, 2, 4), 1, 0, 0);
    step(USEQ_SWAP, 1, m_i(O3_LD, 2, 1, 0), 1, 1, 0);
    step(USEQ_SWAP, 2, m_i(O3_ST, 20, 1, 0), 0, 1, 0);
    step(USEQ_SWAP, 3, a_i(O3_OR, 20, 2, 0), 0, 1, 1);
    // ldstub [%g2], %l5
    orig = m_i(O3_LDSTUB, 21, 2, 0);
    step(USEQ_LDSTUB, 1, m_i(O3_LDUB, 2, 1, 0), 1, 1, 0);
    step(USEQ_LDSTUB, 2, a_i(O3_OR, 3, 0, 32'hFF), 1, 0, 0);
    step(USEQ_LDSTUB, 3, m_i(O3_STB, 3, 1, 0), 1, 1, 0);
    step(USEQ_LDSTUB, 4, a_i(O3_OR, 21, 2, 0), 0, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// sparc_prog_pkg: the self-checking SPARC test program run by every thread
// in the pipeline and full-design testbenches, and the memory image it must
// leave behind.
//
// Each thread reads its hardware thread number (%asr16) into %g1 and works in
// its own 256-byte data area at DATA_BASE + %g1*256. The program exercises a
// counted loop with a conditional branch, SMUL, a register+register store
// (microcode), SAVE/RESTORE with the window overlap, WRTBR/WRPSR, a software
// trap (ta 5) into a handler at TBA + 0x850 that records the trapped PC and
// returns with JMPL/RETT, STD/LDD, SWAP and LDSTUB (microcode), byte loads
// with and without sign extension, TADDcc (tag overflow in the condition
// codes), a MULScc step, TADDccTV (trapping to TBA + 0xA0 in threads whose
// number is not a multiple of 4), and two loads from an aliasing address
// that force both dirty data lines to be written back. It ends with ET
// cleared and "ta 0", which puts the thread into error mode (halted).
package sparc_prog_pkg;
  import sparc_pkg::*;
  import sparc_asm_pkg::*;

  localparam logic [31:0] DATA_BASE = 32'h0001_0000;
  localparam logic [31:0] TBA       = 32'h0000_1000;
  localparam logic [31:0] HANDLER   = TBA + 32'h850;     // tt 0x85
  localparam int          PROG_LEN  = 61;
  localparam int          HAND_LEN  = 3;
  localparam int          TRAP_IDX  = 25;                // index of "ta 5"
  localparam logic [31:0] TAG_HANDLER = TBA + 32'h0A0;  // tt 0x0A
  localparam int          TAG_IDX   = 52;                // index of taddcctv
  localparam int          NCHECK    = 16;                // words checked

  localparam logic [4:0] G1 = 1, G2 = 2, G3 = 3, G4 = 4, G5 = 5, G6 = 6, G7 = 7,
                         O0 = 8, O2 = 10, O3 = 11, O4 = 12, O5 = 13,
                         L0 = 16, L1 = 17, L2 = 18, L3 = 19, L4 = 20, L5 = 21, L6 = 22,
                         L7 = 23, I0 = 24;

  function automatic logic [31:0] prog_word(int i);
    unique case (i)
      0:  return a_r(O3_RDY, G1, ASR_TID, 0);
      1:  return a_i(O3_SLL, G2, G1, 8);
      2:  return sethi(G3, DATA_BASE);
      3:  return a_r(O3_ADD, G2, G2, G3);
      4:  return a_i(O3_ADD, O0, G1, 5);
      5:  return a_i(O3_OR, G4, 0, 10);
      6:  return a_i(O3_OR, G5, 0, 0);
      7:  return a_r(O3_ADD, G5, G5, O0);              // loop:
      8:  return a_i(6'h14, G4, G4, 1);                // subcc
      9:  return bicc(C_NE, 1'b0, -2);
      10: return nop();
      11: return m_i(O3_ST, G5, G2, 28);
      12: return m_i(O3_ST, G5, G2, 0);
      13: return a_i(O3_SMUL, G6, G5, 3);
      14: return a_i(O3_OR, G7, 0, 4);
      15: return m_r(O3_ST, G6, G2, G7);               // st reg+reg
      16: return a_r(O3_SAVE, 0, 0, 0);
      17: return a_r(O3_ADD, L0, I0, I0);
      18: return m_i(O3_ST, L0, G2, 8);
      19: return a_r(O3_RESTORE, 0, 0, 0);
      20: return sethi(G7, TBA);
      21: return a_r(O3_WRTBR, 0, G7, 0);
      22: return a_r(O3_RDPSR, L3, 0, 0);
      23: return a_i(O3_OR, L3, L3, 32'h20);
      24: return a_r(O3_WRPSR, 0, L3, 0);
      25: return ticc(C_A, 0, 5);
      26: return a_i(O3_OR, O2, 0, 32'h11);
      27: return a_i(O3_ADD, O3, G1, 32'h22);
      28: return m_i(O3_STD, O2, G2, 16);
      29: return m_i(O3_LDD, O4, G2, 16);
      30: return a_r(O3_ADD, O4, O4, O5);
      31: return m_i(O3_ST, O4, G2, 24);
      32: return a_i(O3_OR, L4, 0, 32'h77);
      33: return m_i(O3_SWAP, L4, G2, 0);
      34: return m_i(O3_ST, L4, G2, 40);
      35: return m_i(O3_LDSTUB, L5, G2, 32);
      36: return m_i(O3_LDUB, L6, G2, 32);
      37: return a_r(O3_ADD, L6, L5, L6);
      38: return m_i(O3_ST, L6, G2, 36);
      39: return m_i(O3_LDSB, L7, G2, 32);
      40: return m_i(O3_ST, L7, G2, 44);
      41: return a_i(6'h20, L0, G1, 4);               // taddcc
      42: return a_r(O3_RDPSR, L1, 0, 0);
      43: return a_i(O3_SRL, L1, L1, 20);
      44: return a_i(O3_AND, L1, L1, 15);
      45: return m_i(O3_ST, L1, G2, 48);
      46: return a_i(O3_WRY, 0, 0, 1);
      47: return a_i(6'h24, L2, G1, 7);               // mulscc
      48: return m_i(O3_ST, L2, G2, 52);
      49: return a_r(O3_RDY, L3, 0, 0);
      50: return m_i(O3_ST, L3, G2, 56);
      51: return m_i(O3_ST, 0, G2, 60);
      52: return a_i(6'h22, L4, G1, 16);              // taddcctv
      53: return sethi(G7, 32'h0004_0000);
      54: return a_r(O3_ADD, G7, G7, G2);
      55: return m_i(O3_LD, 0, G7, 0);                 // evict line 0
      56: return m_i(O3_LD, 0, G7, 32);                // evict line 1
      57: return a_r(O3_RDPSR, L3, 0, 0);
      58: return a_i(O3_ANDN, L3, L3, 32'h20);
      59: return a_r(O3_WRPSR, 0, L3, 0);
      default: return ticc(C_A, 0, 0);                 // error mode
    endcase
  endfunction

  function automatic logic [31:0] handler_word(int i);
    unique case (i)
      0:  return m_i(O3_ST, L1, G2, 12);
      1:  return a_r(O3_JMPL, 0, L2, 0);
      default: return a_i(O3_RETT, 0, L2, 4);
    endcase
  endfunction

  // tag overflow handler: records the trapping PC in word 15 and skips the
  // instruction
  function automatic logic [31:0] tag_handler_word(int i);
    unique case (i)
      0:  return m_i(O3_ST, L1, G2, 60);
      1:  return a_r(O3_JMPL, 0, L2, 0);
      default: return a_i(O3_RETT, 0, L2, 4);
    endcase
  endfunction

  function automatic logic [31:0] data_addr(int hw_tid, int k);
    return DATA_BASE + 32'(hw_tid) * 256 + 32'(4 * k);
  endfunction

  // value word k of the thread's data area must hold at the end
  function automatic logic [31:0] expected(int hw_tid, int k);
    logic [31:0] g1 = 32'(hw_tid);
    unique case (k)
      0:  return 32'h77;
      1:  return 30 * (g1 + 5);
      2:  return 2 * (g1 + 5);
      3:  return 32'(4 * TRAP_IDX);
      4:  return 32'h11;
      5:  return g1 + 32'h22;
      6:  return 32'h11 + g1 + 32'h22;
      7:  return 10 * (g1 + 5);
      8:  return 32'hFF00_0000;
      9:  return 32'hFF;
      10: return 10 * (g1 + 5);
      12: return {28'd0, (g1[1:0] != 2'b00), 1'b0};             // icc after taddcc
      13: return {(g1[1:0] != 2'b00), 31'd0} + (g1 >> 1) + 32'd7; // mulscc
      14: return {g1[0], 31'd0};                                 // Y after mulscc
      15: return (g1[1:0] != 2'b00) ? 32'(4 * TAG_IDX) : 32'd0;   // taddcctv trap
      default: return 32'hFFFF_FFFF;
    endcase
  endfunction
endpackage

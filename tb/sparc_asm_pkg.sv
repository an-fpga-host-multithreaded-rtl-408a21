// sparc_asm_pkg: SPARC v8 instruction encoders used by the testbenches to
// build test programs in memory (format 1, 2 and 3 instructions).
package sparc_asm_pkg;
  import sparc_pkg::*;

  function automatic logic [31:0] a_r(logic [5:0] op3, logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return {OP_ARIT, rd, op3, rs1, 1'b0, 8'd0, rs2};
  endfunction
  function automatic logic [31:0] a_i(logic [5:0] op3, logic [4:0] rd, logic [4:0] rs1, int simm);
    return {OP_ARIT, rd, op3, rs1, 1'b1, 13'(simm)};
  endfunction
  function automatic logic [31:0] m_r(logic [5:0] op3, logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return {OP_MEM, rd, op3, rs1, 1'b0, 8'd0, rs2};
  endfunction
  function automatic logic [31:0] m_i(logic [5:0] op3, logic [4:0] rd, logic [4:0] rs1, int simm);
    return {OP_MEM, rd, op3, rs1, 1'b1, 13'(simm)};
  endfunction
  function automatic logic [31:0] sethi(logic [4:0] rd, logic [31:0] value);
    return {OP_FMT2, rd, 3'b100, value[31:10]};
  endfunction
  function automatic logic [31:0] bicc(logic [3:0] cond, logic a, int disp_words);
    return {OP_FMT2, a, cond, 3'b010, 22'(disp_words)};
  endfunction
  function automatic logic [31:0] call(int disp_words);
    return {OP_CALL, 30'(disp_words)};
  endfunction
  function automatic logic [31:0] ticc(logic [3:0] cond, logic [4:0] rs1, int simm);
    return {OP_ARIT, 1'b0, cond, O3_TICC, rs1, 1'b1, 13'(simm)};
  endfunction
  function automatic logic [31:0] nop();
    return sethi(5'd0, 32'd0);
  endfunction
  localparam logic [3:0] C_A = 4'b1000, C_NE = 4'b1001, C_E = 4'b0001, C_L = 4'b0011,
                         C_G = 4'b1010;
endpackage
